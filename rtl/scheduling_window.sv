// scheduling_window: the small instruction window that does dynamic scheduling.
//
// Every decoded instruction is written into a free entry here (and, in
// parallel, into the instruction buffer). An entry watches the result buses
// for its source tags (wakeup); when both sources hold values the entry is a
// candidate, and up to 'issue_limit' candidates are dispatched per cycle
// (select). The entry is released in the cycle its instruction is dispatched,
// which is the point of the decoupled organisation: instructions that might
// have to be reissued do not occupy this window, because the instruction
// buffer keeps them. 64 entries and 8-wide issue follow the evaluated machine.
//
// This implementation's choices: selection gives priority to the lowest entry
// index (no age ordering); a value seen on a result bus is used for selection
// from the next cycle on, so dependent one-cycle operations issue every other
// cycle; a broadcast whose value differs from one already held (a corrected
// value after a misprediction) replaces it, so an instruction still waiting
// here is dispatched with the corrected value.
//
// Interface: alloc_valid/alloc_uop write new instructions (valid slots form a
// prefix, and the caller keeps their number at or below free_count); iss_valid/iss_uop are the dispatched
// instructions, packed into the low slots, at most issue_limit of them.
module scheduling_window
  import dw_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned NALLOC  = 8,
  parameter int unsigned NISSUE  = 8,
  parameter int unsigned NRES    = 8
)(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [NALLOC-1:0]            alloc_valid,
  input  uop_t  [NALLOC-1:0]            alloc_uop,
  output logic  [$clog2(ENTRIES+1)-1:0] free_count,
  input  logic  [NRES-1:0]              res_valid,
  input  result_t [NRES-1:0]            res,
  input  logic  [$clog2(NISSUE+1)-1:0]  issue_limit,
  output logic  [NISSUE-1:0]            iss_valid,
  output uop_t  [NISSUE-1:0]            iss_uop
);

  localparam int unsigned CW = $clog2(ENTRIES+1);

  logic [ENTRIES-1:0] valid_q;
  uop_t               uop_q [ENTRIES];

  logic [ENTRIES-1:0] pick;       // selected this cycle
  logic [ENTRIES-1:0] fill;       // allocated this cycle
  int unsigned        fill_src [ENTRIES];

  // Select.
  always_comb begin
    int unsigned n;
    n = 0;
    pick      = '0;
    iss_valid = '0;
    iss_uop   = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && uop_q[e].s1.ready && uop_q[e].s2.ready &&
          n < int'(issue_limit) && n < NISSUE) begin
        pick[e]      = 1'b1;
        iss_valid[n] = 1'b1;
        iss_uop[n]   = uop_q[e];
        n++;
      end
    end
  end

  // Free entry count and allocation into the lowest free entries.
  always_comb begin
    int unsigned a;
    int unsigned f;
    f = 0;
    for (int e = 0; e < ENTRIES; e++) if (!valid_q[e]) f++;
    free_count = CW'(f);
    a = 0;
    fill = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      fill_src[e] = 0;
      if (!valid_q[e] && a < NALLOC) begin
        fill[e]     = alloc_valid[a];
        fill_src[e] = a;
        a++;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int e = 0; e < ENTRIES; e++) uop_q[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (fill[e]) begin
          valid_q[e] <= 1'b1;
          uop_q[e]   <= alloc_uop[fill_src[e]];
        end else if (pick[e]) begin
          valid_q[e] <= 1'b0;
        end else if (valid_q[e]) begin
          uop_t u;
          logic ch;
          u = uop_q[e];
          for (int r = 0; r < NRES; r++) begin
            u.s1 = snoop_src(u.s1, res_valid[r], res[r], ch);
            u.s2 = snoop_src(u.s2, res_valid[r], res[r], ch);
          end
          uop_q[e] <= u;
        end
      end
    end
  end

  // The caller never writes more instructions than there are free entries,
  // and its valid instructions form a prefix of the allocation slots.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(alloc_valid) <= int'(free_count));
  a_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    ((alloc_valid + NALLOC'(1)) & alloc_valid) == '0);

endmodule
