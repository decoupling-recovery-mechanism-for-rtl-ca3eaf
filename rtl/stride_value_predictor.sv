// stride_value_predictor: direct-mapped stride value predictor.
//
// Each entry holds a tag, the last value the instruction produced (prev_value),
// the difference of its last two values (stride) and a 2-bit saturating
// confidence counter (conf). The table is indexed by instruction address; the
// prediction is prev_value + stride, and speculation on it is requested only
// when the entry's tag matches and conf is larger than two. These fields, the
// sum and the 4096-entry size follow the predictor as published.
//
// Training (this implementation's choice where the description is silent): an
// update with the actual value v of an instruction compares v with the entry's
// current prediction and counts conf up on a match and down otherwise, then
// writes stride = v - prev_value and prev_value = v. A tag miss replaces the
// entry with prev_value = v, stride = 0, conf = 0. The core updates at commit,
// so only final, non-speculative values train the table. Updates of one cycle
// are applied in port order, later ports seeing earlier ports' writes.
//
// Interface: NLK combinational lookup ports (address in, hit/speculate/value
// out); NUP update ports, written at the clock edge. Index = pc[IDX_LSB +: log2
// ENTRIES], tag = the address bits above the index.
module stride_value_predictor
  import dw_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned IDX_LSB = 2,   // byte address of 4-byte instructions
  parameter int unsigned NLK     = 8,
  parameter int unsigned NUP     = 8
)(
  input  logic              clk,
  input  logic              rst_n,
  input  word_t [NLK-1:0]   lk_pc,
  output logic  [NLK-1:0]   lk_hit,
  output logic  [NLK-1:0]   lk_speculate,
  output word_t [NLK-1:0]   lk_value,
  input  logic  [NUP-1:0]   up_valid,
  input  word_t [NUP-1:0]   up_pc,
  input  word_t [NUP-1:0]   up_value
);

  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = XLEN - IW - IDX_LSB;

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] tag;
    word_t         prev_value;
    word_t         stride;
    logic [1:0]    conf;
  } vp_entry_t;

  vp_entry_t tbl_q [ENTRIES];

  function automatic logic [IW-1:0] idx_of(word_t pc);
    return pc[IDX_LSB +: IW];
  endfunction
  function automatic logic [TW-1:0] tag_of(word_t pc);
    return pc[XLEN-1 -: TW];
  endfunction

  // Lookup.
  always_comb begin
    for (int i = 0; i < NLK; i++) begin
      vp_entry_t e;
      e = tbl_q[idx_of(lk_pc[i])];
      lk_hit[i]       = e.valid && (e.tag == tag_of(lk_pc[i]));
      lk_speculate[i] = lk_hit[i] && (e.conf > 2'd2);
      lk_value[i]     = e.prev_value + e.stride;
    end
  end

  // Training, chained across the update ports of one cycle.
  vp_entry_t         up_next [NUP];
  logic [IW-1:0]     up_idx  [NUP];

  always_comb begin
    vp_entry_t chain [NUP];
    chain = '{default: '0};
    for (int w = 0; w < NUP; w++) begin
      vp_entry_t e;
      up_idx[w] = idx_of(up_pc[w]);
      e = tbl_q[up_idx[w]];
      for (int u = 0; u < w; u++)
        if (up_valid[u] && up_idx[u] == up_idx[w]) e = chain[u];
      if (e.valid && e.tag == tag_of(up_pc[w])) begin
        if (e.prev_value + e.stride == up_value[w])
          e.conf = (e.conf == 2'd3) ? 2'd3 : e.conf + 2'd1;
        else
          e.conf = (e.conf == 2'd0) ? 2'd0 : e.conf - 2'd1;
        e.stride     = up_value[w] - e.prev_value;
        e.prev_value = up_value[w];
      end else begin
        e.valid      = 1'b1;
        e.tag        = tag_of(up_pc[w]);
        e.prev_value = up_value[w];
        e.stride     = '0;
        e.conf       = 2'd0;
      end
      chain[w]   = e;
      up_next[w] = e;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ENTRIES; k++) tbl_q[k].valid <= 1'b0;
    end else begin
      for (int w = 0; w < NUP; w++)
        if (up_valid[w]) tbl_q[up_idx[w]] <= up_next[w];
    end
  end

endmodule
