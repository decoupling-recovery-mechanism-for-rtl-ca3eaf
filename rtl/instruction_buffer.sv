// instruction_buffer: the large in-order buffer that keeps every instruction
// until commit and performs instruction reissue after a value misprediction.
//
// It works like a register update unit (RUU): entries are allocated in program
// order at the tail and committed in order from the head; an entry's index,
// extended by one generation bit, is the tag that names its result. Unlike the
// scheduling window it does not release an entry at dispatch, so it can
// re-dispatch (reissue) an instruction whose source value was wrong.
//
// Misprediction detection. Every accepted result is broadcast on a result bus
// with its tag. Each entry compares the broadcast against its source tags and,
// when a source already held a value, against that value. A difference means
// the source had been computed from a mispredicted value (directly, or through
// an instruction that was itself reissued): the entry takes the new value and
// is marked for reissue. If it had already been dispatched, its version number
// is advanced so that the outstanding execution, when it completes, is
// recognised as stale and dropped, and its result is withdrawn. Reissued
// results are broadcast again, so the correction walks down the dependence
// chain one producer at a time. A value-predicted instruction carries its
// predicted value as its result from decode on; its own completion broadcasts
// the actual value, which is how the misprediction itself is found.
//
// Reissue path. Wakeup/select of the buffer is pipelined: a cycle selects up
// to NREISSUE marked entries whose sources hold values, oldest first, and the
// selection is dispatched WAKEUP_LAT-1 cycles later (two cycles in all, as
// evaluated). At that point the selection is re-checked and cancelled when the
// same instruction is still in, or was meanwhile dispatched from, the faster
// scheduling window, or when its version changed. Surviving requests go to
// the dispatch arbiter, which gives them the functional units the window left
// free; a request that gets none stays marked and is selected again.
//
// Commit: up to NCOMMIT consecutive completed entries without a pending reissue
// leave from the head per cycle, writing the register file and training the
// value predictor. Sizes (128 entries, two-cycle wakeup/select) follow the
// evaluated machine; the value comparison used to find dependents, the oldest-
// first selection and the widths of the reissue and commit paths (8, the
// machine width) are this implementation's choices.
module instruction_buffer
  import dw_pkg::*;
#(
  parameter int unsigned ENTRIES    = 128,
  parameter int unsigned NALLOC     = 8,
  parameter int unsigned NCOMMIT    = 8,
  parameter int unsigned NRES       = 8,   // result buses = functional units
  parameter int unsigned NWDISP     = 8,   // window dispatches per cycle
  parameter int unsigned NREISSUE   = 8,
  parameter int unsigned NRD        = 16,  // decode-time result read ports
  parameter int unsigned WAKEUP_LAT = 2
)(
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation (program order, valid slots form a prefix)
  input  logic    [NALLOC-1:0]          alloc_valid,
  input  instr_t  [NALLOC-1:0]          alloc_instr,
  input  src_t    [NALLOC-1:0]          alloc_s1,
  input  src_t    [NALLOC-1:0]          alloc_s2,
  input  logic    [NALLOC-1:0]          alloc_pred,      // value-predicted
  input  word_t   [NALLOC-1:0]          alloc_pred_value,
  output tag_t    [NALLOC-1:0]          alloc_tag,       // tags the slots get
  output logic    [$clog2(ENTRIES+1)-1:0] free_count,
  output logic    [$clog2(ENTRIES+1)-1:0] used_count,
  // decode-time reads of results held in the buffer
  input  tag_t    [NRD-1:0]             rd_tag,
  output logic    [NRD-1:0]             rd_avail,
  output word_t   [NRD-1:0]             rd_value,
  // dispatches from the scheduling window
  input  logic    [NWDISP-1:0]          wdisp_valid,
  input  tag_t    [NWDISP-1:0]          wdisp_tag,
  output ver_t    [NWDISP-1:0]          wdisp_ver,
  // functional unit results and the filtered result buses
  input  logic    [NRES-1:0]            fu_valid,
  input  result_t [NRES-1:0]            fu_res,
  output logic    [NRES-1:0]            bus_valid,
  output result_t [NRES-1:0]            bus,
  // reissue requests to the dispatch arbiter
  output logic    [NREISSUE-1:0]        rs_valid,
  output fu_req_t [NREISSUE-1:0]        rs_req,
  input  logic    [NREISSUE-1:0]        rs_grant,
  // commit
  output logic    [NCOMMIT-1:0]         cm_valid,
  output tag_t    [NCOMMIT-1:0]         cm_tag,
  output word_t   [NCOMMIT-1:0]         cm_pc,
  output reg_t    [NCOMMIT-1:0]         cm_rd,
  output word_t   [NCOMMIT-1:0]         cm_value,
  // events of this cycle, for statistics
  output logic    [7:0]                 ev_mispredict,   // predicted value found wrong
  output logic    [7:0]                 ev_marked,       // entries marked for reissue
  output logic    [7:0]                 ev_reissue,      // reissues dispatched
  output logic    [7:0]                 ev_cancel        // buffer selections dropped for the window
);

  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned CW = $clog2(ENTRIES+1);

  typedef struct packed {
    logic  valid;
    logic  gen;
    word_t pc;
    op_e   op;
    reg_t  rd;
    src_t  s1;
    src_t  s2;
    logic  predicted;
    logic  checked;    // first result of a predicted entry has been seen
    logic  avail;      // result holds the value consumers currently use
    word_t result;
    logic  in_win;     // a copy still waits in the scheduling window
    logic  issued;     // an execution with the current version is outstanding or done
    logic  completed;  // result of the current version has arrived
    logic  reissue;    // a source changed: must be dispatched again
    ver_t  ver;
  } ent_t;

  typedef struct packed {
    logic valid;
    tag_t tag;
    ver_t ver;
  } sel_t;

  ent_t ent_q [ENTRIES];
  tag_t head_q, tail_q;
  sel_t [NREISSUE-1:0] pipe_q [WAKEUP_LAT-1];

  function automatic logic [IW-1:0] ix(tag_t t);
    return t[IW-1:0];
  endfunction
  function automatic logic same_entry(ent_t e, tag_t t);
    return e.valid && (e.gen == t[IW]);
  endfunction

  assign used_count = CW'(tail_q - head_q);
  assign free_count = CW'(ENTRIES) - used_count;

  always_comb
    for (int k = 0; k < NALLOC; k++) alloc_tag[k] = tail_q + tag_t'(k);

  always_comb
    for (int i = 0; i < NRD; i++) begin
      rd_avail[i] = ent_q[ix(rd_tag[i])].avail;
      rd_value[i] = ent_q[ix(rd_tag[i])].result;
    end

  always_comb
    for (int i = 0; i < NWDISP; i++) wdisp_ver[i] = ent_q[ix(wdisp_tag[i])].ver;

  // Result filter: only the current version of a live entry is broadcast.
  always_comb
    for (int r = 0; r < NRES; r++) begin
      ent_t e;
      e = ent_q[ix(fu_res[r].tag)];
      bus[r]       = fu_res[r];
      bus_valid[r] = fu_valid[r] && same_entry(e, fu_res[r].tag) &&
                     e.issued && (e.ver == fu_res[r].ver);
    end

  // Commit from the head.
  always_comb begin
    logic go;
    go = 1'b1;
    for (int c = 0; c < NCOMMIT; c++) begin
      tag_t t;
      ent_t e;
      t = head_q + tag_t'(c);
      e = ent_q[ix(t)];
      go = go && (tag_t'(c) < tag_t'(tail_q - head_q)) && e.valid &&
           e.completed && !e.reissue;
      cm_valid[c] = go;
      cm_tag[c]   = t;
      cm_pc[c]    = e.pc;
      cm_rd[c]    = e.rd;
      cm_value[c] = e.result;
    end
  end

  // Reissue wakeup/select, stage 1: oldest marked entries with ready sources.
  sel_t [NREISSUE-1:0] sel;
  always_comb begin
    int unsigned n;
    n = 0;
    sel = '0;
    for (int o = 0; o < ENTRIES; o++) begin
      tag_t t;
      ent_t e;
      logic in_pipe;
      t = head_q + tag_t'(o);
      e = ent_q[ix(t)];
      in_pipe = 1'b0;
      for (int p = 0; p < WAKEUP_LAT-1; p++)
        for (int k = 0; k < NREISSUE; k++)
          if (pipe_q[p][k].valid && pipe_q[p][k].tag == t) in_pipe = 1'b1;
      if (e.valid && e.reissue && !e.issued && e.s1.ready && e.s2.ready &&
          !in_pipe && n < NREISSUE) begin
        sel[n].valid = 1'b1;
        sel[n].tag   = t;
        sel[n].ver   = e.ver;
        n++;
      end
    end
  end

  // Final stage: re-check and request a functional unit.
  logic [7:0] n_cancel;
  always_comb begin
    n_cancel = '0;
    for (int k = 0; k < NREISSUE; k++) begin
      sel_t s;
      ent_t e;
      s = pipe_q[WAKEUP_LAT-2][k];
      e = ent_q[ix(s.tag)];
      rs_valid[k] = s.valid && same_entry(e, s.tag) && e.reissue && !e.issued &&
                    !e.in_win && (e.ver == s.ver);
      if (s.valid && same_entry(e, s.tag) && (e.in_win || e.issued)) n_cancel++;
      rs_req[k].tag = s.tag;
      rs_req[k].ver = e.ver;
      rs_req[k].op  = e.op;
      rs_req[k].a   = e.s1.value;
      rs_req[k].b   = e.s2.value;
    end
  end
  assign ev_cancel = n_cancel;

  // Per-entry view of this cycle's window dispatches, reissue grants and
  // accepted results (one unit result per entry and cycle at most).
  logic [ENTRIES-1:0] wd_hit, rg_hit, cp_hit;
  word_t              cp_val [ENTRIES];
  logic [7:0]         n_granted;
  always_comb begin
    wd_hit    = '0;
    rg_hit    = '0;
    cp_hit    = '0;
    n_granted = '0;
    for (int i = 0; i < ENTRIES; i++) cp_val[i] = '0;
    for (int w = 0; w < NWDISP; w++)
      if (wdisp_valid[w] && same_entry(ent_q[ix(wdisp_tag[w])], wdisp_tag[w]))
        wd_hit[ix(wdisp_tag[w])] = 1'b1;
    for (int k = 0; k < NREISSUE; k++)
      if (rs_valid[k] && rs_grant[k]) begin
        rg_hit[ix(rs_req[k].tag)] = 1'b1;
        n_granted++;
      end
    for (int r = 0; r < NRES; r++)
      if (bus_valid[r]) begin
        cp_hit[ix(bus[r].tag)] = 1'b1;
        cp_val[ix(bus[r].tag)] = bus[r].value;
      end
  end

  // Entry update.
  always_ff @(posedge clk or negedge rst_n) begin
    logic [7:0] n_mis, n_mark;
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
      for (int p = 0; p < WAKEUP_LAT-1; p++) pipe_q[p] <= '0;
      ev_mispredict <= '0;
      ev_marked     <= '0;
      ev_reissue    <= '0;
    end else begin
      n_mis  = '0;
      n_mark = '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ent_t e;
        logic ch, c1, c2;
        e = ent_q[i];
        if (e.valid) begin
          if (wd_hit[i]) begin
            e.in_win  = 1'b0;
            e.issued  = 1'b1;
            e.reissue = 1'b0;
          end
          if (rg_hit[i]) begin
            e.issued  = 1'b1;
            e.reissue = 1'b0;
          end
          if (cp_hit[i]) begin
            if (e.predicted && !e.checked && e.result != cp_val[i]) n_mis++;
            e.checked   = 1'b1;
            e.completed = 1'b1;
            e.avail     = 1'b1;
            e.result    = cp_val[i];
          end
          ch = 1'b0;
          for (int r = 0; r < NRES; r++) begin
            e.s1 = snoop_src(e.s1, bus_valid[r], bus[r], c1);
            e.s2 = snoop_src(e.s2, bus_valid[r], bus[r], c2);
            ch = ch | c1 | c2;
          end
          if (ch) begin
            if (!e.reissue || e.issued) n_mark++;
            e.reissue = 1'b1;
            if (e.issued) begin
              e.issued    = 1'b0;
              e.completed = 1'b0;
              e.ver       = e.ver + ver_t'(1);
              if (!e.predicted) e.avail = 1'b0;
            end
          end
        end
        ent_q[i] <= e;
      end
      // commit
      for (int c = 0; c < NCOMMIT; c++)
        if (cm_valid[c]) ent_q[ix(cm_tag[c])].valid <= 1'b0;
      head_q <= head_q + tag_t'($countones(cm_valid));
      // allocation (after commit: a committed slot can be refilled next cycle)
      for (int k = 0; k < NALLOC; k++)
        if (alloc_valid[k]) begin
          ent_t n;
          n           = '0;
          n.valid     = 1'b1;
          n.gen       = alloc_tag[k][IW];
          n.pc        = alloc_instr[k].pc;
          n.op        = alloc_instr[k].op;
          n.rd        = alloc_instr[k].rd;
          n.s1        = alloc_s1[k];
          n.s2        = alloc_s2[k];
          n.predicted = alloc_pred[k];
          n.avail     = alloc_pred[k];
          n.result    = alloc_pred_value[k];
          n.in_win    = 1'b1;
          ent_q[ix(alloc_tag[k])] <= n;
        end
      tail_q <= tail_q + tag_t'($countones(alloc_valid));
      // reissue select pipeline
      pipe_q[0] <= sel;
      for (int p = 1; p < WAKEUP_LAT-1; p++) pipe_q[p] <= pipe_q[p-1];
      ev_mispredict <= n_mis;
      ev_marked     <= n_mark;
      ev_reissue    <= n_granted;
    end
  end

  a_pow2: assert property (@(posedge clk) (ENTRIES == (1 << IW)));
  a_lat:  assert property (@(posedge clk) (WAKEUP_LAT >= 2));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(alloc_valid) <= int'(free_count));

endmodule
