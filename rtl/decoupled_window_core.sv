// decoupled_window_core: out-of-order execution core with value prediction in
// which recovery from a value misprediction is decoupled from scheduling.
//
// A decoded instruction enters two structures at once: a small scheduling
// window (64 entries) that wakes up and selects instructions and frees an entry
// as soon as its instruction is dispatched, and a large instruction buffer (128
// entries) that keeps every instruction until it commits. A stride value
// predictor lets consumers of a confidently predicted result start before the
// result exists. When the real result differs, the dependents that already
// left the window are found in the buffer and reissued from there; dependents
// still waiting in the window simply pick up the corrected value and are
// dispatched by the window, while the buffer's slower, two-cycle pipelined
// wakeup/select cancels its own copy of them. Eight functional units, each able
// to execute every operation, return results on eight result buses. Results
// are committed in order from the buffer to the register file, and committed
// values train the predictor.
//
// Structure, sizes and latencies follow the evaluated machine; the front end
// (instruction cache, branch prediction) and memory operations with their data
// caches are outside this core: it takes already-fetched instructions.
//
// Interface: in_valid/in_instr offer up to DW instructions in program order
// (valid slots first); n_accept says how many were taken this cycle, the rest
// must be offered again. cm_* report committed instructions in program order.
// The ev_*/stall_*/used outputs expose per-cycle events and occupancy.
module decoupled_window_core
  import dw_pkg::*;
#(
  parameter int unsigned DW          = 8,    // decode and commit width
  parameter int unsigned NFU         = 8,    // functional units = issue width
  parameter int unsigned WIN_ENTRIES = 64,
  parameter int unsigned BUF_ENTRIES = 128,
  parameter int unsigned WAKEUP_LAT  = 2,    // buffer wakeup/select latency
  parameter int unsigned VP_ENTRIES  = 4096
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic    [DW-1:0]        in_valid,
  input  instr_t  [DW-1:0]        in_instr,
  output logic    [$clog2(DW+1)-1:0] n_accept,
  output logic    [DW-1:0]        cm_valid,
  output word_t   [DW-1:0]        cm_pc,
  output reg_t    [DW-1:0]        cm_rd,
  output word_t   [DW-1:0]        cm_value,
  output logic    [7:0]           ev_mispredict,
  output logic    [7:0]           ev_marked,
  output logic    [7:0]           ev_reissue,
  output logic    [7:0]           ev_cancel,
  output logic    [7:0]           ev_predicted,
  output logic                    stall_win,
  output logic                    stall_buf,
  output logic    [7:0]           win_used,
  output logic    [7:0]           buf_used
);

  localparam int unsigned WCW = $clog2(WIN_ENTRIES+1);
  localparam int unsigned BCW = $clog2(BUF_ENTRIES+1);

  // decode outputs
  logic    [DW-1:0]   d_valid;
  uop_t    [DW-1:0]   d_uop;
  instr_t  [DW-1:0]   d_instr;
  logic    [DW-1:0]   d_pred;
  word_t   [DW-1:0]   d_pred_value;
  reg_t    [2*DW-1:0] rf_addr;
  word_t   [2*DW-1:0] rf_data;
  tag_t    [2*DW-1:0] bf_tag;
  logic    [2*DW-1:0] bf_avail;
  word_t   [2*DW-1:0] bf_value;
  word_t   [DW-1:0]   vp_pc;
  logic    [DW-1:0]   vp_hit, vp_spec;
  word_t   [DW-1:0]   vp_value;
  tag_t    [DW-1:0]   new_tag;

  // window / buffer / units
  logic    [WCW-1:0]  win_free;
  logic    [BCW-1:0]  buf_free, buf_cnt;
  logic    [$clog2(NFU+1)-1:0] win_limit;
  logic    [NFU-1:0]  wi_valid;
  uop_t    [NFU-1:0]  wi_uop;
  ver_t    [NFU-1:0]  wi_ver;
  logic    [NFU-1:0]  rs_valid, rs_grant;
  fu_req_t [NFU-1:0]  rs_req;
  logic    [NFU-1:0]  fu_ready, fu_valid, fu_res_valid, bus_valid;
  fu_req_t [NFU-1:0]  fu_req;
  result_t [NFU-1:0]  fu_res, bus;
  tag_t    [DW-1:0]   cm_tag;

  decode_rename #(.DW(DW), .NCOMMIT(DW), .NRES(NFU), .CW(8)) u_decode (
    .clk, .rst_n,
    .in_valid, .in_instr, .n_accept,
    .win_free(8'(win_free)), .buf_free(8'(buf_free)), .new_tag,
    .rf_addr, .rf_data, .bf_tag, .bf_avail, .bf_value,
    .vp_pc, .vp_speculate(vp_spec), .vp_value,
    .bus_valid, .bus,
    .cm_valid, .cm_tag, .cm_rd,
    .out_valid(d_valid), .out_uop(d_uop), .out_instr(d_instr),
    .out_pred(d_pred), .out_pred_value(d_pred_value),
    .stall_win, .stall_buf
  );

  register_file #(.NRD(2*DW), .NWR(DW)) u_rf (
    .clk, .rst_n,
    .rd_addr(rf_addr), .rd_data(rf_data),
    .wr_en(cm_valid), .wr_addr(cm_rd), .wr_data(cm_value)
  );

  stride_value_predictor #(.ENTRIES(VP_ENTRIES), .NLK(DW), .NUP(DW)) u_vp (
    .clk, .rst_n,
    .lk_pc(vp_pc), .lk_hit(vp_hit), .lk_speculate(vp_spec), .lk_value(vp_value),
    .up_valid(cm_valid), .up_pc(cm_pc), .up_value(cm_value)
  );

  scheduling_window #(.ENTRIES(WIN_ENTRIES), .NALLOC(DW), .NISSUE(NFU), .NRES(NFU)) u_win (
    .clk, .rst_n,
    .alloc_valid(d_valid), .alloc_uop(d_uop), .free_count(win_free),
    .res_valid(bus_valid), .res(bus),
    .issue_limit(win_limit), .iss_valid(wi_valid), .iss_uop(wi_uop)
  );

  tag_t [NFU-1:0] wi_tag;
  always_comb for (int k = 0; k < NFU; k++) wi_tag[k] = wi_uop[k].tag;

  instruction_buffer #(.ENTRIES(BUF_ENTRIES), .NALLOC(DW), .NCOMMIT(DW), .NRES(NFU),
                       .NWDISP(NFU), .NREISSUE(NFU), .NRD(2*DW),
                       .WAKEUP_LAT(WAKEUP_LAT)) u_buf (
    .clk, .rst_n,
    .alloc_valid(d_valid), .alloc_instr(d_instr),
    .alloc_s1(s1_of(d_uop)), .alloc_s2(s2_of(d_uop)),
    .alloc_pred(d_pred), .alloc_pred_value(d_pred_value),
    .alloc_tag(new_tag), .free_count(buf_free), .used_count(buf_cnt),
    .rd_tag(bf_tag), .rd_avail(bf_avail), .rd_value(bf_value),
    .wdisp_valid(wi_valid), .wdisp_tag(wi_tag), .wdisp_ver(wi_ver),
    .fu_valid(fu_res_valid), .fu_res, .bus_valid, .bus,
    .rs_valid, .rs_req, .rs_grant,
    .cm_valid, .cm_tag, .cm_pc, .cm_rd, .cm_value,
    .ev_mispredict, .ev_marked, .ev_reissue, .ev_cancel
  );

  function automatic src_t [DW-1:0] s1_of(uop_t [DW-1:0] u);
    for (int k = 0; k < DW; k++) s1_of[k] = u[k].s1;
  endfunction
  function automatic src_t [DW-1:0] s2_of(uop_t [DW-1:0] u);
    for (int k = 0; k < DW; k++) s2_of[k] = u[k].s2;
  endfunction

  dispatch_arbiter #(.NFU(NFU), .NWIN(NFU), .NRE(NFU)) u_arb (
    .fu_ready, .win_limit,
    .win_valid(wi_valid), .win_uop(wi_uop), .win_ver(wi_ver),
    .rs_valid, .rs_req, .rs_grant,
    .fu_valid, .fu_req
  );

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    functional_unit u_fu (
      .clk, .rst_n,
      .req_valid(fu_valid[f]), .req(fu_req[f]), .req_ready(fu_ready[f]),
      .res_valid(fu_res_valid[f]), .res(fu_res[f])
    );
  end

  always_comb begin
    int unsigned np;
    np = 0;
    for (int k = 0; k < DW; k++) if (d_valid[k] && d_pred[k]) np++;
    ev_predicted = 8'(np);
  end

  assign win_used = 8'(WIN_ENTRIES - win_free);
  assign buf_used = 8'(buf_cnt);

endmodule
