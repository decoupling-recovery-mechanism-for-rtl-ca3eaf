// decode_rename: decode stage that enters instructions into the decoupled window.
//
// Up to DW instructions per cycle are taken in program order. Each one goes to
// both the scheduling window and the instruction buffer at once; when either
// has too few free entries the group is cut short and the rest waits (issue
// into the decoupled window stalls). The number taken is returned on n_accept.
//
// Each source register is linked to its newest in-flight producer through a
// rename table that maps a register to the tag of the buffer entry that will
// write it. The operand value is taken, in this order of priority, from an
// older instruction of the same group (waiting on its tag, or its predicted
// value), from a result broadcast in this cycle, from a result already held in
// the instruction buffer, or from the register file when no producer is in
// flight. An instruction whose stride-predictor entry is confident
// (lk_speculate) is value-predicted: its predicted result is handed to its
// consumers at once and kept in the buffer until its real result checks it.
// Register 0 and immediates have no producer.
//
// The renaming scheme, the operand sources and the stall rule at group level
// are this implementation's choices; the published processor diagram shows only that
// decode reads the register file and feeds both structures. Combinational
// except for the rename table, which is updated at the clock edge (entries of
// committed producers are cleared, new producers written over them).
module decode_rename
  import dw_pkg::*;
#(
  parameter int unsigned DW      = 8,
  parameter int unsigned NCOMMIT = 8,
  parameter int unsigned NRES    = 8,
  parameter int unsigned CW      = 8   // width of the free-entry counts
)(
  input  logic                    clk,
  input  logic                    rst_n,
  // instruction group from the front end
  input  logic    [DW-1:0]        in_valid,
  input  instr_t  [DW-1:0]        in_instr,
  output logic    [$clog2(DW+1)-1:0] n_accept,
  // capacity of both structures
  input  logic    [CW-1:0]        win_free,
  input  logic    [CW-1:0]        buf_free,
  input  tag_t    [DW-1:0]        new_tag,     // tags the buffer gives this group
  // register file reads
  output reg_t    [2*DW-1:0]      rf_addr,
  input  word_t   [2*DW-1:0]      rf_data,
  // buffer result reads
  output tag_t    [2*DW-1:0]      bf_tag,
  input  logic    [2*DW-1:0]      bf_avail,
  input  word_t   [2*DW-1:0]      bf_value,
  // value predictor lookup
  output word_t   [DW-1:0]        vp_pc,
  input  logic    [DW-1:0]        vp_speculate,
  input  word_t   [DW-1:0]        vp_value,
  // result buses of this cycle
  input  logic    [NRES-1:0]      bus_valid,
  input  result_t [NRES-1:0]      bus,
  // commits of this cycle
  input  logic    [NCOMMIT-1:0]   cm_valid,
  input  tag_t    [NCOMMIT-1:0]   cm_tag,
  input  reg_t    [NCOMMIT-1:0]   cm_rd,
  // outputs to the window and the buffer
  output logic    [DW-1:0]        out_valid,
  output uop_t    [DW-1:0]        out_uop,
  output instr_t  [DW-1:0]        out_instr,
  output logic    [DW-1:0]        out_pred,
  output word_t   [DW-1:0]        out_pred_value,
  // why a group was cut short this cycle
  output logic                    stall_win,
  output logic                    stall_buf
);

  logic [NREGS-1:0] rt_valid_q;
  tag_t             rt_tag_q [NREGS];

  // Number of leading valid instructions and how many fit.
  always_comb begin
    int unsigned lead, n;
    logic run;
    lead = 0;
    run  = 1'b1;
    for (int i = 0; i < DW; i++) begin
      run = run && in_valid[i];
      if (run) lead++;
    end
    n = lead;
    if (int'(win_free) < n) n = int'(win_free);
    if (int'(buf_free) < n) n = int'(buf_free);
    n_accept  = ($clog2(DW+1))'(n);
    stall_win = int'(win_free) < lead;
    stall_buf = int'(buf_free) < lead;
    for (int i = 0; i < DW; i++) out_valid[i] = (i < n);
  end

  always_comb begin
    for (int i = 0; i < DW; i++) begin
      vp_pc[i]          = in_instr[i].pc;
      out_pred[i]       = vp_speculate[i] && (in_instr[i].rd != '0);
      out_pred_value[i] = vp_value[i];
      rf_addr[2*i]      = in_instr[i].rs1;
      rf_addr[2*i+1]    = in_instr[i].rs2;
      bf_tag[2*i]       = rt_tag_q[in_instr[i].rs1];
      bf_tag[2*i+1]     = rt_tag_q[in_instr[i].rs2];
    end
  end

  // Resolve one source operand of instruction i (port p of the read ports).
  function automatic src_t resolve(int i, int p, reg_t r);
    src_t s;
    logic found;
    s = '0;
    found = 1'b0;
    if (r == '0) begin
      s.ready = 1'b1;
      return s;
    end
    for (int j = 0; j < DW; j++)
      if (j < i && in_instr[j].rd == r) begin
        s.ready = out_pred[j];
        s.live  = 1'b1;
        s.tag   = new_tag[j];
        s.value = out_pred[j] ? vp_value[j] : '0;
        found   = 1'b1;
      end
    if (!found && rt_valid_q[r]) begin
      s.live  = 1'b1;
      s.tag   = rt_tag_q[r];
      s.ready = bf_avail[p];
      s.value = bf_value[p];
      for (int b = 0; b < NRES; b++)
        if (bus_valid[b] && bus[b].tag == s.tag) begin
          s.ready = 1'b1;
          s.value = bus[b].value;
        end
      found = 1'b1;
    end
    if (!found) begin
      s.ready = 1'b1;
      s.value = rf_data[p];
    end
    return s;
  endfunction

  always_comb begin
    for (int i = 0; i < DW; i++) begin
      out_instr[i]  = in_instr[i];
      out_uop[i].tag = new_tag[i];
      out_uop[i].op  = in_instr[i].op;
      out_uop[i].s1  = resolve(i, 2*i, in_instr[i].rs1);
      if (in_instr[i].use_imm) begin
        out_uop[i].s2       = '0;
        out_uop[i].s2.ready = 1'b1;
        out_uop[i].s2.value = in_instr[i].imm;
      end else begin
        out_uop[i].s2 = resolve(i, 2*i+1, in_instr[i].rs2);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_valid_q <= '0;
      for (int r = 0; r < NREGS; r++) rt_tag_q[r] <= '0;
    end else begin
      for (int c = 0; c < NCOMMIT; c++)
        if (cm_valid[c] && rt_valid_q[cm_rd[c]] && rt_tag_q[cm_rd[c]] == cm_tag[c])
          rt_valid_q[cm_rd[c]] <= 1'b0;
      for (int i = 0; i < DW; i++)
        if (out_valid[i] && in_instr[i].rd != '0) begin
          rt_valid_q[in_instr[i].rd] <= 1'b1;
          rt_tag_q[in_instr[i].rd]   <= new_tag[i];
        end
    end
  end

endmodule
