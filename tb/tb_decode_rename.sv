// tb_decode_rename: directed test of operand resolution and stalling.
//
// The test stands in for the register file (register r holds 100*r), the
// instruction buffer (a small table of held results) and the predictor.
// Checked: the accepted count is the smallest of the valid instructions and
// the free window and buffer entries, with the matching stall flag; sources
// read register 0, the register file, an older instruction of the same group
// (waiting on its tag, or ready with its predicted value), a result broadcast
// in the same cycle (which has priority over the buffer's copy), or a result
// held in the buffer; a commit removes the register's link so that the next
// reader goes to the register file; immediates replace the second source.
`timescale 1ns/1ps
module tb_decode_rename;
  import dw_pkg::*;
  localparam int DW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [DW-1:0]   in_valid;
  instr_t  [DW-1:0]   in_instr;
  logic    [3:0]      n_accept;
  logic    [7:0]      win_free, buf_free;
  tag_t    [DW-1:0]   new_tag;
  reg_t    [2*DW-1:0] rf_addr;
  word_t   [2*DW-1:0] rf_data;
  tag_t    [2*DW-1:0] bf_tag;
  logic    [2*DW-1:0] bf_avail;
  word_t   [2*DW-1:0] bf_value;
  word_t   [DW-1:0]   vp_pc;
  logic    [DW-1:0]   vp_speculate;
  word_t   [DW-1:0]   vp_value;
  logic    [7:0]      bus_valid;
  result_t [7:0]      bus;
  logic    [DW-1:0]   cm_valid;
  tag_t    [DW-1:0]   cm_tag;
  reg_t    [DW-1:0]   cm_rd;
  logic    [DW-1:0]   out_valid;
  uop_t    [DW-1:0]   out_uop;
  instr_t  [DW-1:0]   out_instr;
  logic    [DW-1:0]   out_pred;
  word_t   [DW-1:0]   out_pred_value;
  logic               stall_win, stall_buf;

  decode_rename dut (.*);

  // buffer stand-in
  logic  held_avail [256];
  word_t held_value [256];
  always_comb for (int p = 0; p < 2*DW; p++) begin
    rf_data[p]  = 100 * rf_addr[p];
    bf_avail[p] = held_avail[bf_tag[p]];
    bf_value[p] = held_value[bf_tag[p]];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic instr_t ins(int rd, int rs1, int rs2, bit imm = 0, int iv = 0);
    instr_t i;
    i = '0; i.op = OP_ADD; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1); i.rs2 = reg_t'(rs2);
    i.use_imm = imm; i.imm = iv; i.pc = 32'(4 * rd);
    return i;
  endfunction

  task automatic clear();
    in_valid = '0; in_instr = '0; vp_speculate = '0; vp_value = '0;
    bus_valid = '0; bus = '0; cm_valid = '0; cm_tag = '0; cm_rd = '0;
    win_free = 64; buf_free = 128;
    for (int k = 0; k < DW; k++) new_tag[k] = tag_t'(8'd40 + k);
  endtask

  initial begin
    for (int t = 0; t < 256; t++) begin held_avail[t] = 0; held_value[t] = 0; end
    clear();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // group 1: tags 40..
    @(negedge clk);
    in_valid = 8'b1111;
    in_instr[0] = ins(1, 2, 3);        // r1 = r2 + r3
    in_instr[1] = ins(4, 1, 0);        // r4 = r1 + r0     (group producer, waits)
    in_instr[2] = ins(5, 1, 0, 1, 9);  // r5 = r1 + 9      (predicted)
    in_instr[3] = ins(6, 5, 1);        // r6 = r5 + r1
    vp_speculate[2] = 1; vp_value[2] = 77;
    buf_free = 3;
    #1;
    check(n_accept == 3 && stall_buf && !stall_win, "buffer limits the group to 3");
    check(out_valid == 8'b0111, "accepted prefix");
    check(out_uop[0].s1 == '{ready: 1, live: 0, tag: 0, value: 200} && out_uop[0].s2.value == 300, "register file operands");
    check(out_uop[1].s1.live && !out_uop[1].s1.ready && out_uop[1].s1.tag == 40, "waits on group producer");
    check(out_uop[1].s2.ready && !out_uop[1].s2.live && out_uop[1].s2.value == 0, "register 0");
    check(out_uop[2].s2.ready && out_uop[2].s2.value == 9, "immediate");
    check(out_pred == 8'b0100 && out_pred_value[2] == 77, "prediction passed on");
    check(out_uop[3].s1.ready && out_uop[3].s1.live && out_uop[3].s1.tag == 42 &&
          out_uop[3].s1.value == 77, "predicted group value forwarded");
    check(out_uop[0].tag == 40 && out_uop[2].tag == 42, "tags");
    win_free = 2;
    #1 check(n_accept == 2 && stall_win, "window limits the group to 2");
    win_free = 64;
    @(negedge clk);
    clear();
    for (int k = 0; k < DW; k++) new_tag[k] = tag_t'(8'd43 + k);
    // group 2: r1 -> tag 40 (broadcast now), r4 -> tag 41 (held in buffer)
    held_avail[41] = 1; held_value[41] = 66;
    held_avail[40] = 1; held_value[40] = 1;  // stale copy: the bus must win
    bus_valid[3] = 1; bus[3].tag = 40; bus[3].value = 555;
    in_valid = 8'b11;
    in_instr[0] = ins(7, 1, 4);
    in_instr[1] = ins(8, 5, 9);
    cm_valid[0] = 1; cm_tag[0] = 41; cm_rd[0] = 4;   // r4's producer commits
    #1;
    check(n_accept == 2 && !stall_win && !stall_buf, "whole group accepted");
    check(out_uop[0].s1 == '{ready: 1, live: 1, tag: 40, value: 555}, "value from this cycle's broadcast");
    check(out_uop[0].s2 == '{ready: 1, live: 1, tag: 41, value: 66}, "value held in the buffer");
    check(out_uop[1].s1.live && out_uop[1].s1.tag == 42 && !out_uop[1].s1.ready, "r5 waits on tag 42");
    check(out_uop[1].s2 == '{ready: 1, live: 0, tag: 0, value: 900}, "r9 from the register file");
    @(negedge clk);
    clear();
    // group 3: r4's link is gone, r1 still linked
    in_valid = 8'b1;
    in_instr[0] = ins(9, 4, 1);
    #1;
    check(out_uop[0].s1 == '{ready: 1, live: 0, tag: 0, value: 400}, "committed register read from the register file");
    check(out_uop[0].s2.live && out_uop[0].s2.tag == 40, "r1 still linked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
