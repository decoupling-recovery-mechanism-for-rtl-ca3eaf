// tb_instruction_buffer: directed test of allocation, misprediction detection,
// pipelined reissue, cancellation in favour of the window, stale-result
// filtering and in-order commit. The test plays the scheduling window and the
// functional units itself.
//
// Scenario: A is value-predicted (predicted 10). B uses A's predicted value,
// C uses B, and D uses A but stays in the window. A, B and C
// are dispatched and B, C complete with values computed from the prediction.
// A then completes with 20: the buffer must count one misprediction, mark B
// (and D), select B exactly two cycles after the corrected broadcast (the
// two-cycle wakeup/select), present it with the corrected operand and a new
// version, cancel its own copy of D because D is still in the window, drop
// B's stale result, and, after B's new result, mark and reissue C. Commit must
// then happen in program order with the corrected values. Finally the buffer
// is filled to its 128 entries to check the free count and tag wrap-around.
`timescale 1ns/1ps
module tb_instruction_buffer;
  import dw_pkg::*;
  localparam int E = 128, NA = 8, NC = 8, NR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [NA-1:0] alloc_valid;
  instr_t  [NA-1:0] alloc_instr;
  src_t    [NA-1:0] alloc_s1, alloc_s2;
  logic    [NA-1:0] alloc_pred;
  word_t   [NA-1:0] alloc_pred_value;
  tag_t    [NA-1:0] alloc_tag;
  logic    [7:0]    free_count, used_count;
  tag_t    [15:0]   rd_tag;
  logic    [15:0]   rd_avail;
  word_t   [15:0]   rd_value;
  logic    [7:0]    wdisp_valid;
  tag_t    [7:0]    wdisp_tag;
  ver_t    [7:0]    wdisp_ver;
  logic    [NR-1:0] fu_valid, bus_valid;
  result_t [NR-1:0] fu_res, bus;
  logic    [7:0]    rs_valid, rs_grant;
  fu_req_t [7:0]    rs_req;
  logic    [NC-1:0] cm_valid;
  tag_t    [NC-1:0] cm_tag;
  word_t   [NC-1:0] cm_pc, cm_value;
  reg_t    [NC-1:0] cm_rd;
  logic    [7:0]    ev_mispredict, ev_marked, ev_reissue, ev_cancel;

  instruction_buffer dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_mis = 0, n_cancel = 0, n_rs = 0;
  word_t committed [$];
  reg_t  committed_rd [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_mis += int'(ev_mispredict);
    n_cancel += int'(ev_cancel);
    n_rs += int'(ev_reissue);
    for (int c = 0; c < NC; c++) if (cm_valid[c]) begin
      committed.push_back(cm_value[c]);
      committed_rd.push_back(cm_rd[c]);
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cyc, msg); end
  endtask

  function automatic src_t reg_src(word_t v);
    src_t s; s = '0; s.ready = 1; s.value = v; return s;
  endfunction
  function automatic src_t dep_src(tag_t t, bit rdy, word_t v);
    src_t s; s = '0; s.live = 1; s.tag = t; s.ready = rdy; s.value = v; return s;
  endfunction

  task automatic idle();
    alloc_valid = '0; wdisp_valid = '0; fu_valid = '0; rs_grant = '0;
  endtask

  task automatic result(int port, tag_t t, ver_t v, word_t val);
    fu_valid[port] = 1; fu_res[port].tag = t; fu_res[port].ver = v; fu_res[port].value = val;
  endtask

  tag_t tA, tB, tC, tD;
  int t_bcast, seen_b, seen_d;

  initial begin
    idle();
    alloc_instr = '0; alloc_s1 = '0; alloc_s2 = '0; alloc_pred = '0; alloc_pred_value = '0;
    rd_tag = '0; wdisp_tag = '0; fu_res = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // allocate A, B, C, D
    @(negedge clk);
    check(free_count == 8'(E), "free count after reset");
    tA = alloc_tag[0]; tB = alloc_tag[1]; tC = alloc_tag[2]; tD = alloc_tag[3];
    alloc_valid = 8'b1111;
    alloc_instr[0] = '{pc: 32'h10, op: OP_ADD, rd: 1, rs1: 0, rs2: 0, use_imm: 1, imm: 20};
    alloc_s1[0] = reg_src(0); alloc_s2[0] = reg_src(20);
    alloc_pred[0] = 1; alloc_pred_value[0] = 10;
    alloc_instr[1] = '{pc: 32'h14, op: OP_ADD, rd: 2, rs1: 1, rs2: 0, use_imm: 1, imm: 1};
    alloc_s1[1] = dep_src(tA, 1, 10); alloc_s2[1] = reg_src(1);
    alloc_instr[2] = '{pc: 32'h18, op: OP_ADD, rd: 3, rs1: 2, rs2: 0, use_imm: 1, imm: 100};
    alloc_s1[2] = dep_src(tB, 0, 0); alloc_s2[2] = reg_src(100);
    alloc_instr[3] = '{pc: 32'h1c, op: OP_ADD, rd: 4, rs1: 1, rs2: 1, use_imm: 0, imm: 0};
    alloc_s1[3] = dep_src(tA, 1, 10); alloc_s2[3] = dep_src(tA, 1, 10);
    @(negedge clk);
    idle();
    check(used_count == 8'd4, "four entries used");
    rd_tag[0] = tA; rd_tag[1] = tB;
    #1 check(rd_avail[0] && rd_value[0] == 10 && !rd_avail[1], "predicted value readable at decode");
    // window dispatches A and B
    wdisp_valid = 8'b11; wdisp_tag[0] = tA; wdisp_tag[1] = tB;
    #1 check(wdisp_ver[0] == 0 && wdisp_ver[1] == 0, "fresh version");
    @(negedge clk); idle();
    // B completes with 11 (from the prediction), C is woken
    result(0, tB, 0, 11);
    #1 check(bus_valid[0] && bus[0].value == 11, "B result broadcast");
    @(negedge clk); idle();
    wdisp_valid = 8'b1; wdisp_tag[0] = tC;
    @(negedge clk); idle();
    result(1, tC, 0, 111);
    @(negedge clk); idle();
    check(cm_valid == '0, "nothing commits before A completes");
    // A completes with 20: misprediction
    result(2, tA, 0, 20);
    t_bcast = cyc;
    @(negedge clk); idle();
    check(ev_mispredict == 1, "misprediction counted");
    check(cm_valid == 8'b1 && cm_value[0] == 20, "only A commits; B must not commit with a stale value");
    seen_b = -1; seen_d = 0;
    for (int w = 0; w < 6; w++) begin
      for (int k = 0; k < 8; k++) if (rs_valid[k]) begin
        if (rs_req[k].tag == tB) begin
          seen_b = cyc - t_bcast;
          check(rs_req[k].a == 20 && rs_req[k].ver == 1, "B reissued with corrected value and new version");
          rs_grant[k] = 1;
        end
        if (rs_req[k].tag == tD) seen_d++;
      end
      @(negedge clk); rs_grant = '0;
    end
    check(seen_b == 2, $sformatf("B reissued %0d cycles after the correction, expected 2", seen_b));
    check(seen_d == 0, "D dispatched by the buffer while still in the window");
    check(n_cancel > 0, "buffer copy of D not cancelled");
    // stale result of B (version 0) must be dropped
    result(0, tB, 0, 11);
    #1 check(!bus_valid[0], "stale result broadcast");
    @(negedge clk); idle();
    // new result of B
    result(0, tB, 1, 21);
    #1 check(bus_valid[0], "new result of B broadcast");
    @(negedge clk); idle();
    // C must now be reissued with 21
    seen_b = 0;
    for (int w = 0; w < 6; w++) begin
      for (int k = 0; k < 8; k++) if (rs_valid[k] && rs_req[k].tag == tC) begin
        check(rs_req[k].a == 21, "C reissued with B's new value");
        rs_grant[k] = 1; seen_b++;
      end
      @(negedge clk); rs_grant = '0;
    end
    check(seen_b == 1, "C reissued once");
    result(0, tC, 1, 121);
    // D finally leaves the window with the corrected values
    wdisp_valid = 8'b1; wdisp_tag[0] = tD;
    @(negedge clk); idle();
    result(3, tD, 0, 40);
    @(negedge clk); idle();
    repeat (3) @(negedge clk);
    check(committed.size() == 4, $sformatf("%0d commits", committed.size()));
    if (committed.size() == 4)
      check(committed[0] == 20 && committed[1] == 21 && committed[2] == 121 && committed[3] == 40 &&
            committed_rd[0] == 1 && committed_rd[3] == 4, "commit values and order");
    check(n_mis == 1, $sformatf("exactly one misprediction, saw %0d", n_mis));
    check(n_rs == 2, $sformatf("two reissues dispatched, saw %0d", n_rs));
    check(free_count == 8'(E), "all entries free after commit");

    // fill the buffer completely, then drain it; tags must keep increasing
    for (int g = 0; g < E / NA; g++) begin
      @(negedge clk); idle();
      alloc_valid = '1;
      for (int k = 0; k < NA; k++) begin
        alloc_instr[k] = '{pc: 32'(4 * k), op: OP_OR, rd: reg_t'(k), rs1: 0, rs2: 0, use_imm: 1, imm: 0};
        alloc_s1[k] = reg_src(0); alloc_s2[k] = reg_src(0); alloc_pred[k] = 0;
      end
    end
    @(negedge clk); idle();
    check(free_count == 0 && used_count == 8'(E), "buffer full");
    for (int g = 0; g < E / NA; g++) begin
      tag_t base;
      base = tA + tag_t'(4 + NA * g);
      wdisp_valid = '1;
      for (int k = 0; k < 8; k++) wdisp_tag[k] = base + tag_t'(k);
      @(negedge clk); idle();
      for (int k = 0; k < 8; k++) result(k, base + tag_t'(k), 0, word_t'(g * 8 + k));
      @(negedge clk); idle();
    end
    repeat (20) @(negedge clk);
    check(free_count == 8'(E), "buffer drained");
    check(committed.size() == 4 + E, "all filler instructions committed");
    if (committed.size() == 4 + E)
      for (int k = 0; k < E; k++) check(committed[4 + k] == word_t'(k), "filler commit order");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
