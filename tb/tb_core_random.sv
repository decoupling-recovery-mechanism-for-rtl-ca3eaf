// tb_core_random: randomised end-to-end test of the decoupled-window core at
// its default size.
//
// Several random loop bodies (random operations, registers and immediates,
// divides included) are each executed many times, so that the stride
// predictor learns some values and mispredicts others in patterns no directed
// test would choose. Every commit is compared with an in-order reference model
// and the commit count must match; predictions, mispredictions and reissues
// must all occur. Average and maximum occupancy of the buffer and the window
// are printed.
`timescale 1ns/1ps
module tb_core_random;
  import dw_pkg::*;

  localparam int DW   = 8;
  localparam int LOOPS = 6;
  localparam int ITER = 60;
  localparam int BODY = 24;
  localparam int SETUP = 4;
  localparam int N    = SETUP + LOOPS * ITER * BODY;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [DW-1:0] in_valid;
  instr_t [DW-1:0] in_instr;
  logic   [$clog2(DW+1)-1:0] n_accept;
  logic   [DW-1:0] cm_valid;
  word_t  [DW-1:0] cm_pc;
  reg_t   [DW-1:0] cm_rd;
  word_t  [DW-1:0] cm_value;
  logic   [7:0] ev_mispredict, ev_marked, ev_reissue, ev_cancel, ev_predicted;
  logic   stall_win, stall_buf;
  logic   [7:0] win_used, buf_used;

  decoupled_window_core dut (.*);

  instr_t prog   [N];
  word_t  expv   [N];
  int     checks = 0, failures = 0;
  int     idx = 0, ncommit = 0, cycles = 0;
  int     n_pred = 0, n_mis = 0, n_mark = 0, n_rs = 0, n_cancel = 0;
  int     n_swin = 0, n_sbuf = 0, max_win = 0, max_buf = 0;
  longint sum_win = 0, sum_buf = 0;

  function automatic instr_t mk(word_t pc, op_e op, int rd, int rs1, int rs2,
                                bit imm, word_t iv);
    instr_t i;
    i.pc = pc; i.op = op; i.rd = reg_t'(rd); i.rs1 = reg_t'(rs1);
    i.rs2 = reg_t'(rs2); i.use_imm = imm; i.imm = iv;
    return i;
  endfunction

  // Build the program and run the reference model.
  initial begin
    word_t r [NREGS];
    int n;
    n = 0;
    prog[n++] = mk(32'h100, OP_ADD, 3, 0, 0, 1, 32'd3);
    prog[n++] = mk(32'h104, OP_ADD, 12, 0, 0, 1, 32'd1);
    prog[n++] = mk(32'h108, OP_ADD, 5, 0, 0, 1, 32'h1234);
    prog[n++] = mk(32'h10c, OP_ADD, 1, 0, 0, 1, 32'd0);
    for (int l = 0; l < LOOPS; l++) begin
      instr_t body [BODY];
      for (int j = 0; j < BODY; j++) begin
        op_e op;
        int  pick;
        pick = $urandom_range(0, 99);
        op = (pick < 4) ? OP_DIV : (pick < 12) ? OP_MUL : op_e'($urandom_range(0, 7));
        body[j] = mk(32'h2000 + 32'h400 * l + 4 * j, op, $urandom_range(1, 15),
                     $urandom_range(0, 15), $urandom_range(0, 15),
                     ($urandom_range(0, 2) == 0), $urandom_range(0, 9));
      end
      // a few always-incrementing registers make strided, predictable values
      body[0] = mk(32'h2000 + 32'h400 * l, OP_ADD, 1, 1, 0, 1, 32'd1);
      body[1] = mk(32'h2004 + 32'h400 * l, OP_ADD, 2, 2, 0, 1, 32'd3);
      for (int it = 0; it < ITER; it++)
        for (int j = 0; j < BODY; j++) prog[n++] = body[j];
    end
    for (int k = 0; k < NREGS; k++) r[k] = '0;
    for (int k = 0; k < N; k++) begin
      word_t a, bb;
      a  = r[prog[k].rs1];
      bb = prog[k].use_imm ? prog[k].imm : r[prog[k].rs2];
      expv[k] = alu_compute(prog[k].op, a, bb);
      if (prog[k].rd != 0) r[prog[k].rd] = expv[k];
    end
  end

  // Front end: offer the next DW instructions; advance by what was accepted.
  always_comb begin
    for (int k = 0; k < DW; k++) begin
      in_valid[k] = (idx + k < N);
      in_instr[k] = (idx + k < N) ? prog[idx + k] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    idx <= idx + int'(n_accept);
    for (int k = 0; k < DW; k++) if (cm_valid[k]) begin
      checks++;
      if (ncommit + k >= N || cm_pc[k] != prog[ncommit + k].pc ||
          cm_rd[k] != prog[ncommit + k].rd || cm_value[k] != expv[ncommit + k]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH commit %0d: pc=%h rd=%0d value=%h expected pc=%h rd=%0d value=%h",
                   ncommit + k, cm_pc[k], cm_rd[k], cm_value[k],
                   prog[ncommit + k].pc, prog[ncommit + k].rd, expv[ncommit + k]);
      end
    end
    ncommit <= ncommit + $countones(cm_valid);
    n_pred   += int'(ev_predicted);
    n_mis    += int'(ev_mispredict);
    n_mark   += int'(ev_marked);
    n_rs     += int'(ev_reissue);
    n_cancel += int'(ev_cancel);
    if (stall_win) n_swin++;
    if (stall_buf) n_sbuf++;
    sum_win += longint'(win_used);
    sum_buf += longint'(buf_used);
    if (int'(win_used) > max_win) max_win = int'(win_used);
    if (int'(buf_used) > max_buf) max_buf = int'(buf_used);
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (ncommit >= N);
    repeat (20) @(posedge clk);
    checks++;
    if (ncommit != N) begin failures++; $display("FAIL: %0d commits, expected %0d", ncommit, N); end
    checks++;
    if (max_win > 64 || max_buf > 128) begin
      failures++; $display("FAIL: occupancy window %0d buffer %0d", max_win, max_buf);
    end
    need("value prediction", n_pred);
    need("misprediction", n_mis);
    need("reissue from the buffer", n_rs);
    $display("instructions=%0d cycles=%0d IPC=%0d.%02d", N, cycles, N / cycles, (100 * N / cycles) % 100);
    $display("predicted=%0d mispredicted=%0d marked=%0d reissued=%0d cancelled=%0d",
             n_pred, n_mis, n_mark, n_rs, n_cancel);
    $display("stall cycles: window full %0d, buffer full %0d; max occupancy window %0d buffer %0d",
             n_swin, n_sbuf, max_win, max_buf);
    $display("utilization (avg/max): buffer %0d.%0d/%0d window %0d.%0d/%0d",
             sum_buf / cycles, (10 * sum_buf / cycles) % 10, max_buf,
             sum_win / cycles, (10 * sum_win / cycles) % 10, max_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d committed", ncommit, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
