// tb_decoupled_window_core: end-to-end test of the decoupled-window core at its
// default size (8-wide, 64-entry window, 128-entry buffer, 4096-entry predictor).
//
// The program is a loop body executed ITER times, so that each static
// instruction produces a sequence of values the stride predictor can learn.
// Some values stay strided (always predicted right), some wrap around every
// eight iterations (confident predictions that fail), and one is randomised
// (never confidently predicted). Slow divides in front of the wrapping values
// let dependents execute with the predicted value before the real one is
// known, so they must be reissued from the instruction buffer; other
// dependents are still waiting in the scheduling window when the correction
// arrives, so the buffer's copy is cancelled. Long divide chains fill the
// window and the buffer, so that decode stalls on both.
//
// An in-order reference model executes the same program; every committed
// instruction is compared with it (pc, destination, value), as is the final
// commit count. Each mechanism (prediction, misprediction, reissue, buffer
// copy cancelled, window-full stall, buffer-full stall) must occur at least
// once, and the scheduling window must never hold more than 64 instructions
// nor the buffer more than 128. Average and maximum occupancy of both
// structures are printed in the layout of a utilization table.
`timescale 1ns/1ps
module tb_decoupled_window_core;
  import dw_pkg::*;

  localparam int DW   = 8;
  localparam int ITER = 300;
  localparam int BODY = 16;
  localparam int SETUP = 4;
  localparam int N    = SETUP + ITER * BODY;

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
    for (int it = 0; it < ITER; it++) begin
      word_t b;
      b = 32'h1000;
      prog[n++] = mk(b+0,  OP_ADD, 1, 1, 0, 1, 32'd1);   // r1++        strided
      prog[n++] = mk(b+4,  OP_MUL, 2, 1, 3, 0, 0);       // r2 = 3*r1   strided
      prog[n++] = mk(b+8,  OP_DIV, 11, 1, 12, 0, 0);     // r11 = r1/1  slow
      prog[n++] = mk(b+12, OP_AND, 6, 11, 0, 1, 32'd7);  // r6 = r11&7  wraps
      prog[n++] = mk(b+16, OP_ADD, 7, 6, 2, 0, 0);       // uses predicted r6
      prog[n++] = mk(b+20, OP_SLL, 10, 6, 0, 1, 32'd2);  // uses predicted r6
      prog[n++] = mk(b+24, OP_SUB, 9, 7, 10, 0, 0);      // second level
      prog[n++] = mk(b+28, OP_MUL, 14, 11, 3, 0, 0);     // r14 later than r6
      prog[n++] = mk(b+32, OP_ADD, 13, 6, 14, 0, 0);     // waits in window
      prog[n++] = mk(b+36, OP_DIV, 8, 9, 3, 0, 0);       // slow dependent
      prog[n++] = mk(b+40, OP_XOR, 15, 15, 0, 1, $urandom); // unpredictable
      prog[n++] = mk(b+44, OP_ADD, 16, 15, 8, 0, 0);
      prog[n++] = mk(b+48, OP_DIV, 17, 17, 12, 0, 0);    // serial divide chain
      prog[n++] = mk(b+52, OP_ADD, 17, 17, 0, 1, 32'd5);
      prog[n++] = mk(b+56, OP_OR,  18, 17, 13, 0, 0);
      prog[n++] = mk(b+60, OP_SLT, 19, 9, 16, 0, 0);
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
    need("buffer copy cancelled for the window", n_cancel);
    need("window-full stall", n_swin);
    need("buffer-full stall", n_sbuf);
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
