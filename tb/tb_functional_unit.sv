// tb_functional_unit: checks results and latencies of one functional unit.
//
// Random operations of every kind are sent one at a time; the result must
// appear exactly 1 cycle (simple operations), 4 cycles (multiply) or 12 cycles
// (divide) after acceptance, carry the request's tag and version, and match a
// reference computed here. The unit must refuse new work while a multiply or
// divide is in progress, and accept back-to-back one-cycle operations.
`timescale 1ns/1ps
module tb_functional_unit;
  import dw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, res_valid;
  fu_req_t req;
  result_t res;
  int checks = 0, failures = 0;

  functional_unit dut (.*);

  function automatic word_t ref_result(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a + (~b + 1);
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLL: return a << (b % 32);
      OP_SRL: return a >> (b % 32);
      OP_SLT: return (int'(a) < int'(b)) ? 1 : 0;
      OP_MUL: return word_t'(longint'(a) * longint'(b));
      OP_DIV: return (b == 0) ? 32'hffff_ffff : word_t'(longint'(a) / longint'(b));
      default: return 0;
    endcase
  endfunction

  function automatic int ref_lat(op_e op);
    return (op == OP_MUL) ? 4 : (op == OP_DIV) ? 12 : 1;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      op_e op;
      word_t a, b;
      int lat, waited;
      op = op_e'($urandom_range(0, 9));
      a = $urandom; b = (t % 7 == 0) ? 0 : $urandom_range(0, 1000);
      @(negedge clk);
      check(req_ready, "unit not ready when idle");
      req_valid = 1; req.op = op; req.a = a; req.b = b;
      req.tag = tag_t'(t); req.ver = ver_t'(t);
      @(negedge clk);
      req_valid = 0;
      lat = ref_lat(op);
      waited = 1;
      while (!res_valid && waited < 20) begin
        if (op == OP_MUL || op == OP_DIV)
          check(!req_ready, "unit ready during a multi-cycle operation");
        @(negedge clk); waited++;
      end
      check(waited == lat, $sformatf("op %s latency %0d expected %0d", op.name(), waited, lat));
      check(res.value == ref_result(op, a, b),
            $sformatf("op %s %h,%h -> %h expected %h", op.name(), a, b, res.value, ref_result(op, a, b)));
      check(res.tag == tag_t'(t) && res.ver == ver_t'(t), "tag/version not returned");
    end
    // back-to-back one-cycle operations
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      req_valid = 1; req.op = OP_ADD; req.a = t; req.b = 100; req.tag = tag_t'(t);
      @(negedge clk);
      check(res_valid && res.value == word_t'(t + 100), "back-to-back add");
      check(req_ready, "not ready for back-to-back one-cycle operations");
    end
    req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
