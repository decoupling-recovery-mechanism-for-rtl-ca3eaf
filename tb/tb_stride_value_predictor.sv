// tb_stride_value_predictor: checks lookup, confidence and training of the
// 4096-entry stride predictor against a reference table kept here.
//
// Random instruction addresses (a few of them sharing an index with different
// tags) are trained with strided value sequences that sometimes break the
// stride; every cycle all lookup ports are compared with the reference: hit,
// predicted value prev_value + stride, and speculation only when the 2-bit
// confidence is above two. Updates to the same entry in one cycle must chain.
`timescale 1ns/1ps
module tb_stride_value_predictor;
  import dw_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t [N-1:0] lk_pc, lk_value, up_pc, up_value;
  logic  [N-1:0] lk_hit, lk_speculate, up_valid;
  int checks = 0, failures = 0, n_spec = 0;

  stride_value_predictor dut (.*);

  // reference
  bit    r_valid [4096];
  word_t r_pc    [4096];
  word_t r_prev  [4096], r_stride [4096];
  int    r_conf  [4096];

  word_t pcs [16];
  word_t cur [16], st [16];

  function automatic int ix(word_t pc); return (pc >> 2) % 4096; endfunction

  initial begin
    for (int k = 0; k < 4096; k++) r_valid[k] = 0;
    for (int k = 0; k < 16; k++) begin
      pcs[k] = (k < 12) ? ($urandom & 32'hffff_fffc) : (pcs[k-12] + 32'h4000); // same index, other tag
      cur[k] = $urandom; st[k] = $urandom_range(0, 9);
    end
    up_valid = '0; lk_pc = '0; up_pc = '0; up_value = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) lk_pc[p] = pcs[$urandom_range(0, 15)];
      for (int w = 0; w < N; w++) begin
        int k;
        k = $urandom_range(0, 15);
        up_valid[w] = ($urandom_range(0, 3) != 0);
        up_pc[w] = pcs[k];
        if (up_valid[w]) begin
          if ($urandom_range(0, 15) == 0) cur[k] = $urandom; // stride break
          else cur[k] = cur[k] + st[k];
        end
        up_value[w] = cur[k];
      end
      #1;
      for (int p = 0; p < N; p++) begin
        int i;
        bit hit;
        i = ix(lk_pc[p]);
        hit = r_valid[i] && (r_pc[i] >> 14) == (lk_pc[p] >> 14);
        checks++;
        if (lk_hit[p] != hit || lk_speculate[p] != (hit && r_conf[i] > 2) ||
            (hit && lk_value[p] != r_prev[i] + r_stride[i])) begin
          failures++;
          $display("FAIL: pc %h hit %0d spec %0d value %h, expected %0d %0d %h",
                   lk_pc[p], lk_hit[p], lk_speculate[p], lk_value[p], hit,
                   hit && r_conf[i] > 2, r_prev[i] + r_stride[i]);
        end
        if (lk_speculate[p]) n_spec++;
      end
      @(posedge clk);
      for (int w = 0; w < N; w++) if (up_valid[w]) begin
        int i;
        i = ix(up_pc[w]);
        if (r_valid[i] && (r_pc[i] >> 14) == (up_pc[w] >> 14)) begin
          if (r_prev[i] + r_stride[i] == up_value[w]) r_conf[i] = (r_conf[i] == 3) ? 3 : r_conf[i] + 1;
          else r_conf[i] = (r_conf[i] == 0) ? 0 : r_conf[i] - 1;
          r_stride[i] = up_value[w] - r_prev[i];
          r_prev[i] = up_value[w];
        end else begin
          r_valid[i] = 1; r_pc[i] = up_pc[w]; r_prev[i] = up_value[w];
          r_stride[i] = 0; r_conf[i] = 0;
        end
      end
    end
    checks++;
    if (n_spec == 0) begin failures++; $display("FAIL: never confident"); end
    $display("confident lookups: %0d", n_spec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
