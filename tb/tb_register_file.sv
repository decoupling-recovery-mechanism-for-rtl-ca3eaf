// tb_register_file: random multi-port writes and reads against a shadow copy.
// Checks that register 0 stays zero, that a write is visible from the next
// cycle on, and that the highest write port wins when two ports write the
// same register in one cycle.
`timescale 1ns/1ps
module tb_register_file;
  import dw_pkg::*;
  localparam int NRD = 16, NWR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  reg_t  [NRD-1:0] rd_addr;
  word_t [NRD-1:0] rd_data;
  logic  [NWR-1:0] wr_en;
  reg_t  [NWR-1:0] wr_addr;
  word_t [NWR-1:0] wr_data;
  word_t shadow [NREGS];
  int checks = 0, failures = 0;

  register_file dut (.*);

  initial begin
    for (int r = 0; r < NREGS; r++) shadow[r] = 0;
    wr_en = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) rd_addr[p] = reg_t'($urandom);
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd_data[p] != ((rd_addr[p] == 0) ? 0 : shadow[rd_addr[p]])) begin
          failures++;
          $display("FAIL: r%0d read %h expected %h", rd_addr[p], rd_data[p], shadow[rd_addr[p]]);
        end
      end
      for (int w = 0; w < NWR; w++) begin
        wr_en[w]   = $urandom_range(0, 1);
        wr_addr[w] = reg_t'($urandom_range(0, 7)); // small range: same-register writes happen
        wr_data[w] = $urandom;
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_addr[w] != 0) shadow[wr_addr[w]] = wr_data[w];
    end
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
