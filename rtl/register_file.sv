// register_file: architectural register file of the core.
//
// Read at decode (combinational read ports) and written in order at commit by
// the instruction buffer, as drawn in the processor diagram (decode reads it,
// the instruction buffer writes it). Register 0 always reads as zero (MIPS
// convention, this implementation's choice). Writes take effect at the clock
// edge; when several write ports name the same register in one cycle the
// highest-numbered port wins, which is the youngest of the committing group.
module register_file
  import dw_pkg::*;
#(
  parameter int unsigned NRD = 16,  // read ports: two per decoded instruction
  parameter int unsigned NWR = 8    // write ports: commit width
)(
  input  logic         clk,
  input  logic         rst_n,
  input  reg_t  [NRD-1:0] rd_addr,
  output word_t [NRD-1:0] rd_data,
  input  logic  [NWR-1:0] wr_en,
  input  reg_t  [NWR-1:0] wr_addr,
  input  word_t [NWR-1:0] wr_data
);

  word_t regs_q [NREGS];

  always_comb begin
    for (int i = 0; i < NRD; i++)
      rd_data[i] = (rd_addr[i] == '0) ? '0 : regs_q[rd_addr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs_q[r] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_addr[w] != '0) regs_q[wr_addr[w]] <= wr_data[w];
    end
  end

endmodule
