// functional_unit: one of the core's execution units.
//
// Every unit executes the whole operation set (dw_pkg::op_e). Simple operations
// take one cycle; multiply takes four and divide twelve, the latencies of the
// evaluated machine. The result is computed when the operation is accepted and
// held for the operation's latency; a multiply or divide occupies the unit for
// its whole latency (the unit is not pipelined: this implementation's choice),
// while one-cycle operations can be accepted back to back.
//
// Interface: req_valid/req is accepted when req_ready is high. res_valid/res
// presents the result for exactly one cycle, LAT cycles after acceptance, and
// carries the request's tag and version back so that a stale execution of a
// reissued instruction can be recognised and dropped by the instruction buffer.
// Divide by zero returns all ones (not specified; chosen here).
module functional_unit
  import dw_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  input  fu_req_t req,
  output logic    req_ready,
  output logic    res_valid,
  output result_t res
);

  logic        occ_q;
  logic [3:0]  cnt_q;     // remaining cycles before the result is presented
  result_t     res_q;

  assign res_valid = occ_q && (cnt_q == '0);
  assign res       = res_q;
  assign req_ready = !occ_q || (cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ_q <= 1'b0;
      cnt_q <= '0;
      res_q <= '0;
    end else if (req_valid && req_ready) begin
      occ_q       <= 1'b1;
      cnt_q       <= 4'(op_latency(req.op) - 1);
      res_q.tag   <= req.tag;
      res_q.ver   <= req.ver;
      res_q.value <= alu_compute(req.op, req.a, req.b);
    end else if (occ_q && cnt_q != '0) begin
      cnt_q <= cnt_q - 4'd1;
    end else begin
      occ_q <= 1'b0;
    end
  end

endmodule
