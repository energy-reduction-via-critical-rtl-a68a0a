// fast_fu: fast integer functional unit (high supply voltage, full clock).
//
// Accepts one operation per cycle and returns its result one cycle later:
// the ALU evaluates the operands in the issue cycle and the result register
// drives the result bus in the next cycle, where the RUU uses it to wake up
// and bypass to dependants. The one-cycle latency follows the document; the
// registered-output arrangement is this design's choice.
//
// Interface: req (valid, op, operands, RUU tag) in; res (valid, tag, value)
// out, one cycle after req.valid. ready is always 1.
module fast_fu
  import cpp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  logic [XLEN-1:0] y;

  alu_core u_alu (.op(req.op), .a(req.a), .b(req.b), .y(y));

  assign ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res <= '0;
    end else begin
      res.valid <= req.valid;
      res.tag   <= req.tag;
      res.value <= y;
    end
  end
endmodule
