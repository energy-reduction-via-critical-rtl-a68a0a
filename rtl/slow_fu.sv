// slow_fu: slow integer functional unit (low supply voltage).
//
// The slow unit is the same ALU circuit as the fast one run at half the speed,
// so seen from the core clock its result arrives two cycles after issue.
// PIPELINED=1 places a latch stage in the unit so that it still accepts one
// operation per cycle (the same throughput as a fast unit); PIPELINED=0 is
// the unpipelined unit, which is busy for the second cycle and so accepts an
// operation at most every other cycle. Both variants are the document's; the
// document prefers the pipelined one, which is the default.
//
// Interface: req in when ready=1; res out two cycles after req.valid.
// Timing: issue in cycle t, ALU evaluates in t, stage register holds the
// result in t+1, res drives the result bus in t+2.
module slow_fu
  import cpp_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  fu_req_t req,
  output logic    ready,
  output fu_res_t res
);
  logic [XLEN-1:0] y;
  fu_res_t         stage;

  alu_core u_alu (.op(req.op), .a(req.a), .b(req.b), .y(y));

  // The unpipelined unit is still occupied while its operation is in the
  // second half of its evaluation.
  assign ready = PIPELINED ? 1'b1 : !stage.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      res   <= '0;
    end else begin
      stage.valid <= req.valid && ready;
      stage.tag   <= req.tag;
      stage.value <= y;
      res         <= stage;
    end
  end

  // An operation offered while the unpipelined unit is busy is a scheduling error.
  a_no_issue_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         req.valid |-> ready);
endmodule
