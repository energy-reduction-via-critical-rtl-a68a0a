// fast_fu_tb: random operations, one per cycle with random gaps; every result
// must appear exactly one cycle after issue with the issuing tag and the
// reference value, and nothing may appear in a cycle after no issue.
`timescale 1ns/1ps
module fast_fu_tb;
  import cpp_pkg::*;
  import alu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fu_req_t req;
  fu_res_t res;
  logic    ready;
  int checks = 0, failures = 0;

  fast_fu dut (.clk, .rst_n, .req, .ready, .res);

  fu_req_t prev;

  initial begin
    req = '0; prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check what was issued one cycle ago
      checks++;
      if (res.valid !== prev.valid) begin
        failures++; $display("FAIL: valid %b expected %b", res.valid, prev.valid);
      end else if (prev.valid && (res.tag !== prev.tag ||
                   res.value !== ref_alu(prev.op, prev.a, prev.b))) begin
        failures++;
        $display("FAIL: op=%0d a=%h b=%h got tag=%0d val=%h", prev.op, prev.a, prev.b, res.tag, res.value);
      end
      checks++;
      if (ready !== 1'b1) begin failures++; $display("FAIL: fast unit not ready"); end
      prev = req;
      req.valid = ($urandom_range(0, 3) != 0);
      req.op    = alu_op_t'($urandom_range(0, 9));
      req.a     = $urandom();
      req.b     = ($urandom_range(0, 1) == 1) ? 32'($urandom_range(0, 40)) : $urandom();
      req.tag   = tag_t'($urandom());
      prev      = req;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
