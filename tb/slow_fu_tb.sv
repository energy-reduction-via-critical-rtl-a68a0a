// slow_fu_tb: checks both slow-unit variants against a reference.
// Pipelined: accepts an operation every cycle, each result two cycles later.
// Unpipelined: ready drops for the cycle after an issue, so at most one
// operation per two cycles; each result two cycles after its issue. The
// testbench also measures the throughput of both under a saturating load.
`timescale 1ns/1ps
module slow_fu_tb;
  import cpp_pkg::*;
  import alu_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fu_req_t req_p, req_n;
  fu_res_t res_p, res_n;
  logic    rdy_p, rdy_n;
  int checks = 0, failures = 0;
  int done_p = 0, done_n = 0;

  slow_fu #(.PIPELINED(1'b1)) dut_p (.clk, .rst_n, .req(req_p), .ready(rdy_p), .res(res_p));
  slow_fu #(.PIPELINED(1'b0)) dut_n (.clk, .rst_n, .req(req_n), .ready(rdy_n), .res(res_n));

  fu_req_t hist_p [2], hist_n [2];   // [0]: one cycle ago, [1]: two cycles ago

  task automatic check(string name, fu_res_t res, fu_req_t exp, ref int done);
    checks++;
    if (res.valid !== exp.valid) begin
      failures++; $display("FAIL %s: valid %b expected %b", name, res.valid, exp.valid);
    end else if (exp.valid) begin
      done++;
      if (res.tag !== exp.tag || res.value !== ref_alu(exp.op, exp.a, exp.b)) begin
        failures++;
        $display("FAIL %s: op=%0d a=%h b=%h got tag=%0d val=%h", name, exp.op, exp.a, exp.b, res.tag, res.value);
      end
    end
  endtask

  function automatic fu_req_t rnd_req(logic v);
    fu_req_t r;
    r.valid = v;
    r.op    = alu_op_t'($urandom_range(0, 9));
    r.a     = $urandom();
    r.b     = ($urandom_range(0, 1) == 1) ? 32'($urandom_range(0, 40)) : $urandom();
    r.tag   = tag_t'($urandom());
    return r;
  endfunction

  initial begin
    req_p = '0; req_n = '0;
    hist_p[0] = '0; hist_p[1] = '0; hist_n[0] = '0; hist_n[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: random load; phase 2: an operation offered every cycle
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check("pipelined", res_p, hist_p[1], done_p);
      check("unpipelined", res_n, hist_n[1], done_n);
      checks++;
      if (rdy_p !== 1'b1) begin failures++; $display("FAIL: pipelined unit not ready"); end
      checks++;
      if (rdy_n !== !hist_n[0].valid) begin
        failures++; $display("FAIL: unpipelined ready=%b one cycle after valid=%b", rdy_n, hist_n[0].valid);
      end
      if (n == 2000) begin done_p = 0; done_n = 0; end
      req_p = rnd_req(n >= 2000 || $urandom_range(0, 2) != 0);
      req_n = rnd_req((n >= 2000 || $urandom_range(0, 2) != 0) && rdy_n);
      hist_p[1] = hist_p[0]; hist_p[0] = req_p;
      hist_n[1] = hist_n[0]; hist_n[0] = req_n;
    end
    // throughput over the last 1000 cycles of saturating load
    checks += 2;
    if (done_p < 995) begin failures++; $display("FAIL: pipelined throughput %0d/1000", done_p); end
    if (done_n < 495 || done_n > 505) begin failures++; $display("FAIL: unpipelined throughput %0d/1000", done_n); end
    $display("throughput over 1000 cycles: pipelined %0d, unpipelined %0d", done_p, done_n);
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
