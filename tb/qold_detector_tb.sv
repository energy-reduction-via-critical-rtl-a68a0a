// qold_detector_tb: random RUU occupancy patterns and head positions; the
// reported entry must be the first valid, undispatched one counted from the
// head, wrapping around the circular queue.
`timescale 1ns/1ps
module qold_detector_tb;
  localparam int N = 64;
  logic       valid [N];
  logic       dispatched [N];
  logic [5:0] head;
  logic       found;
  logic [5:0] idx;
  int checks = 0, failures = 0, n_wrap = 0, n_none = 0;

  qold_detector dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int density, exp_idx;
      logic exp_found;
      density = $urandom_range(0, 99);
      head    = 6'($urandom());
      for (int e = 0; e < N; e++) begin
        valid[e]      = ($urandom_range(0, 99) < density);
        dispatched[e] = ($urandom_range(0, 99) < 80);
      end
      #1;
      exp_found = 0; exp_idx = 0;
      for (int k = 0; k < N && !exp_found; k++) begin
        int e;
        e = (int'(head) + k) % N;
        if (valid[e] && !dispatched[e]) begin exp_found = 1; exp_idx = e; end
      end
      if (exp_found && exp_idx < int'(head)) n_wrap++;
      if (!exp_found) n_none++;
      checks++;
      if (found !== exp_found || (exp_found && int'(idx) != exp_idx)) begin
        failures++;
        $display("FAIL: head=%0d got found=%b idx=%0d expected found=%b idx=%0d", head, found, idx, exp_found, exp_idx);
      end
    end
    checks++;
    if (n_wrap == 0 || n_none == 0) begin failures++; $display("FAIL: coverage wrap=%0d none=%0d", n_wrap, n_none); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
