// cpp_buffer_tb: drives random training and lookups at the default size
// (4K counters, 3 bits, threshold 5, 8 lookup and 8 update ports) and
// compares every prediction with a model table. PCs are drawn from a small
// pool, some 16 KB apart so they share a counter, so that one counter is
// often trained by several ports in one cycle and saturates at both ends.
// It first checks the clearing sweep after reset: ENTRIES cycles of
// non-critical answers and ignored training, then init_done.
`timescale 1ns/1ps
module cpp_buffer_tb;
  import cpp_pkg::*;

  localparam int ENTRIES = 4096, LP = 8, UP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] lk_pc [LP];
  logic        lk_crit [LP];
  logic        up_valid [UP];
  logic [31:0] up_pc [UP];
  logic        up_crit [UP];
  logic        init_done;

  cpp_buffer dut (.*);

  int model [ENTRIES];
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0, n_pred = 0, n_multi = 0;
  logic [31:0] pool [16];

  function automatic int midx(logic [31:0] pc);
    return int'((pc / 4) % ENTRIES);
  endfunction

  function automatic logic [31:0] rnd_pc();
    return pool[$urandom_range(0, 15)];
  endfunction

  initial begin
    for (int i = 0; i < ENTRIES; i++) model[i] = 0;
    for (int i = 0; i < 16; i++)
      pool[i] = (i < 4) ? 32'h0040_0000 + 32'(16384 * i) : $urandom() & ~32'h3;
    for (int p = 0; p < LP; p++) lk_pc[p] = 0;
    for (int p = 0; p < UP; p++) begin up_valid[p] = 0; up_pc[p] = 0; up_crit[p] = 0; end
    for (int p = 0; p < LP; p++) lk_pc[p] = pool[0];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the clearing sweep takes one cycle per counter; training offered
    // meanwhile is ignored and lookups answer non-critical
    for (int n = 0; n < ENTRIES; n++) begin
      for (int p = 0; p < UP; p++) begin up_valid[p] = 1; up_pc[p] = pool[0]; up_crit[p] = 1; end
      #1;
      checks++;
      if (init_done !== 1'b0 || lk_crit[0] !== 1'b0) begin
        failures++; $display("FAIL: cycle %0d of clearing: init_done=%b crit=%b", n, init_done, lk_crit[0]);
      end
      @(negedge clk);
    end
    checks++;
    if (init_done !== 1'b1) begin failures++; $display("FAIL: init_done not set after %0d cycles", ENTRIES); end
    for (int n = 0; n < 4000; n++) begin
      // lookups see the table before this cycle's updates
      for (int p = 0; p < LP; p++) lk_pc[p] = ($urandom_range(0, 7) == 0) ? $urandom() : rnd_pc();
      // training bias changes every 500 cycles so counters sweep both ways
      for (int p = 0; p < UP; p++) begin
        up_valid[p] = ($urandom_range(0, 1) == 1);
        up_pc[p]    = rnd_pc();
        up_crit[p]  = ($urandom_range(0, 9) < (((n / 500) % 2 == 0) ? 8 : 2));
      end
      #1;
      for (int p = 0; p < LP; p++) begin
        checks++;
        if (lk_crit[p] !== (model[midx(lk_pc[p])] >= 5)) begin
          failures++;
          $display("FAIL: pc=%h counter=%0d predicted %b", lk_pc[p], model[midx(lk_pc[p])], lk_crit[p]);
        end
        if (lk_crit[p]) n_pred++;
      end
      for (int p = 0; p < UP; p++)
        for (int q = 0; q < p; q++)
          if (up_valid[p] && up_valid[q] && midx(up_pc[p]) == midx(up_pc[q])) n_multi++;
      @(negedge clk);
      for (int p = 0; p < UP; p++) if (up_valid[p]) begin
        int i;
        i = midx(up_pc[p]);
        if (up_crit[p]) begin if (model[i] == 7) n_sat_hi++; else model[i]++; end
        else            begin if (model[i] == 0) n_sat_lo++; else model[i]--; end
      end
    end
    // two PCs 16 KB apart share a counter
    checks++;
    if (midx(pool[0]) != midx(pool[2]) || !(n_sat_hi > 0 && n_sat_lo > 0 && n_pred > 0 && n_multi > 0)) begin
      failures++;
      $display("FAIL: coverage sat_hi=%0d sat_lo=%0d pred=%0d multi=%0d", n_sat_hi, n_sat_lo, n_pred, n_multi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
