// crit_steer_tb: random ready/prediction/free patterns over a 64-entry
// window. The model hands out units from per-kind queues of free unit
// numbers in age order; the block's assignment must match it exactly. The
// testbench also counts each outcome (critical->fast, critical->slow,
// non-critical->slow, non-critical->fast) and the issue-width limit.
`timescale 1ns/1ps
module crit_steer_tb;
  localparam int N = 64, NF = 3, NS = 3, IW = 8;
  logic       rdy [N], crit [N];
  logic       fast_free [NF], slow_free [NS];
  logic       fast_go [NF], slow_go [NS];
  logic [5:0] fast_pos [NF], slow_pos [NS];
  int checks = 0, failures = 0;
  int n_cf = 0, n_cs = 0, n_ns = 0, n_nf = 0, n_width = 0;

  crit_steer dut (.*);

  // a second instance with more units than the issue width
  logic       fast_free8 [6], slow_free8 [6];
  logic       fast_go8 [6], slow_go8 [6];
  logic [5:0] fast_pos8 [6], slow_pos8 [6];
  crit_steer #(.N(N), .N_FAST(6), .N_SLOW(6), .ISSUE_W(IW)) dut8 (
    .rdy, .crit, .fast_free(fast_free8), .slow_free(slow_free8),
    .fast_go(fast_go8), .fast_pos(fast_pos8), .slow_go(slow_go8), .slow_pos(slow_pos8));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int fq [$], sq [$];
      int exp_f [NF], exp_s [NS];
      int issued, d;
      fq.delete(); sq.delete();
      d = $urandom_range(0, 30);
      for (int i = 0; i < N; i++) begin
        rdy[i]  = ($urandom_range(0, 99) < d);
        crit[i] = ($urandom_range(0, 2) == 0);
      end
      for (int u = 0; u < NF; u++) fast_free[u] = ($urandom_range(0, 4) != 0);
      for (int u = 0; u < NS; u++) slow_free[u] = ($urandom_range(0, 4) != 0);
      for (int u = 0; u < 6; u++) begin fast_free8[u] = 1; slow_free8[u] = 1; end
      #1;
      for (int u = 0; u < NF; u++) begin exp_f[u] = -1; if (fast_free[u]) fq.push_back(u); end
      for (int u = 0; u < NS; u++) begin exp_s[u] = -1; if (slow_free[u]) sq.push_back(u); end
      for (int i = 0; i < N; i++) if (rdy[i]) begin
        if (crit[i] && fq.size() > 0)       begin exp_f[fq.pop_front()] = i; n_cf++; end
        else if (!crit[i] && sq.size() > 0) begin exp_s[sq.pop_front()] = i; n_ns++; end
        else if (crit[i] && sq.size() > 0)  begin exp_s[sq.pop_front()] = i; n_cs++; end
        else if (!crit[i] && fq.size() > 0) begin exp_f[fq.pop_front()] = i; n_nf++; end
      end
      for (int u = 0; u < NF; u++) begin
        checks++;
        if (fast_go[u] !== (exp_f[u] >= 0) || (exp_f[u] >= 0 && int'(fast_pos[u]) != exp_f[u])) begin
          failures++; $display("FAIL: fast unit %0d go=%b pos=%0d expected %0d", u, fast_go[u], fast_pos[u], exp_f[u]);
        end
      end
      for (int u = 0; u < NS; u++) begin
        checks++;
        if (slow_go[u] !== (exp_s[u] >= 0) || (exp_s[u] >= 0 && int'(slow_pos[u]) != exp_s[u])) begin
          failures++; $display("FAIL: slow unit %0d go=%b pos=%0d expected %0d", u, slow_go[u], slow_pos[u], exp_s[u]);
        end
      end
      // 12 free units: at most IW issues, and exactly min(IW, ready count)
      issued = 0; d = 0;
      for (int u = 0; u < 6; u++) issued += int'(fast_go8[u]) + int'(slow_go8[u]);
      for (int i = 0; i < N; i++) d += int'(rdy[i]);
      checks++;
      if (issued != ((d < IW) ? d : IW)) begin failures++; $display("FAIL: issued %0d of %0d ready", issued, d); end
      if (d > IW) n_width++;
    end
    checks++;
    if (n_cf == 0 || n_cs == 0 || n_ns == 0 || n_nf == 0 || n_width == 0) begin
      failures++; $display("FAIL: coverage CF=%0d CS=%0d NS=%0d NF=%0d width=%0d", n_cf, n_cs, n_ns, n_nf, n_width);
    end
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
