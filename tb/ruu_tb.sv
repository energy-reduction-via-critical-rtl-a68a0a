// ruu_tb: the register update unit with real fast and slow units and a
// testbench model of the CPP buffer (predictions fixed per PC and phase).
//  Phase 1: random program with random predictions; every commit is
//           checked in order against a sequential model; the CPP training
//           outputs must mirror the commits; each cycle's issue decisions
//           must obey the steering rule (a critical instruction only goes
//           slow when every fast unit is taken this cycle, and vice versa).
//  Phase 2: a 64-long dependence chain predicted critical must take one
//           cycle per link (fast units, back-to-back bypass).
//  Phase 3: the same chain predicted non-critical takes two cycles per link.
`timescale 1ns/1ps
module ruu_tb;
  import cpp_pkg::*;
  import alu_ref_pkg::*;

  localparam int DW = 8, CW = 8, NF = 3, NS = 3, L = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            in_valid [DW];
  instr_t          in_instr [DW];
  logic            in_ready;
  logic [31:0]     lk_pc [DW];
  logic            lk_crit [DW];
  logic            up_valid [CW];
  logic [31:0]     up_pc [CW];
  logic            up_crit [CW];
  fu_req_t         fast_req [NF], slow_req [NS];
  logic            fast_ready [NF], slow_ready [NS];
  fu_res_t         fast_res [NF], slow_res [NS];
  logic            fast_req_crit [NF], slow_req_crit [NS], fast_req_byp [NF], slow_req_byp [NS];
  logic            qold_found;
  logic [5:0]      qold_idx;
  logic            cm_valid [CW];
  logic [31:0]     cm_pc [CW];
  logic [4:0]      cm_rd [CW];
  logic [31:0]     cm_value [CW];

  ruu dut (.*);
  for (genvar u = 0; u < NF; u++) begin : g_f
    fast_fu fu (.clk, .rst_n, .req(fast_req[u]), .ready(fast_ready[u]), .res(fast_res[u]));
  end
  for (genvar u = 0; u < NS; u++) begin : g_s
    slow_fu fu (.clk, .rst_n, .req(slow_req[u]), .ready(slow_ready[u]), .res(slow_res[u]));
  end

  // prediction model: phase 1 by PC bits, phase 2 all critical, phase 3 none
  int phase = 1;
  always_comb
    for (int s = 0; s < DW; s++)
      lk_crit[s] = (phase == 1) ? (lk_pc[s][4] ^ lk_pc[s][7]) : (phase == 2);

  logic [31:0] model_rf [32];
  instr_t      prog [$];
  logic [31:0] exp_pc [$], exp_val [$];
  int checks = 0, failures = 0, committed = 0, cyc = 0;
  int n_cs = 0, n_nf = 0, n_up_crit = 0, n_up_non = 0;
  logic bubbles = 1;

  function automatic void add(instr_t t);
    logic [31:0] v;
    v = ref_alu(t.op, model_rf[t.rs1], t.use_imm ? t.imm : model_rf[t.rs2]);
    model_rf[t.rd] = v;
    prog.push_back(t);
    exp_pc.push_back(t.pc);
    exp_val.push_back(v);
  endfunction

  always @(negedge clk) if (rst_n) begin
    int nfast, nslow;
    cyc++;
    for (int i = 0; i < CW; i++) begin
      checks++;
      if (up_valid[i] !== cm_valid[i] || (cm_valid[i] && up_pc[i] !== cm_pc[i])) begin
        failures++; $display("FAIL: training port %0d does not follow commit", i);
      end
      if (cm_valid[i]) begin
        checks++;
        if (exp_pc.size() == 0 || cm_pc[i] !== exp_pc[0] || cm_value[i] !== exp_val[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: commit pc=%h val=%h", cm_pc[i], cm_value[i]);
        end
        if (exp_pc.size() != 0) begin void'(exp_pc.pop_front()); void'(exp_val.pop_front()); end
        if (up_crit[i]) n_up_crit++; else n_up_non++;
        committed++;
      end
    end
    nfast = 0; nslow = 0;
    for (int u = 0; u < NF; u++) nfast += int'(fast_req[u].valid);
    for (int u = 0; u < NS; u++) nslow += int'(slow_req[u].valid);
    for (int u = 0; u < NS; u++) if (slow_req[u].valid && slow_req_crit[u]) begin
      n_cs++; checks++;
      if (nfast != NF) begin failures++; $display("FAIL: critical sent slow with a fast unit idle"); end
    end
    for (int u = 0; u < NF; u++) if (fast_req[u].valid && !fast_req_crit[u]) begin
      n_nf++; checks++;
      if (nslow != NS) begin failures++; $display("FAIL: non-critical sent fast with a slow unit idle"); end
    end
    for (int s = 0; s < DW; s++) in_valid[s] = 0;
    if (in_ready && prog.size() > 0 && (!bubbles || $urandom_range(0, 5) != 0)) begin
      int n;
      n = bubbles ? $urandom_range(1, DW) : DW;
      for (int s = 0; s < n; s++) if (prog.size() > 0) begin
        in_instr[s] = prog.pop_front();
        in_valid[s] = 1;
      end
    end
  end

  task automatic chain(int ph, int lat);
    int c0;
    phase = ph;
    for (int k = 0; k < L; k++) begin
      instr_t t;
      t = '0;
      t.pc = 32'h8000 + 32'(4 * k); t.op = OP_ADD; t.rd = 5'd3; t.rs1 = 5'd3;
      t.use_imm = 1; t.imm = 32'(k + 1);
      add(t);
    end
    c0 = cyc;
    wait (exp_pc.size() == 0);
    @(posedge clk);
    checks++;
    if (cyc - c0 < L * lat || cyc - c0 > L * lat + 6) begin
      failures++; $display("FAIL: chain of %0d at latency %0d took %0d cycles", L, lat, cyc - c0);
    end
    $display("chain of %0d, %0d-cycle units: %0d cycles", L, lat, cyc - c0);
  endtask

  initial begin
    for (int r = 0; r < 32; r++) model_rf[r] = 0;
    for (int s = 0; s < DW; s++) begin in_valid[s] = 0; in_instr[s] = '0; end
    for (int k = 0; k < 3000; k++) begin
      instr_t t;
      t.pc = 32'h1000 + 32'(4 * (k % 200));
      t.op = alu_op_t'($urandom_range(0, 9));
      t.rd = 5'($urandom_range(0, 31));
      t.rs1 = 5'($urandom_range(0, 31));
      t.rs2 = 5'($urandom_range(0, 31));
      t.use_imm = ($urandom_range(0, 2) == 0);
      t.imm = $urandom();
      add(t);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (exp_pc.size() == 0);
    @(posedge clk);
    bubbles = 0;
    chain(2, 1);
    chain(3, 2);
    checks++;
    if (n_cs == 0 || n_nf == 0 || n_up_crit == 0 || n_up_non == 0) begin
      failures++; $display("FAIL: coverage CS=%0d NF=%0d trained-up=%0d trained-down=%0d", n_cs, n_nf, n_up_crit, n_up_non);
    end
    $display("committed=%0d CS=%0d NF=%0d", committed, n_cs, n_nf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
