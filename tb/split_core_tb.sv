// split_core_tb: end-to-end test of the split-queue core at its default
// size (16-entry fast queue, 48-entry slow queue, 3 fast + 3 slow units, 4K
// CPP buffer), with the same two-phase program as the central-RUU core's
// test: a random loop body, then a dependence chain followed by
// instructions that read the chain's latest value. Every commit is checked in program order
// against a sequential model. Because the queue is chosen by the
// prediction, a fast unit may only ever receive predicted-critical
// instructions and a slow unit only non-critical ones; this is checked on
// every issue. It counts and requires: critical->fast and non-critical->slow
// issues, result bypass, QOLD marking, queue-full stalls and instructions
// that depend on a value still in flight in the other cluster.
`timescale 1ns/1ps
module split_core_tb;
  import cpp_pkg::*;

  localparam int DW = 8, CW = 8, NF_U = 3, NS_U = 3;
  localparam int BODY  = 64;
  localparam int ITERS = 150;
  localparam int TOTAL = 2 * BODY * ITERS;  // random phase, then chain phase
  localparam int WATCHDOG = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            in_valid [DW];
  instr_t          in_instr [DW];
  logic            in_ready;
  logic            cm_valid [CW];
  logic [PCW-1:0]  cm_pc    [CW];
  logic [REGW-1:0] cm_rd    [CW];
  logic [XLEN-1:0] cm_value [CW];
  logic fast_issue [NF_U], fast_req_crit [NF_U], fast_req_byp [NF_U];
  logic slow_issue [NS_U], slow_req_crit [NS_U], slow_req_byp [NS_U];
  logic qold_found, cpp_ready;

  logic ins_cross [DW];
  split_core dut (.*);

  // ---- independent reference model -----------------------------------------
  function automatic logic [31:0] ref_alu(alu_op_t op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      OP_SRA:  return 32'($signed(a) >>> b[4:0]);
      OP_SLT:  return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      OP_SLTU: return (a < b) ? 32'd1 : 32'd0;
      default: return 32'hdead_beef;
    endcase
  endfunction

  instr_t          body  [BODY];
  instr_t          body2 [BODY];
  logic [31:0]     model_rf [32];
  logic [31:0]     exp_pc [$], exp_val [$];
  logic [4:0]      exp_rd [$];
  int              generated = 0, committed = 0;
  int              checks = 0, failures = 0;
  int              n_cross = 0, n_wrong = 0, n_b2b = 0;
  logic            prev_slow = 1'b0;
  int              n_cf = 0, n_cs = 0, n_nf = 0, n_ns = 0, n_byp = 0, n_qold = 0, n_full = 0;
  int              cycles = 0;

  task automatic build_body();
    for (int i = 0; i < BODY; i++) begin
      instr_t t;
      t.pc  = 32'h0000_1000 + 32'(4 * i);
      t.op  = alu_op_t'($urandom_range(0, 9));
      t.rd  = 5'($urandom_range(1, 31));
      // half of the instructions extend a dependence chain
      t.rs1 = (i > 0 && $urandom_range(0, 1) == 1) ? body[i-1].rd : 5'($urandom_range(0, 31));
      t.rs2 = (i > 1 && $urandom_range(0, 3) == 0) ? body[i-2].rd : 5'($urandom_range(0, 31));
      t.use_imm = ($urandom_range(0, 2) == 0);
      t.imm = $urandom();
      body[i] = t;
    end
    // Phase 2: a 48-instruction dependence chain on register 1 followed by
    // 16 independent instructions. The PCs are laid out 16 KB apart so that
    // three chain instructions and one independent instruction share each
    // CPP counter (aliasing in the 4K-entry direct-mapped table). The chain
    // is marked critical by QOLD nearly every time, so the shared counters
    // saturate and the independent instructions are predicted critical too:
    // sixteen of them ready at once overflow the three fast units.
    for (int i = 0; i < BODY; i++) begin
      instr_t t;
      t.pc  = 32'h0000_2000 + 32'h4000 * 32'(i / 16) + 32'(4 * (i % 16));
      t.op  = (i % 3 == 0) ? OP_XOR : OP_ADD;
      t.rs2 = 5'($urandom_range(21, 31));
      t.imm = $urandom();
      if (i < 48) begin
        t.rd = 5'd1; t.rs1 = 5'd1; t.use_imm = (i % 2 == 0);
      end else begin
        // here: own counters (not aliased) and reading the chain's register,
        // so they are steered to the slow cluster while their operand is
        // produced in the fast one
        t.pc = 32'h0000_3000 + 32'(4 * i);
        t.rd = 5'(5 + i % 16); t.rs1 = 5'd1; t.use_imm = 1'b1;
      end
      body2[i] = t;
    end
  endtask

  function automatic instr_t next_instr();
    instr_t t;
    logic [31:0] a, b, v;
    t = (generated < BODY * ITERS) ? body[generated % BODY] : body2[generated % BODY];
    a = model_rf[t.rs1];
    b = t.use_imm ? t.imm : model_rf[t.rs2];
    v = ref_alu(t.op, a, b);
    model_rf[t.rd] = v;
    exp_pc.push_back(t.pc);
    exp_rd.push_back(t.rd);
    exp_val.push_back(v);
    generated++;
    return t;
  endfunction

  // ---- stimulus and checking, once per cycle at the falling edge -------------
  initial begin
    for (int r = 0; r < 32; r++) model_rf[r] = 0;
    for (int s = 0; s < DW; s++) begin in_valid[s] = 0; in_instr[s] = '0; end
    build_body();
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (committed < TOTAL) begin
      @(negedge clk);
      cycles++;
      // commits that happen at the next rising edge
      for (int i = 0; i < CW; i++) begin
        if (cm_valid[i]) begin
          checks++;
          if (exp_pc.size() == 0) begin
            failures++;
            $display("FAIL: unexpected commit pc=%h", cm_pc[i]);
          end else begin
            if (cm_pc[i] !== exp_pc[0] || cm_rd[i] !== exp_rd[0] || cm_value[i] !== exp_val[0]) begin
              failures++;
              if (failures < 10)
                $display("FAIL: commit #%0d pc=%h rd=%0d val=%h, expected pc=%h rd=%0d val=%h",
                         committed, cm_pc[i], cm_rd[i], cm_value[i], exp_pc[0], exp_rd[0], exp_val[0]);
            end
            void'(exp_pc.pop_front()); void'(exp_rd.pop_front()); void'(exp_val.pop_front());
          end
          committed++;
        end
      end
      // issue decisions
      for (int u = 0; u < NF_U; u++) if (fast_issue[u]) begin
        if (fast_req_crit[u]) n_cf++; else n_nf++;
        if (fast_req_byp[u]) n_byp++;
      end
      for (int u = 0; u < NS_U; u++) if (slow_issue[u]) begin
        if (slow_req_crit[u]) n_cs++; else n_ns++;
        if (slow_req_byp[u]) n_byp++;
      end
      if (qold_found) n_qold++;
      // the slow queue runs at half speed: never slow issues in two
      // consecutive cycles
      begin
        logic any_slow;
        any_slow = 1'b0;
        for (int u = 0; u < NS_U; u++) any_slow |= slow_issue[u];
        if (any_slow && prev_slow) n_b2b++;
        prev_slow = any_slow;
      end
      // no fallback between clusters: fast units only see predicted-critical
      // instructions and slow units only non-critical ones
      for (int u = 0; u < NF_U; u++) if (fast_issue[u] && !fast_req_crit[u]) n_wrong++;
      for (int u = 0; u < NS_U; u++) if (slow_issue[u] && slow_req_crit[u]) n_wrong++;
      if (!in_ready) n_full++;
      // next group: a random number of leading slots, sometimes none
      for (int s = 0; s < DW; s++) in_valid[s] = 0;
      if (in_ready && generated < TOTAL && $urandom_range(0, 7) != 0) begin
        int n;
        n = $urandom_range(1, DW);
        for (int s = 0; s < n; s++)
          if (generated < TOTAL) begin
            in_instr[s] = next_instr();
            in_valid[s] = 1;
          end
      end
      // inter-cluster dependences of the group just presented
      #1;
      for (int s = 0; s < DW; s++) if (in_valid[s] && in_ready && ins_cross[s]) n_cross++;
    end
    checks++;
    if (exp_pc.size() != 0) begin failures++; $display("FAIL: %0d instructions never committed", exp_pc.size()); end
    // every mechanism must have been exercised
    checks += 8;
    if (n_b2b != 0)  begin failures++; $display("FAIL: slow queue issued in %0d back-to-back cycles", n_b2b); end
    if (n_cf == 0)   begin failures++; $display("FAIL: no critical->fast issue"); end
    if (n_wrong != 0) begin failures++; $display("FAIL: %0d issues crossed clusters", n_wrong); end
    if (n_cross == 0) begin failures++; $display("FAIL: no inter-cluster dependence"); end
    if (n_ns == 0)   begin failures++; $display("FAIL: no non-critical->slow issue"); end
    if (n_byp == 0)  begin failures++; $display("FAIL: no bypass at issue"); end
    if (n_qold == 0) begin failures++; $display("FAIL: no QOLD marking"); end
    if (n_full == 0) begin failures++; $display("FAIL: queues never full"); end
    $display("cycles=%0d committed=%0d IPC=%0.2f CF=%0d CS=%0d NF=%0d NS=%0d bypass=%0d qold=%0d full=%0d cross=%0d",
             cycles, committed, real'(committed) / real'(cycles), n_cf, n_cs, n_nf, n_ns, n_byp, n_qold, n_full, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d cycles, committed=%0d", WATCHDOG, committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
