// cluster_queue_tb: one 16-entry cluster queue with three units modelled by
// the testbench (1-cycle latency, results on loc_bus). Inserted instructions
// read either a ready value, the result of an earlier entry of this queue,
// or a value from the other cluster that the testbench broadcasts on rem_bus
// a few cycles later. Checked: operands delivered at issue, no issue before
// an operand exists, results and program order at the head, pop and
// free-count bookkeeping; counted: local bypass, remote wakeup, queue full.
`timescale 1ns/1ps
module cluster_queue_tb;
  import cpp_pkg::*;
  import alu_ref_pkg::*;

  localparam int N = 16, DW = 8, CW = 8, NU = 3, NR = 3, TOTAL = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            ins_valid [DW];
  iq_ins_t         ins [DW];
  logic [3:0]      tail;
  logic [4:0]      free_cnt;
  fu_res_t         loc_bus [NU], rem_bus [NR];
  fu_req_t         req [NU];
  logic            req_byp [NU], req_crit [NU], unit_rdy [NU];
  logic            hd_valid [CW], hd_done [CW], hd_mark [CW];
  seq_t            hd_seq [CW];
  logic [31:0]     hd_pc [CW];
  logic [4:0]      hd_rd [CW];
  logic [31:0]     hd_result [CW];
  logic [3:0]      pop;
  logic            e_done [N];
  logic [31:0]     e_result [N];
  logic            qold_found, qold_mark;
  seq_t            qold_seq;

  cluster_queue dut (.*);

  // per sequence number: expected operands and result, readiness cycle
  logic [31:0] exp_a [256], exp_b [256], exp_r [256];
  alu_op_t     exp_op [256];
  int          avail_cyc [256];    // earliest cycle the operand can be used
  int          seq_of_idx [N];
  int          inserted = 0, committed = 0, cyc = 0;
  int          checks = 0, failures = 0, n_byp = 0, n_rem = 0, n_full = 0;
  // pending remote values: tag id, value, cycle to broadcast
  int          rem_id [$], rem_at [$];
  logic [31:0] rem_val [$];
  int          rem_next = 0;
  fu_req_t     issued [NU];   // issued at the coming edge; result on loc_bus a cycle later

  always_comb for (int u = 0; u < NU; u++) unit_rdy[u] = 1'b1;
  assign qold_mark = 1'b1;

  initial begin
    for (int s = 0; s < DW; s++) begin ins_valid[s] = 0; ins[s] = '0; end
    for (int k = 0; k < NU; k++) loc_bus[k] = '0;
    for (int k = 0; k < NR; k++) rem_bus[k] = '0;
    pop = 0;
    for (int u = 0; u < NU; u++) issued[u] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (committed < TOTAL) begin
      @(negedge clk);
      cyc++;
      // units: results of last cycle's issues
      for (int u = 0; u < NU; u++) begin
        int sq;
        loc_bus[u].valid = issued[u].valid;
        loc_bus[u].tag   = issued[u].tag;
        sq = seq_of_idx[issued[u].tag[3:0]];
        loc_bus[u].value = exp_r[sq];
      end
      // remote broadcasts due now
      for (int k = 0; k < NR; k++) rem_bus[k] = '0;
      for (int k = 0, j = 0; j < rem_id.size() && k < NR; ) begin
        if (rem_at[j] <= cyc) begin
          rem_bus[k] = '{valid: 1'b1, tag: tag_t'({1'b1, 7'(rem_id[j])}), value: rem_val[j]};
          rem_id.delete(j); rem_at.delete(j); rem_val.delete(j); k++; n_rem++;
        end else j++;
      end
      #1;
      // issue checks (requests settle after the bus change)
      for (int u = 0; u < NU; u++) if (req[u].valid) begin
        int sq;
        sq = seq_of_idx[req[u].tag[3:0]];
        checks++;
        if (req[u].a !== exp_a[sq] || req[u].b !== exp_b[sq] || req[u].op !== exp_op[sq] || cyc < avail_cyc[sq]) begin
          failures++;
          $display("FAIL: issue seq %0d a=%h b=%h (exp %h %h) at %0d, ready %0d", sq, req[u].a, req[u].b,
                   exp_a[sq], exp_b[sq], cyc, avail_cyc[sq]);
        end
        if (req_byp[u]) n_byp++;
      end
      for (int u = 0; u < NU; u++) issued[u] = req[u];
      // commit up to CW finished entries from the head, in order
      pop = 0;
      for (int k = 0; k < CW; k++) begin
        if (hd_valid[k] && hd_done[k] && int'(pop) == k) begin
          checks++;
          if (int'(hd_seq[k]) != committed % 256 || hd_result[k] !== exp_r[committed % 256]) begin
            failures++; $display("FAIL: head %0d seq=%0d result=%h", k, hd_seq[k], hd_result[k]);
          end
          pop++; committed++;
        end
      end
      // insert a group when there is room
      for (int s = 0; s < DW; s++) ins_valid[s] = 0;
      checks++;
      if (int'(free_cnt) != N - (inserted - committed + int'(pop))) begin
        failures++; $display("FAIL: free_cnt %0d", free_cnt);
      end
      if (free_cnt < 5'(DW)) n_full++;
      else if (inserted < TOTAL) begin
        int n;
        n = $urandom_range(0, 4);
        for (int s = 0; s < n; s++) if (inserted < TOTAL) begin
          int sq, idx, kind;
          iq_ins_t t;
          sq = inserted % 256; idx = (int'(tail) + s) % N;
          t = '0;
          t.seq = seq_t'(sq); t.pc = 32'(4 * inserted); t.rd = 5'(inserted % 32);
          t.op = alu_op_t'($urandom_range(0, 9));
          t.s2 = '{rdy: 1'b1, tag: '0, val: $urandom()};
          kind = $urandom_range(0, 2);
          avail_cyc[sq] = cyc + 1;
          if (kind == 1 && s > 0) begin
            // result of the previous instruction of this group (local producer)
            int pq;
            pq = (inserted - 1) % 256;
            t.s1 = '{rdy: 1'b0, tag: tag_t'({1'b0, 7'((int'(tail) + s - 1) % N)}), val: '0};
            exp_a[sq] = exp_r[pq];
          end else if (kind == 2) begin
            int d;
            d = $urandom_range(1, 6);
            t.s1 = '{rdy: 1'b0, tag: tag_t'({1'b1, 7'(rem_next)}), val: '0};
            exp_a[sq] = $urandom();
            rem_id.push_back(rem_next); rem_at.push_back(cyc + d); rem_val.push_back(exp_a[sq]);
            rem_next = (rem_next + 1) % 128;
            avail_cyc[sq] = cyc + d;
          end else begin
            t.s1 = '{rdy: 1'b1, tag: '0, val: $urandom()};
            exp_a[sq] = t.s1.val;
          end
          exp_b[sq] = t.s2.val; exp_op[sq] = t.op;
          exp_r[sq] = ref_alu(t.op, exp_a[sq], exp_b[sq]);
          seq_of_idx[idx] = sq;
          ins[s] = t; ins_valid[s] = 1;
          inserted++;
        end
      end
    end
    checks++;
    if (n_byp == 0 || n_rem == 0 || n_full == 0) begin
      failures++; $display("FAIL: coverage bypass=%0d remote=%0d full=%0d", n_byp, n_rem, n_full);
    end
    $display("bypass=%0d remote=%0d full=%0d cycles=%0d", n_byp, n_rem, n_full, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (inserted=%0d committed=%0d free=%0d head valid=%b done=%b seq=%0d)", inserted, committed, free_cnt, hd_valid[0], hd_done[0], hd_seq[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
