// crit_core: out-of-order integer execution core that saves energy by
// executing non-critical instructions on slow, low-voltage functional units.
//
// Only instructions on the program's critical path determine its execution
// time; the others can run slower without lengthening it. The core predicts
// criticality per static instruction with the CPP buffer, a PC-indexed table
// of saturating counters trained by the QOLD heuristic (the oldest
// instruction still waiting in the RUU is critical). Predicted-critical
// instructions issue to fast units (1-cycle latency, high voltage); the rest
// to slow units (2-cycle latency, low voltage and clock), with fallback to
// the other kind when all units of the preferred kind are taken.
//
// Main configuration of the document: 64-entry RUU, 8-wide, 3 fast and 3
// slow pipelined integer units, 4K-entry CPP buffer with 3-bit counters and
// threshold 5. Everything here runs on one clock; the slow units' lower
// clock and voltage appear only as their 2-cycle latency. Level converters
// between the supply domains have no logic function and are not modelled.
//
// CLUSTERED=1 selects the split-queue variant instead (split_core): a
// FAST_Q-entry fast queue and a SLOW_Q-entry slow queue, each feeding only
// its own units, the slow queue issuing every second cycle (SLOW_Q_HALF).
// The document evaluates it and finds the execution-time cost
// larger than the queue-energy saving, so the central RUU is the default.
//
// Interface: a group of up to DISPATCH_W decoded integer instructions is
// accepted when in_ready is 1; committed instructions leave in order on
// cm_* (up to COMMIT_W per cycle). The *_req_crit, *_issue and *_byp outputs
// report each cycle's issue decisions (which unit kind, what prediction,
// whether a result was bypassed), for counting NS/CS/NF/CF dispatches;
// ins_cross (split variant only, else 0) flags instructions that depend on
// a value in flight in the other cluster.
// For CPP_ENTRIES cycles after reset the CPP buffer clears itself and
// predicts every instruction non-critical; cpp_ready then rises. The core
// runs correctly meanwhile, only without criticality steering.
module crit_core
  import cpp_pkg::*;
#(
  parameter int unsigned ENTRIES        = 64,
  parameter int unsigned DISPATCH_W     = 8,
  parameter int unsigned ISSUE_W        = 8,
  parameter int unsigned COMMIT_W       = 8,
  parameter int unsigned N_FAST         = 3,
  parameter int unsigned N_SLOW         = 3,
  parameter bit          SLOW_PIPELINED = 1'b1,
  parameter bit          CLUSTERED      = 1'b0,
  parameter int unsigned FAST_Q         = 16,
  parameter int unsigned SLOW_Q         = 48,
  parameter bit          SLOW_Q_HALF    = 1'b1,
  parameter int unsigned CPP_ENTRIES    = 4096,
  parameter int unsigned CPP_CTR_BITS   = 3,
  parameter int unsigned CPP_THRESH     = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid [DISPATCH_W],
  input  instr_t          in_instr [DISPATCH_W],
  output logic            in_ready,
  output logic            cm_valid [COMMIT_W],
  output logic [PCW-1:0]  cm_pc    [COMMIT_W],
  output logic [REGW-1:0] cm_rd    [COMMIT_W],
  output logic [XLEN-1:0] cm_value [COMMIT_W],
  output logic            fast_issue    [N_FAST],
  output logic            fast_req_crit [N_FAST],
  output logic            fast_req_byp  [N_FAST],
  output logic            slow_issue    [N_SLOW],
  output logic            slow_req_crit [N_SLOW],
  output logic            slow_req_byp  [N_SLOW],
  output logic            ins_cross     [DISPATCH_W],
  output logic            qold_found,
  output logic            cpp_ready       // CPP buffer cleared after reset
);
  if (CLUSTERED) begin : g_split
    split_core #(
      .FAST_Q(FAST_Q), .SLOW_Q(SLOW_Q), .DISPATCH_W(DISPATCH_W), .COMMIT_W(COMMIT_W),
      .N_FAST(N_FAST), .N_SLOW(N_SLOW), .SLOW_PIPELINED(SLOW_PIPELINED),
      .SLOW_Q_HALF(SLOW_Q_HALF),
      .CPP_ENTRIES(CPP_ENTRIES), .CPP_CTR_BITS(CPP_CTR_BITS), .CPP_THRESH(CPP_THRESH)
    ) u_split (.*);
  end else begin : g_central

  logic [PCW-1:0] lk_pc    [DISPATCH_W];
  logic           lk_crit  [DISPATCH_W];
  logic           up_valid [COMMIT_W];
  logic [PCW-1:0] up_pc    [COMMIT_W];
  logic           up_crit  [COMMIT_W];

  fu_req_t fast_req [N_FAST];
  fu_res_t fast_res [N_FAST];
  logic    fast_rdy [N_FAST];
  fu_req_t slow_req [N_SLOW];
  fu_res_t slow_res [N_SLOW];
  logic    slow_rdy [N_SLOW];
  logic [$clog2(ENTRIES)-1:0] qold_idx;

  cpp_buffer #(
    .ENTRIES(CPP_ENTRIES), .CTR_BITS(CPP_CTR_BITS), .THRESH(CPP_THRESH),
    .LOOKUP_PORTS(DISPATCH_W), .UPDATE_PORTS(COMMIT_W)
  ) u_cpp (
    .clk, .rst_n, .lk_pc(lk_pc), .lk_crit(lk_crit),
    .up_valid(up_valid), .up_pc(up_pc), .up_crit(up_crit), .init_done(cpp_ready)
  );

  ruu #(
    .ENTRIES(ENTRIES), .DISPATCH_W(DISPATCH_W), .ISSUE_W(ISSUE_W), .COMMIT_W(COMMIT_W),
    .N_FAST(N_FAST), .N_SLOW(N_SLOW)
  ) u_ruu (
    .clk, .rst_n,
    .in_valid, .in_instr, .in_ready,
    .lk_pc, .lk_crit, .up_valid, .up_pc, .up_crit,
    .fast_req, .fast_ready(fast_rdy), .fast_res,
    .slow_req, .slow_ready(slow_rdy), .slow_res,
    .fast_req_crit, .slow_req_crit, .fast_req_byp, .slow_req_byp,
    .qold_found, .qold_idx,
    .cm_valid, .cm_pc, .cm_rd, .cm_value
  );

  for (genvar u = 0; u < N_FAST; u++) begin : g_fast
    fast_fu u_fu (.clk, .rst_n, .req(fast_req[u]), .ready(fast_rdy[u]), .res(fast_res[u]));
    assign fast_issue[u] = fast_req[u].valid;
  end

  for (genvar u = 0; u < N_SLOW; u++) begin : g_slow
    slow_fu #(.PIPELINED(SLOW_PIPELINED)) u_fu (
      .clk, .rst_n, .req(slow_req[u]), .ready(slow_rdy[u]), .res(slow_res[u]));
    assign slow_issue[u] = slow_req[u].valid;
  end

  always_comb for (int s = 0; s < DISPATCH_W; s++) ins_cross[s] = 1'b0;
  end
endmodule
