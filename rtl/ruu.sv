// ruu: register update unit with criticality-steered issue.
//
// The RUU is the processor's centralised instruction window and reorder
// buffer in one circular queue. Each cycle it
//   * inserts up to DISPATCH_W decoded instructions at the tail, renaming
//     their source registers to the RUU entries that produce them and
//     recording the CPP buffer's criticality prediction for each;
//   * wakes up waiting operands from the result buses of all functional
//     units, and bypasses a result to an instruction issuing in the very
//     cycle the result appears;
//   * issues up to ISSUE_W ready instructions, oldest first, through
//     crit_steer: predicted-critical ones to fast units, the others to slow
//     units, each falling back to the other kind when its own is taken;
//   * marks the QOLD instruction (oldest not yet dispatched) as critical;
//   * commits up to COMMIT_W finished instructions in order from the head,
//     writes the architectural register file and trains the CPP buffer:
//     counter up if the instruction was ever the QOLD instruction, down
//     otherwise.
// An instruction keeps its entry after issue until it commits.
//
// From the document: 64 entries, 8-wide insert/issue/commit, 32 32-bit
// integer registers, QOLD training, the steering rule. This design's own
// choices: only integer ALU instructions are handled (no loads, stores or
// branches, which belong to the rest of the processor); training happens at
// commit; a group is accepted only when DISPATCH_W entries are free; all 32
// registers are ordinary registers; ENTRIES must be a power of two.
//
// Timing: an instruction inserted in cycle t can issue in t+1. A fast unit's
// result is on its bus one cycle after issue and a dependant can issue in
// that cycle (back-to-back); a slow unit's result comes two cycles after
// issue. An entry commits no earlier than the cycle after its result bus.
module ruu
  import cpp_pkg::*;
#(
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned DISPATCH_W = 8,
  parameter int unsigned ISSUE_W    = 8,
  parameter int unsigned COMMIT_W   = 8,
  parameter int unsigned N_FAST     = 3,
  parameter int unsigned N_SLOW     = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  // decoded instructions in
  input  logic            in_valid [DISPATCH_W],
  input  instr_t          in_instr [DISPATCH_W],
  output logic            in_ready,
  // CPP buffer lookup (combinational) and training
  output logic [PCW-1:0]  lk_pc    [DISPATCH_W],
  input  logic            lk_crit  [DISPATCH_W],
  output logic            up_valid [COMMIT_W],
  output logic [PCW-1:0]  up_pc    [COMMIT_W],
  output logic            up_crit  [COMMIT_W],
  // functional units
  output fu_req_t         fast_req   [N_FAST],
  input  logic            fast_ready [N_FAST],
  input  fu_res_t         fast_res   [N_FAST],
  output fu_req_t         slow_req   [N_SLOW],
  input  logic            slow_ready [N_SLOW],
  input  fu_res_t         slow_res   [N_SLOW],
  // observation of issue decisions
  output logic            fast_req_crit [N_FAST],  // prediction of the op issued to the unit
  output logic            slow_req_crit [N_SLOW],
  output logic            fast_req_byp  [N_FAST],  // an operand came off a result bus
  output logic            slow_req_byp  [N_SLOW],
  output logic            qold_found,
  output logic [$clog2(ENTRIES)-1:0] qold_idx,
  // commit
  output logic            cm_valid [COMMIT_W],
  output logic [PCW-1:0]  cm_pc    [COMMIT_W],
  output logic [REGW-1:0] cm_rd    [COMMIT_W],
  output logic [XLEN-1:0] cm_value [COMMIT_W]
);
  localparam int unsigned IDXW = $clog2(ENTRIES);
  localparam int unsigned NFU  = N_FAST + N_SLOW;
  typedef logic [IDXW-1:0] idx_t;

  typedef struct packed {
    logic            rdy;
    tag_t            tag;
    logic [XLEN-1:0] val;
  } opnd_t;

  typedef struct packed {
    logic            valid;
    logic            issued;
    logic            done;
    logic            crit_pred;  // CPP prediction at insertion
    logic            crit_mark;  // was the QOLD instruction at some point
    logic [PCW-1:0]  pc;
    alu_op_t         op;
    logic [REGW-1:0] rd;
    opnd_t           s1;
    opnd_t           s2;
    logic [XLEN-1:0] result;
  } entry_t;

  entry_t          ent   [ENTRIES];
  idx_t            head, tail;
  logic [IDXW:0]   count;
  logic [XLEN-1:0] rf    [NREGS];
  logic            map_v [NREGS];
  tag_t            map_t [NREGS];

  // ---- result buses ---------------------------------------------------------
  fu_res_t bus [NFU];
  always_comb begin
    for (int k = 0; k < N_FAST; k++) bus[k]          = fast_res[k];
    for (int k = 0; k < N_SLOW; k++) bus[N_FAST + k] = slow_res[k];
  end

  function automatic logic bus_hit(fu_res_t b [NFU], tag_t t);
    logic h;
    h = 1'b0;
    for (int k = 0; k < NFU; k++) if (b[k].valid && b[k].tag == t) h = 1'b1;
    return h;
  endfunction

  function automatic logic [XLEN-1:0] bus_val(fu_res_t b [NFU], tag_t t);
    logic [XLEN-1:0] v;
    v = '0;
    for (int k = 0; k < NFU; k++) if (b[k].valid && b[k].tag == t) v = b[k].value;
    return v;
  endfunction

  // ---- operand availability with bypass --------------------------------------
  logic            e_rdy  [ENTRIES];
  logic            e_byp  [ENTRIES];
  logic [XLEN-1:0] e_a    [ENTRIES];
  logic [XLEN-1:0] e_b    [ENTRIES];

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      logic h1, h2;
      h1 = !ent[e].s1.rdy && bus_hit(bus, ent[e].s1.tag);
      h2 = !ent[e].s2.rdy && bus_hit(bus, ent[e].s2.tag);
      e_a[e]   = h1 ? bus_val(bus, ent[e].s1.tag) : ent[e].s1.val;
      e_b[e]   = h2 ? bus_val(bus, ent[e].s2.tag) : ent[e].s2.val;
      e_byp[e] = h1 || h2;
      e_rdy[e] = ent[e].valid && !ent[e].issued &&
                 (ent[e].s1.rdy || h1) && (ent[e].s2.rdy || h2);
    end
  end

  // ---- select and steer -------------------------------------------------------
  logic  a_rdy [ENTRIES];
  logic  a_crit[ENTRIES];
  logic  fast_go [N_FAST];
  idx_t  fast_pos[N_FAST];
  logic  slow_go [N_SLOW];
  idx_t  slow_pos[N_SLOW];
  idx_t  fast_e  [N_FAST];
  idx_t  slow_e  [N_SLOW];

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      a_rdy[i]  = e_rdy[idx_t'(head + idx_t'(i))];
      a_crit[i] = ent[idx_t'(head + idx_t'(i))].crit_pred;
    end
  end

  crit_steer #(.N(ENTRIES), .N_FAST(N_FAST), .N_SLOW(N_SLOW), .ISSUE_W(ISSUE_W)) u_steer (
    .rdy(a_rdy), .crit(a_crit), .fast_free(fast_ready), .slow_free(slow_ready),
    .fast_go(fast_go), .fast_pos(fast_pos), .slow_go(slow_go), .slow_pos(slow_pos)
  );

  always_comb begin
    for (int u = 0; u < N_FAST; u++) begin
      fast_e[u]        = head + fast_pos[u];
      fast_req[u].valid = fast_go[u];
      fast_req[u].op    = ent[fast_e[u]].op;
      fast_req[u].a     = e_a[fast_e[u]];
      fast_req[u].b     = e_b[fast_e[u]];
      fast_req[u].tag   = tag_t'(fast_e[u]);
      fast_req_crit[u]  = fast_go[u] && ent[fast_e[u]].crit_pred;
      fast_req_byp[u]   = fast_go[u] && e_byp[fast_e[u]];
    end
    for (int u = 0; u < N_SLOW; u++) begin
      slow_e[u]        = head + slow_pos[u];
      slow_req[u].valid = slow_go[u];
      slow_req[u].op    = ent[slow_e[u]].op;
      slow_req[u].a     = e_a[slow_e[u]];
      slow_req[u].b     = e_b[slow_e[u]];
      slow_req[u].tag   = tag_t'(slow_e[u]);
      slow_req_crit[u]  = slow_go[u] && ent[slow_e[u]].crit_pred;
      slow_req_byp[u]   = slow_go[u] && e_byp[slow_e[u]];
    end
  end

  // ---- QOLD -----------------------------------------------------------------
  logic e_valid [ENTRIES];
  logic e_disp  [ENTRIES];
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      e_valid[e] = ent[e].valid;
      e_disp[e]  = ent[e].issued;
    end
  end

  qold_detector #(.ENTRIES(ENTRIES)) u_qold (
    .valid(e_valid), .dispatched(e_disp), .head(head), .found(qold_found), .idx(qold_idx)
  );

  // ---- commit -----------------------------------------------------------------
  int unsigned n_commit;
  always_comb begin
    logic go;
    idx_t e;
    go = 1'b1;
    n_commit = 0;
    for (int i = 0; i < COMMIT_W; i++) begin
      e  = head + idx_t'(i);
      go = go && ent[e].valid && ent[e].done;
      cm_valid[i] = go;
      cm_pc[i]    = ent[e].pc;
      cm_rd[i]    = ent[e].rd;
      cm_value[i] = ent[e].result;
      up_valid[i] = go;
      up_pc[i]    = ent[e].pc;
      up_crit[i]  = ent[e].crit_mark;
      if (go) n_commit++;
    end
  end

  // ---- insert -----------------------------------------------------------------
  int unsigned n_insert;
  entry_t      new_ent [DISPATCH_W];
  idx_t        new_idx [DISPATCH_W];

  assign in_ready = (32'(ENTRIES) - 32'(count)) >= 32'(DISPATCH_W);

  function automatic opnd_t resolve(logic [REGW-1:0] r, logic lv [NREGS], tag_t lt [NREGS],
                                    logic ln [NREGS]);
    opnd_t o;
    idx_t  p;
    o.tag = lt[r];
    p     = idx_t'(lt[r]);
    if (!lv[r]) begin
      o.rdy = 1'b1; o.val = rf[r];
    end else if (ln[r]) begin            // producer in the same insert group
      o.rdy = 1'b0; o.val = '0;
    end else if (ent[p].done) begin
      o.rdy = 1'b1; o.val = ent[p].result;
    end else if (bus_hit(bus, lt[r])) begin
      o.rdy = 1'b1; o.val = bus_val(bus, lt[r]);
    end else begin
      o.rdy = 1'b0; o.val = '0;
    end
    return o;
  endfunction

  always_comb begin
    logic lv [NREGS];
    tag_t lt [NREGS];
    logic ln [NREGS];
    for (int r = 0; r < NREGS; r++) begin lv[r] = map_v[r]; lt[r] = map_t[r]; ln[r] = 1'b0; end
    n_insert = 0;
    for (int s = 0; s < DISPATCH_W; s++) begin
      lk_pc[s]   = in_instr[s].pc;
      new_idx[s] = tail + idx_t'(n_insert);
      new_ent[s] = '0;
      if (in_valid[s]) begin
        new_ent[s].valid     = 1'b1;
        new_ent[s].crit_pred = lk_crit[s];
        new_ent[s].pc        = in_instr[s].pc;
        new_ent[s].op        = in_instr[s].op;
        new_ent[s].rd        = in_instr[s].rd;
        new_ent[s].s1        = resolve(in_instr[s].rs1, lv, lt, ln);
        if (in_instr[s].use_imm) begin
          new_ent[s].s2.rdy = 1'b1;
          new_ent[s].s2.tag = '0;
          new_ent[s].s2.val = in_instr[s].imm;
        end else begin
          new_ent[s].s2 = resolve(in_instr[s].rs2, lv, lt, ln);
        end
        lv[in_instr[s].rd] = 1'b1;
        lt[in_instr[s].rd] = tag_t'(new_idx[s]);
        ln[in_instr[s].rd] = 1'b1;
        n_insert++;
      end
    end
  end

  // ---- state update --------------------------------------------------------------
  logic accept;
  assign accept = in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int e = 0; e < ENTRIES; e++) ent[e] <= '0;
      for (int r = 0; r < NREGS; r++) begin rf[r] <= '0; map_v[r] <= 1'b0; map_t[r] <= '0; end
    end else begin
      // writeback and wakeup
      for (int e = 0; e < ENTRIES; e++) begin
        if (ent[e].valid) begin
          if (bus_hit(bus, tag_t'(e))) begin
            ent[e].done   <= 1'b1;
            ent[e].result <= bus_val(bus, tag_t'(e));
          end
          if (!ent[e].s1.rdy && bus_hit(bus, ent[e].s1.tag)) begin
            ent[e].s1.rdy <= 1'b1;
            ent[e].s1.val <= bus_val(bus, ent[e].s1.tag);
          end
          if (!ent[e].s2.rdy && bus_hit(bus, ent[e].s2.tag)) begin
            ent[e].s2.rdy <= 1'b1;
            ent[e].s2.val <= bus_val(bus, ent[e].s2.tag);
          end
        end
      end
      // issue
      for (int u = 0; u < N_FAST; u++) if (fast_go[u]) ent[fast_e[u]].issued <= 1'b1;
      for (int u = 0; u < N_SLOW; u++) if (slow_go[u]) ent[slow_e[u]].issued <= 1'b1;
      // QOLD mark
      if (qold_found) ent[qold_idx].crit_mark <= 1'b1;
      // commit
      for (int i = 0; i < COMMIT_W; i++) begin
        if (cm_valid[i]) begin
          ent[idx_t'(head + idx_t'(i))].valid <= 1'b0;
          rf[cm_rd[i]] <= cm_value[i];
          if (map_v[cm_rd[i]] && map_t[cm_rd[i]] == tag_t'(idx_t'(head + idx_t'(i))))
            map_v[cm_rd[i]] <= 1'b0;
        end
      end
      // insert (after commit so that a new mapping wins over a clear)
      if (accept) begin
        for (int s = 0; s < DISPATCH_W; s++) begin
          if (in_valid[s]) begin
            ent[new_idx[s]]        <= new_ent[s];
            map_v[in_instr[s].rd]  <= 1'b1;
            map_t[in_instr[s].rd]  <= tag_t'(new_idx[s]);
          end
        end
      end
      head  <= head + idx_t'(n_commit);
      tail  <= tail + idx_t'(accept ? n_insert : 0);
      count <= count + (IDXW+1)'(accept ? n_insert : 0) - (IDXW+1)'(n_commit);
    end
  end

  // An issued entry must be valid and not issued before.
  for (genvar u = 0; u < N_FAST; u++) begin : g_af
    a_fast_issue_ok: assert property (@(posedge clk) disable iff (!rst_n)
      fast_go[u] |-> ent[fast_e[u]].valid && !ent[fast_e[u]].issued);
  end
  for (genvar u = 0; u < N_SLOW; u++) begin : g_as
    a_slow_issue_ok: assert property (@(posedge clk) disable iff (!rst_n)
      slow_go[u] |-> ent[slow_e[u]].valid && !ent[slow_e[u]].issued && slow_ready[u]);
  end
endmodule
