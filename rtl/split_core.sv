// split_core: clustered variant of the criticality-steered core, with the
// instruction queue split into a fast queue and a slow queue.
//
// Splitting the queue lets the slow queue, one of the most power-hungry
// structures, run at the low voltage too. The CPP buffer's prediction now
// chooses the queue when an instruction is inserted: predicted-critical
// instructions enter the fast cluster (fast queue + fast units), the rest
// the slow cluster (slow queue + slow units). There is no fallback to the
// other cluster's units. A result crossing between clusters arrives one
// cycle later than inside a cluster (inter-cluster bypass delay). Insertion
// stalls when either queue is short of room. Renaming, the register file,
// commit in program order (merging the two queues by sequence number), QOLD
// (the oldest undispatched instruction of either queue) and CPP training are
// shared and work as in crit_core.
//
// From the document: the split, its 16fastQ/48slowQ configuration (the one it
// found the better trade-off), 3 fast / 3 slow units, the 1-cycle bypass
// delay, the stall rule, entries held until commit. This design's choices:
// the slow queue runs at half speed (it issues only every second cycle, with
// SLOW_Q_HALF=1, the default), which the document names as the main cost of
// the split; a group is accepted only when each queue has DISPATCH_W free
// entries; one clock for everything (so the synchronising delay that an
// unpipelined slow cluster would add in its own clock domain is not
// modelled; SLOW_PIPELINED=0 only halves the slow units' throughput).
//
// Interface: as crit_core, plus ins_cross[s], set when the instruction in
// slot s of an accepted group reads a value still in flight in the other
// cluster (an inter-cluster dependence).
module split_core
  import cpp_pkg::*;
#(
  parameter int unsigned FAST_Q         = 16,
  parameter int unsigned SLOW_Q         = 48,
  parameter int unsigned DISPATCH_W     = 8,
  parameter int unsigned COMMIT_W       = 8,
  parameter int unsigned N_FAST         = 3,
  parameter int unsigned N_SLOW         = 3,
  parameter bit          SLOW_PIPELINED = 1'b1,
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
  output logic            cpp_ready
);
  localparam int unsigned FW  = $clog2(FAST_Q);
  localparam int unsigned SW  = $clog2(SLOW_Q);
  localparam int unsigned NFU = N_FAST + N_SLOW;
  localparam int unsigned PW  = $clog2(COMMIT_W + 1);

  // ---- CPP buffer -------------------------------------------------------------
  logic [PCW-1:0] lk_pc    [DISPATCH_W];
  logic           lk_crit  [DISPATCH_W];
  logic           up_valid [COMMIT_W];
  logic [PCW-1:0] up_pc    [COMMIT_W];
  logic           up_crit  [COMMIT_W];

  cpp_buffer #(
    .ENTRIES(CPP_ENTRIES), .CTR_BITS(CPP_CTR_BITS), .THRESH(CPP_THRESH),
    .LOOKUP_PORTS(DISPATCH_W), .UPDATE_PORTS(COMMIT_W)
  ) u_cpp (
    .clk, .rst_n, .lk_pc(lk_pc), .lk_crit(lk_crit),
    .up_valid(up_valid), .up_pc(up_pc), .up_crit(up_crit), .init_done(cpp_ready)
  );

  // ---- functional units and result buses ----------------------------------------
  fu_req_t fast_req [N_FAST];
  fu_res_t fast_res [N_FAST];
  logic    fast_rdy [N_FAST];
  fu_req_t slow_req [N_SLOW];
  fu_res_t slow_res [N_SLOW];
  logic    slow_rdy [N_SLOW];
  fu_res_t f2s_q    [N_FAST];   // fast results, one cycle late, for the slow cluster
  fu_res_t s2f_q    [N_SLOW];   // slow results, one cycle late, for the fast cluster
  fu_res_t bus      [NFU];      // all results as they appear

  for (genvar u = 0; u < N_FAST; u++) begin : g_fast
    fast_fu u_fu (.clk, .rst_n, .req(fast_req[u]), .ready(fast_rdy[u]), .res(fast_res[u]));
    assign fast_issue[u] = fast_req[u].valid;
  end
  for (genvar u = 0; u < N_SLOW; u++) begin : g_slow
    slow_fu #(.PIPELINED(SLOW_PIPELINED)) u_fu (
      .clk, .rst_n, .req(slow_req[u]), .ready(slow_rdy[u]), .res(slow_res[u]));
    assign slow_issue[u] = slow_req[u].valid;
  end

  always_comb begin
    for (int k = 0; k < N_FAST; k++) bus[k]          = fast_res[k];
    for (int k = 0; k < N_SLOW; k++) bus[N_FAST + k] = slow_res[k];
  end

  // inter-cluster bypass delay
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_FAST; k++) f2s_q[k] <= '0;
      for (int k = 0; k < N_SLOW; k++) s2f_q[k] <= '0;
    end else begin
      f2s_q <= fast_res;
      s2f_q <= slow_res;
    end
  end

  // ---- the two queues -------------------------------------------------------------
  logic            f_ins_v [DISPATCH_W], s_ins_v [DISPATCH_W];
  iq_ins_t         ins     [DISPATCH_W];
  logic [FW-1:0]   f_tail;
  logic [SW-1:0]   s_tail;
  logic [FW:0]     f_free;
  logic [SW:0]     s_free;
  logic            f_hv [COMMIT_W], f_hd [COMMIT_W], f_hm [COMMIT_W];
  seq_t            f_hs [COMMIT_W];
  logic [PCW-1:0]  f_hp [COMMIT_W];
  logic [REGW-1:0] f_hr [COMMIT_W];
  logic [XLEN-1:0] f_hx [COMMIT_W];
  logic            s_hv [COMMIT_W], s_hd [COMMIT_W], s_hm [COMMIT_W];
  seq_t            s_hs [COMMIT_W];
  logic [PCW-1:0]  s_hp [COMMIT_W];
  logic [REGW-1:0] s_hr [COMMIT_W];
  logic [XLEN-1:0] s_hx [COMMIT_W];
  logic [PW-1:0]   f_pop, s_pop;
  logic            f_done [FAST_Q], s_done [SLOW_Q];
  logic [XLEN-1:0] f_res  [FAST_Q], s_res  [SLOW_Q];
  logic            f_qf, s_qf, f_qm, s_qm;
  seq_t            f_qs, s_qs;

  cluster_queue #(.ENTRIES(FAST_Q), .DW(DISPATCH_W), .CW(COMMIT_W), .N_UNITS(N_FAST),
                  .N_REM(N_SLOW), .CLUSTER(1'b0)) u_fq (
    .clk, .rst_n, .ins_valid(f_ins_v), .ins(ins), .tail(f_tail), .free_cnt(f_free),
    .loc_bus(fast_res), .rem_bus(s2f_q),
    .req(fast_req), .req_byp(fast_req_byp), .req_crit(fast_req_crit), .unit_rdy(fast_rdy),
    .hd_valid(f_hv), .hd_done(f_hd), .hd_seq(f_hs), .hd_pc(f_hp), .hd_rd(f_hr),
    .hd_result(f_hx), .hd_mark(f_hm), .pop(f_pop),
    .e_done(f_done), .e_result(f_res), .qold_found(f_qf), .qold_seq(f_qs), .qold_mark(f_qm));

  cluster_queue #(.ENTRIES(SLOW_Q), .DW(DISPATCH_W), .CW(COMMIT_W), .N_UNITS(N_SLOW),
                  .N_REM(N_FAST), .CLUSTER(1'b1), .HALF_RATE(SLOW_Q_HALF)) u_sq (
    .clk, .rst_n, .ins_valid(s_ins_v), .ins(ins), .tail(s_tail), .free_cnt(s_free),
    .loc_bus(slow_res), .rem_bus(f2s_q),
    .req(slow_req), .req_byp(slow_req_byp), .req_crit(slow_req_crit), .unit_rdy(slow_rdy),
    .hd_valid(s_hv), .hd_done(s_hd), .hd_seq(s_hs), .hd_pc(s_hp), .hd_rd(s_hr),
    .hd_result(s_hx), .hd_mark(s_hm), .pop(s_pop),
    .e_done(s_done), .e_result(s_res), .qold_found(s_qf), .qold_seq(s_qs), .qold_mark(s_qm));

  // ---- architectural state ------------------------------------------------------------
  logic [XLEN-1:0] rf    [NREGS];
  logic            map_v [NREGS];
  tag_t            map_t [NREGS];
  seq_t            seq_head, seq_tail;   // oldest in flight, next to allocate

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

  // ---- insert: choose the cluster, rename, resolve operands ------------------------------
  assign in_ready = (32'(f_free) >= 32'(DISPATCH_W)) && (32'(s_free) >= 32'(DISPATCH_W));

  int unsigned n_insert;
  tag_t        new_tag [DISPATCH_W];

  always_comb begin
    logic        lv [NREGS];
    tag_t        lt [NREGS];
    logic        ln [NREGS];
    int unsigned nf, ns;
    tag_t        my;
    logic [REGW-1:0] src;
    opnd_t           o;
    logic            pdone;
    logic [XLEN-1:0] pres;
    src = '0; o = '0; pdone = 1'b0; pres = '0;
    for (int r = 0; r < NREGS; r++) begin lv[r] = map_v[r]; lt[r] = map_t[r]; ln[r] = 1'b0; end
    nf = 0; ns = 0; n_insert = 0;
    for (int s = 0; s < DISPATCH_W; s++) begin
      lk_pc[s]     = in_instr[s].pc;
      f_ins_v[s]   = 1'b0;
      s_ins_v[s]   = 1'b0;
      ins[s]       = '0;
      ins_cross[s] = 1'b0;
      my           = '0;
      new_tag[s]   = '0;
      if (in_valid[s] && in_ready) begin
        if (lk_crit[s]) begin
          my = tag_t'({1'b0, 7'((int'(f_tail) + nf) % FAST_Q)});
          f_ins_v[s] = 1'b1; nf++;
        end else begin
          my = tag_t'({1'b1, 7'((int'(s_tail) + ns) % SLOW_Q)});
          s_ins_v[s] = 1'b1; ns++;
        end
        ins[s].seq       = seq_t'(seq_tail + seq_t'(n_insert));
        ins[s].crit_pred = lk_crit[s];
        ins[s].pc        = in_instr[s].pc;
        ins[s].op        = in_instr[s].op;
        ins[s].rd        = in_instr[s].rd;
        for (int k = 0; k < 2; k++) begin
          src = (k == 0) ? in_instr[s].rs1 : in_instr[s].rs2;
          o.tag = lt[src];
          if (lt[src][TAGW-1]) begin
            pdone = s_done[int'(lt[src][6:0]) % SLOW_Q];
            pres  = s_res [int'(lt[src][6:0]) % SLOW_Q];
          end else begin
            pdone = f_done[int'(lt[src][6:0]) % FAST_Q];
            pres  = f_res [int'(lt[src][6:0]) % FAST_Q];
          end
          if (!lv[src]) begin
            o.rdy = 1'b1; o.val = rf[src];
          end else if (!ln[src] && pdone) begin
            o.rdy = 1'b1; o.val = pres;
          end else if (!ln[src] && bus_hit(bus, lt[src])) begin
            o.rdy = 1'b1; o.val = bus_val(bus, lt[src]);
          end else begin
            o.rdy = 1'b0; o.val = '0;
          end
          if (k == 1 && in_instr[s].use_imm) begin
            o.rdy = 1'b1; o.tag = '0; o.val = in_instr[s].imm;
          end
          // a source still in flight in the other cluster
          if (lv[src] && !(k == 1 && in_instr[s].use_imm) && !(!ln[src] && pdone) &&
              lt[src][TAGW-1] != my[TAGW-1])
            ins_cross[s] = 1'b1;
          if (k == 0) ins[s].s1 = o; else ins[s].s2 = o;
        end
        new_tag[s] = my;
        lv[in_instr[s].rd] = 1'b1;
        lt[in_instr[s].rd] = my;
        ln[in_instr[s].rd] = 1'b1;
        n_insert++;
      end
    end
  end

  // The head of a queue is (tail + free) modulo its size.
  // ---- commit: merge the queue heads back into program order -------------------------------
  tag_t        cm_tag [COMMIT_W];
  int unsigned n_commit;

  always_comb begin
    int unsigned kf, ks;
    logic        go;
    seq_t        want;
    kf = 0; ks = 0; go = 1'b1; n_commit = 0;
    for (int i = 0; i < COMMIT_W; i++) begin
      want = seq_t'(seq_head + seq_t'(i));
      cm_valid[i] = 1'b0; cm_pc[i] = '0; cm_rd[i] = '0; cm_value[i] = '0; cm_tag[i] = '0;
      up_crit[i]  = 1'b0;
      if (go && kf < COMMIT_W && f_hv[kf] && f_hs[kf] == want) begin
        go = f_hd[kf];
        cm_valid[i] = go; cm_pc[i] = f_hp[kf]; cm_rd[i] = f_hr[kf]; cm_value[i] = f_hx[kf];
        up_crit[i]  = f_hm[kf];
        cm_tag[i]   = tag_t'({1'b0, 7'((int'(f_tail) + int'(f_free) + int'(kf)) % FAST_Q)});
        if (go) kf++;
      end else if (go && ks < COMMIT_W && s_hv[ks] && s_hs[ks] == want) begin
        go = s_hd[ks];
        cm_valid[i] = go; cm_pc[i] = s_hp[ks]; cm_rd[i] = s_hr[ks]; cm_value[i] = s_hx[ks];
        up_crit[i]  = s_hm[ks];
        cm_tag[i]   = tag_t'({1'b1, 7'((int'(s_tail) + int'(s_free) + int'(ks)) % SLOW_Q)});
        if (go) ks++;
      end else begin
        go = 1'b0;
      end
      up_valid[i] = cm_valid[i];
      up_pc[i]    = cm_pc[i];
      if (cm_valid[i]) n_commit++;
    end
    f_pop = PW'(kf);
    s_pop = PW'(ks);
  end

  // ---- QOLD over both queues: the older of the two candidates --------------------------
  always_comb begin
    seq_t fa, sa;
    fa = f_qs - seq_head;
    sa = s_qs - seq_head;
    f_qm = f_qf && (!s_qf || fa < sa);
    s_qm = s_qf && !f_qm;
  end
  assign qold_found = f_qf || s_qf;

  // ---- architectural state update ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_head <= '0;
      seq_tail <= '0;
      for (int r = 0; r < NREGS; r++) begin rf[r] <= '0; map_v[r] <= 1'b0; map_t[r] <= '0; end
    end else begin
      for (int i = 0; i < COMMIT_W; i++)
        if (cm_valid[i]) begin
          rf[cm_rd[i]] <= cm_value[i];
          if (map_v[cm_rd[i]] && map_t[cm_rd[i]] == cm_tag[i]) map_v[cm_rd[i]] <= 1'b0;
        end
      for (int s = 0; s < DISPATCH_W; s++)
        if (f_ins_v[s] || s_ins_v[s]) begin
          map_v[in_instr[s].rd] <= 1'b1;
          map_t[in_instr[s].rd] <= new_tag[s];
        end
      seq_head <= seq_t'(seq_head + seq_t'(n_commit));
      seq_tail <= seq_t'(seq_tail + seq_t'(n_insert));
    end
  end
endmodule
