// cluster_queue: instruction queue of one cluster in the split-queue core.
//
// In the clustered variant the central RUU is split into a fast queue that
// feeds only the fast units and a slow queue that feeds only the slow units;
// each cluster sits in its own supply domain. Instructions enter a queue in
// program order (renamed operands supplied by split_core), wait for their
// operands, issue oldest first to a free unit of this cluster, and keep
// their entry until they commit. Results of this cluster's own units are
// seen at once (rem_bus is the other cluster's results, which split_core
// delivers one cycle late: the inter-cluster bypass delay). The entry holds
// a global sequence number so that split_core can merge the two queues back
// into program order at commit and find the oldest undispatched instruction
// of the whole machine for QOLD.
//
// From the document: the split into a fast and a slow queue, each with its
// own units, no fallback between clusters, entries held until commit, the
// 1-cycle inter-cluster bypass delay. This design's choices: the queue is
// circular (any size, not only powers of two) and allocates in order; tags
// are {CLUSTER, entry index}, so ENTRIES is at most 128. HALF_RATE=1 makes
// the queue select only every second cycle, as a queue clocked at half the
// core clock would (split_core sets it for the slow queue).
//
// Timing: an entry inserted in cycle t can issue in t+1; a local result on
// the bus in cycle r lets a dependant issue in r (bypass), a remote result
// in r+1.
module cluster_queue
  import cpp_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned DW      = 8,   // insert width
  parameter int unsigned CW      = 8,   // commit view width
  parameter int unsigned N_UNITS = 3,
  parameter int unsigned N_REM   = 3,   // result buses of the other cluster
  parameter bit          CLUSTER = 1'b0,
  parameter bit          HALF_RATE = 1'b0, // issue only every second cycle
  localparam int unsigned IDXW   = $clog2(ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  // insert, in program order, at the tail
  input  logic            ins_valid [DW],
  input  iq_ins_t         ins       [DW],
  output logic [IDXW-1:0] tail,
  output logic [IDXW:0]   free_cnt,
  // result buses
  input  fu_res_t         loc_bus [N_UNITS],
  input  fu_res_t         rem_bus [N_REM],
  // issue to this cluster's units
  output fu_req_t         req       [N_UNITS],
  output logic            req_byp   [N_UNITS],
  output logic            req_crit  [N_UNITS],
  input  logic            unit_rdy  [N_UNITS],
  // the oldest entries, for commit
  output logic            hd_valid  [CW],
  output logic            hd_done   [CW],
  output seq_t            hd_seq    [CW],
  output logic [PCW-1:0]  hd_pc     [CW],
  output logic [REGW-1:0] hd_rd     [CW],
  output logic [XLEN-1:0] hd_result [CW],
  output logic            hd_mark   [CW],
  input  logic [$clog2(CW+1)-1:0] pop,
  // producer state for renaming
  output logic            e_done    [ENTRIES],
  output logic [XLEN-1:0] e_result  [ENTRIES],
  // QOLD: oldest undispatched entry of this queue
  output logic            qold_found,
  output seq_t            qold_seq,
  input  logic            qold_mark
);
  localparam int unsigned NB = N_UNITS + N_REM;
  typedef logic [IDXW-1:0] idx_t;

  typedef struct packed {
    logic            valid;
    logic            issued;
    logic            done;
    logic            crit_mark;
    iq_ins_t         i;
    logic [XLEN-1:0] result;
  } qent_t;

  qent_t          ent [ENTRIES];
  idx_t           head;
  logic [IDXW:0]  count;
  fu_res_t        bus [NB];

  always_comb begin
    for (int k = 0; k < N_UNITS; k++) bus[k]           = loc_bus[k];
    for (int k = 0; k < N_REM; k++)   bus[N_UNITS + k] = rem_bus[k];
  end

  function automatic logic hit(fu_res_t b [NB], tag_t t);
    logic h;
    h = 1'b0;
    for (int k = 0; k < NB; k++) if (b[k].valid && b[k].tag == t) h = 1'b1;
    return h;
  endfunction

  function automatic logic [XLEN-1:0] val(fu_res_t b [NB], tag_t t);
    logic [XLEN-1:0] v;
    v = '0;
    for (int k = 0; k < NB; k++) if (b[k].valid && b[k].tag == t) v = b[k].value;
    return v;
  endfunction

  function automatic tag_t my_tag(idx_t e);
    return tag_t'({CLUSTER, 7'(e)});
  endfunction

  // position k places after entry e, around the circular queue
  function automatic idx_t wrap(idx_t e, int unsigned k);
    return idx_t'((int'(e) + k) % ENTRIES);
  endfunction

  assign tail     = wrap(head, int'(count));
  assign free_cnt = (IDXW+1)'(ENTRIES) - count;

  // ---- operand availability and bypass --------------------------------------
  logic            rdy_e [ENTRIES];
  logic            byp_e [ENTRIES];
  logic [XLEN-1:0] a_e   [ENTRIES];
  logic [XLEN-1:0] b_e   [ENTRIES];

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      logic h1, h2;
      h1 = !ent[e].i.s1.rdy && hit(bus, ent[e].i.s1.tag);
      h2 = !ent[e].i.s2.rdy && hit(bus, ent[e].i.s2.tag);
      a_e[e]   = h1 ? val(bus, ent[e].i.s1.tag) : ent[e].i.s1.val;
      b_e[e]   = h2 ? val(bus, ent[e].i.s2.tag) : ent[e].i.s2.val;
      byp_e[e] = h1 || h2;
      rdy_e[e] = ent[e].valid && !ent[e].issued &&
                 (ent[e].i.s1.rdy || h1) && (ent[e].i.s2.rdy || h2);
      e_done[e]   = ent[e].done;
      e_result[e] = ent[e].result;
    end
  end

  // ---- oldest-first select to this cluster's units ---------------------------
  // With HALF_RATE the queue sits in the half-speed clock domain and selects
  // only in the cycles where phase is 0, i.e. once per slow clock period.
  logic phase;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) phase <= 1'b0;
    else        phase <= HALF_RATE ? !phase : 1'b0;
  logic issue_ok;
  assign issue_ok = !phase;

  logic go  [N_UNITS];
  idx_t sel [N_UNITS];

  always_comb begin
    idx_t e;
    logic placed;
    placed = 1'b0;
    for (int u = 0; u < N_UNITS; u++) begin go[u] = 1'b0; sel[u] = '0; end
    for (int i = 0; i < ENTRIES; i++) begin
      e = wrap(head, i);
      placed = 1'b0;
      if (rdy_e[e] && issue_ok)
        for (int u = 0; u < N_UNITS; u++)
          if (!placed && unit_rdy[u] && !go[u]) begin
            go[u] = 1'b1; sel[u] = e; placed = 1'b1;
          end
    end
    for (int u = 0; u < N_UNITS; u++) begin
      req[u].valid = go[u];
      req[u].op    = ent[sel[u]].i.op;
      req[u].a     = a_e[sel[u]];
      req[u].b     = b_e[sel[u]];
      req[u].tag   = my_tag(sel[u]);
      req_byp[u]   = go[u] && byp_e[sel[u]];
      req_crit[u]  = go[u] && ent[sel[u]].i.crit_pred;
    end
  end

  // ---- QOLD candidate ---------------------------------------------------------
  logic v_e [ENTRIES];
  logic d_e [ENTRIES];
  idx_t q_idx;
  always_comb
    for (int e = 0; e < ENTRIES; e++) begin v_e[e] = ent[e].valid; d_e[e] = ent[e].issued; end

  qold_detector #(.ENTRIES(ENTRIES)) u_qold (
    .valid(v_e), .dispatched(d_e), .head(head), .found(qold_found), .idx(q_idx));
  assign qold_seq = ent[q_idx].i.seq;

  // ---- head view ---------------------------------------------------------------
  always_comb
    for (int k = 0; k < CW; k++) begin
      idx_t e;
      e = wrap(head, k);
      hd_valid[k]  = (k < count) && ent[e].valid;
      hd_done[k]   = ent[e].done;
      hd_seq[k]    = ent[e].i.seq;
      hd_pc[k]     = ent[e].i.pc;
      hd_rd[k]     = ent[e].i.rd;
      hd_result[k] = ent[e].result;
      hd_mark[k]   = ent[e].crit_mark;
    end

  // ---- insert positions: valid slots take consecutive entries from the tail ----
  logic [$clog2(DW+1)-1:0] ins_off [DW];
  logic [$clog2(DW+1)-1:0] n_ins;
  always_comb begin
    n_ins = '0;
    for (int s = 0; s < DW; s++) begin
      ins_off[s] = n_ins;
      if (ins_valid[s]) n_ins = n_ins + 1'b1;
    end
  end

  // ---- state ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
      for (int e = 0; e < ENTRIES; e++) ent[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) if (ent[e].valid) begin
        if (hit(bus, my_tag(idx_t'(e))) && !ent[e].done) begin
          ent[e].done   <= 1'b1;
          ent[e].result <= val(bus, my_tag(idx_t'(e)));
        end
        if (!ent[e].i.s1.rdy && hit(bus, ent[e].i.s1.tag)) begin
          ent[e].i.s1.rdy <= 1'b1;
          ent[e].i.s1.val <= val(bus, ent[e].i.s1.tag);
        end
        if (!ent[e].i.s2.rdy && hit(bus, ent[e].i.s2.tag)) begin
          ent[e].i.s2.rdy <= 1'b1;
          ent[e].i.s2.val <= val(bus, ent[e].i.s2.tag);
        end
      end
      for (int u = 0; u < N_UNITS; u++) if (go[u]) ent[sel[u]].issued <= 1'b1;
      if (qold_mark && qold_found) ent[q_idx].crit_mark <= 1'b1;
      for (int k = 0; k < CW; k++)
        if (k < int'(pop)) ent[wrap(head, k)].valid <= 1'b0;
      for (int s = 0; s < DW; s++)
        if (ins_valid[s])
          ent[wrap(tail, int'(ins_off[s]))] <= '{valid: 1'b1, issued: 1'b0, done: 1'b0,
                                                  crit_mark: 1'b0, i: ins[s], result: '0};
      head  <= wrap(head, int'(pop));
      count <= count + (IDXW+1)'(n_ins) - (IDXW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (IDXW+1)'(ENTRIES));
endmodule
