// cpp_buffer: critical path prediction (CPP) buffer.
//
// A direct-mapped table of saturating up/down counters indexed by a hash of
// the program counter. An instruction whose counter has reached THRESH is
// predicted critical and is steered to a fast functional unit; otherwise it
// goes to a slow one. Training moves a counter up by one when the instruction
// was found critical (QOLD heuristic) and down by one otherwise, saturating at
// 0 and 2**CTR_BITS-1.
//
// From the document: 3-bit counters, threshold 5, a direct-mapped table with
// 4K entries in the main configuration (64K down to 4K were evaluated), a hash
// of the PC feeding a decoder. This design's choices: the hash takes the PC
// bits just above the 4-byte instruction alignment; "exceeds the threshold"
// is read as counter >= THRESH; after reset the table is cleared to 0 by a
// sweep of one counter per cycle (ENTRIES cycles, init_done then rises),
// during which every lookup answers non-critical and training is ignored.
// The table has no per-counter reset so that it can be built as a RAM.
//
// Interface and timing:
//   lookup: LOOKUP_PORTS combinational read ports, lk_pc -> lk_crit in the
//           same cycle. A lookup sees the table as it was before this
//           cycle's updates.
//   update: UPDATE_PORTS write ports, applied at the clock edge. Several
//           updates to one counter in one cycle take effect one after the
//           other, in port order, exactly as if they came in separate cycles.
module cpp_buffer
  import cpp_pkg::*;
#(
  parameter int unsigned ENTRIES      = 4096,
  parameter int unsigned CTR_BITS     = 3,
  parameter int unsigned THRESH       = 5,
  parameter int unsigned LOOKUP_PORTS = 8,
  parameter int unsigned UPDATE_PORTS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // prediction
  input  logic [PCW-1:0]       lk_pc   [LOOKUP_PORTS],
  output logic                 lk_crit [LOOKUP_PORTS],
  // training
  input  logic                 up_valid[UPDATE_PORTS],
  input  logic [PCW-1:0]       up_pc   [UPDATE_PORTS],
  input  logic                 up_crit [UPDATE_PORTS],  // 1: increment, 0: decrement
  output logic                 init_done                // table cleared after reset
);
  localparam int unsigned IDXW = $clog2(ENTRIES);
  localparam logic [CTR_BITS-1:0] CMAX = '1;

  typedef logic [IDXW-1:0]     idx_t;
  typedef logic [CTR_BITS-1:0] ctr_t;

  ctr_t ctr [ENTRIES];

  // PC hash: instructions are 4-byte aligned, so the two low bits carry no
  // information; the next IDXW bits select the counter.
  function automatic idx_t hash(logic [PCW-1:0] pc);
    return pc[2 +: IDXW];
  endfunction

  function automatic ctr_t step(ctr_t c, logic up);
    if (up) return (c == CMAX) ? c : c + 1'b1;
    else    return (c == '0)   ? c : c - 1'b1;
  endfunction

  idx_t clr_idx;
  logic clearing;

  // ---- prediction -------------------------------------------------------
  always_comb begin
    for (int p = 0; p < LOOKUP_PORTS; p++)
      lk_crit[p] = !clearing && ctr[hash(lk_pc[p])] >= ctr_t'(THRESH);
  end

  // ---- training -----------------------------------------------------------
  // new_val[p] is the counter after ports 0..p have been applied to it.
  idx_t up_idx  [UPDATE_PORTS];
  ctr_t new_val [UPDATE_PORTS];

  always_comb begin
    for (int p = 0; p < UPDATE_PORTS; p++) begin
      up_idx[p]  = hash(up_pc[p]);
      new_val[p] = ctr[up_idx[p]];
      for (int q = 0; q <= p; q++)
        if (up_valid[q] && hash(up_pc[q]) == up_idx[p])
          new_val[p] = step(new_val[p], up_crit[q]);
    end
  end

  // After reset the table is cleared one counter per cycle; training is
  // ignored until the sweep is done.

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_idx  <= '0;
      clearing <= 1'b1;
    end else if (clearing) begin
      clr_idx  <= clr_idx + 1'b1;
      if (clr_idx == idx_t'(ENTRIES - 1)) clearing <= 1'b0;
    end
  end

  assign init_done = !clearing;

  // Later ports overwrite earlier ones to the same counter; the later value
  // already includes the earlier steps.
  always_ff @(posedge clk) begin
    if (clearing) begin
      ctr[clr_idx] <= '0;
    end else begin
      for (int p = 0; p < UPDATE_PORTS; p++)
        if (up_valid[p]) ctr[up_idx[p]] <= new_val[p];
    end
  end
endmodule
