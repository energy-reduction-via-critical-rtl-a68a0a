// qold_detector: QOLD criticality heuristic for a register update unit.
//
// QOLD marks as critical the oldest instruction in the instruction queue.
// In an RUU, finished instructions stay until they commit, so the search is
// over entries that are valid and not yet dispatched to a functional unit:
// the oldest of those is the instruction the machine is waiting on. Age is
// position in the circular RUU counted from its head. Both the heuristic and
// the exclusion of dispatched instructions follow the document; the rotate
// plus priority-encoder circuit is this design's choice. ENTRIES need not be
// a power of two.
//
// Interface: valid/dispatched flags per RUU entry and the head pointer in;
// found and the entry index out, combinationally in the same cycle.
module qold_detector #(
  parameter int unsigned ENTRIES = 64,
  localparam int unsigned IDXW   = $clog2(ENTRIES)
) (
  input  logic            valid      [ENTRIES],
  input  logic            dispatched [ENTRIES],
  input  logic [IDXW-1:0] head,
  output logic            found,
  output logic [IDXW-1:0] idx
);
  always_comb begin
    logic [IDXW-1:0] e;
    found = 1'b0;
    idx   = '0;
    // Walk from the youngest position to the oldest so that the last match
    // written is the oldest one.
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      e = IDXW'((int'(head) + i) % ENTRIES);
      if (valid[e] && !dispatched[e]) begin
        found = 1'b1;
        idx   = e;
      end
    end
  end
endmodule
