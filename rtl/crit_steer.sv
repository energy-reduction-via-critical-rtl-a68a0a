// crit_steer: oldest-first select with criticality steering.
//
// Candidates arrive in age order (position 0 is the oldest instruction in the
// RUU). Walking from the oldest, each ready instruction is given a functional
// unit: a predicted-critical instruction takes a free fast unit and a
// non-critical one a free slow unit; when no unit of the preferred kind is
// free, the instruction takes a free unit of the other kind (the centralised
// queue keeps that flexibility). Selection stops when ISSUE_W instructions
// have been chosen or no unit is left. The steering rule and fallback follow
// the document; oldest-first priority and lowest-numbered-unit-first
// allocation are this design's choices.
//
// Interface (all combinational):
//   rdy/crit[N]           per age position: operands available / predicted critical
//   fast_free, slow_free  per unit: can accept an operation this cycle
//   fast_go/fast_pos      per fast unit: issue this cycle, from age position
//   slow_go/slow_pos      likewise for slow units
module crit_steer #(
  parameter int unsigned N       = 64,
  parameter int unsigned N_FAST  = 3,
  parameter int unsigned N_SLOW  = 3,
  parameter int unsigned ISSUE_W = 8,
  localparam int unsigned POSW   = $clog2(N)
) (
  input  logic            rdy       [N],
  input  logic            crit      [N],
  input  logic            fast_free [N_FAST],
  input  logic            slow_free [N_SLOW],
  output logic            fast_go   [N_FAST],
  output logic [POSW-1:0] fast_pos  [N_FAST],
  output logic            slow_go   [N_SLOW],
  output logic [POSW-1:0] slow_pos  [N_SLOW]
);
  always_comb begin
    int unsigned issued;
    logic        placed;
    issued = 0;
    placed = 1'b0;
    for (int u = 0; u < N_FAST; u++) begin fast_go[u] = 1'b0; fast_pos[u] = '0; end
    for (int u = 0; u < N_SLOW; u++) begin slow_go[u] = 1'b0; slow_pos[u] = '0; end

    for (int i = 0; i < N; i++) begin
      if (rdy[i] && issued < ISSUE_W) begin
        placed = 1'b0;
        // preferred kind first
        if (crit[i]) begin
          for (int u = 0; u < N_FAST; u++)
            if (!placed && fast_free[u] && !fast_go[u]) begin
              fast_go[u] = 1'b1; fast_pos[u] = POSW'(i); placed = 1'b1;
            end
        end else begin
          for (int u = 0; u < N_SLOW; u++)
            if (!placed && slow_free[u] && !slow_go[u]) begin
              slow_go[u] = 1'b1; slow_pos[u] = POSW'(i); placed = 1'b1;
            end
        end
        // fallback to the other kind
        if (crit[i]) begin
          for (int u = 0; u < N_SLOW; u++)
            if (!placed && slow_free[u] && !slow_go[u]) begin
              slow_go[u] = 1'b1; slow_pos[u] = POSW'(i); placed = 1'b1;
            end
        end else begin
          for (int u = 0; u < N_FAST; u++)
            if (!placed && fast_free[u] && !fast_go[u]) begin
              fast_go[u] = 1'b1; fast_pos[u] = POSW'(i); placed = 1'b1;
            end
        end
        if (placed) issued++;
      end
    end
  end
endmodule
