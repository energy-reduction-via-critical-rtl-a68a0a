// alu_core: combinational integer ALU shared by the fast and the slow units.
//
// Both kinds of functional unit use the same circuit; they differ only in
// supply voltage, clock and the number of cycles they are given, so the logic
// lives here once and fast_fu / slow_fu wrap it with their own timing. The
// operation set (add, subtract, logic, shifts, compares) is this design's
// choice of "most integer operations".
module alu_core
  import cpp_pkg::*;
(
  input  alu_op_t         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  logic [4:0] sh;
  assign sh = b[4:0];

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SLL:  y = a << sh;
      OP_SRL:  y = a >> sh;
      OP_SRA:  y = $unsigned($signed(a) >>> sh);
      OP_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      OP_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      default: y = '0;
    endcase
  end
endmodule
