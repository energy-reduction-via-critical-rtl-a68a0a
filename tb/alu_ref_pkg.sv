// alu_ref_pkg: reference model of the integer operations, written
// independently of the RTL, for the testbenches.
package alu_ref_pkg;
  import cpp_pkg::*;

  function automatic logic [31:0] ref_alu(alu_op_t op, logic [31:0] a, logic [31:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a + ~b + 32'd1;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      OP_SRA:  return (a >> b[4:0]) | (a[31] ? ~(32'hffff_ffff >> b[4:0]) : 32'd0);
      OP_SLT:  return ((a[31] ^ b[31]) ? a[31] : (a < b)) ? 32'd1 : 32'd0;
      OP_SLTU: return (a < b) ? 32'd1 : 32'd0;
      default: return 32'hdead_beef;
    endcase
  endfunction
endpackage
