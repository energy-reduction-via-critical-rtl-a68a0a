// cpp_pkg: types and constants shared by the criticality-steered integer core.
//
// The core executes integer ALU instructions out of order in a register update
// unit (RUU). Each instruction carries a criticality prediction from the CPP
// buffer; predicted-critical instructions go to fast functional units and the
// rest to slow, low-voltage units. The data width (32 bits) and register count
// (32) follow the integer register file of the evaluated processor; the ALU
// operation set and its encoding are this design's own choice.
package cpp_pkg;

  localparam int unsigned XLEN     = 32;   // integer data width
  localparam int unsigned NREGS    = 32;   // architectural integer registers
  localparam int unsigned REGW     = $clog2(NREGS);
  localparam int unsigned PCW      = 32;   // program counter width

  // Integer operations executed by both kinds of functional unit.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_SLL  = 4'd5,
    OP_SRL  = 4'd6,
    OP_SRA  = 4'd7,
    OP_SLT  = 4'd8,
    OP_SLTU = 4'd9
  } alu_op_t;

  // A decoded integer instruction as it enters the RUU.
  typedef struct packed {
    logic [PCW-1:0]  pc;
    alu_op_t         op;
    logic [REGW-1:0] rd;
    logic [REGW-1:0] rs1;
    logic [REGW-1:0] rs2;
    logic            use_imm;  // second operand is imm instead of rs2
    logic [XLEN-1:0] imm;
  } instr_t;

  // Tags name the RUU entry that produces a value. Eight bits cover RUUs of
  // up to 256 entries.
  localparam int unsigned TAGW = 8;
  typedef logic [TAGW-1:0] tag_t;

  // One operation sent from the RUU to a functional unit.
  typedef struct packed {
    logic            valid;
    alu_op_t         op;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    tag_t            tag;
  } fu_req_t;

  // One result broadcast by a functional unit to the RUU.
  typedef struct packed {
    logic            valid;
    tag_t            tag;
    logic [XLEN-1:0] value;
  } fu_res_t;

  // A source operand held in an instruction queue entry: either its value
  // (rdy=1) or the tag of the entry that will produce it.
  typedef struct packed {
    logic            rdy;
    tag_t            tag;
    logic [XLEN-1:0] val;
  } opnd_t;

  // Program-order sequence numbers of the split-queue core. Eight bits cover
  // up to 128 instructions in flight.
  localparam int unsigned SEQW = 8;
  typedef logic [SEQW-1:0] seq_t;

  // An instruction written into one cluster's queue, operands already renamed.
  typedef struct packed {
    seq_t            seq;
    logic            crit_pred;
    logic [PCW-1:0]  pc;
    alu_op_t         op;
    logic [REGW-1:0] rd;
    opnd_t           s1;
    opnd_t           s2;
  } iq_ins_t;

endpackage
