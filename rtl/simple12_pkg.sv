// simple12_pkg: types and constants shared by the Simple-12 processor.
//
// Simple-12 is a 12-bit accumulator machine with 8-bit addresses. An
// instruction word holds a 4-bit opcode in bits 11:8 and an 8-bit operand
// address in bits 7:0. The processor is microprogrammed: a 6-bit
// microaddress (Q, whose middle four bits double as the instruction
// register) selects one 23-bit microinstruction from a 64-word control
// store. This package holds the opcode encoding, the microinstruction
// layout and the encodings of its fields, all as the Simple-12 definition
// gives them; only the names of the enum members are this design's own.
package simple12_pkg;

  localparam int unsigned DATA_W   = 12;  // word width
  localparam int unsigned ADDR_W   = 8;   // memory address width
  localparam int unsigned UADDR_W  = 6;   // microaddress width
  localparam int unsigned UWORDS   = 64;  // control store depth
  localparam int unsigned UINSTR_W = 23;  // microinstruction width

  // Instruction set (bits 11:8 of an instruction word).
  typedef enum logic [3:0] {
    OP_JMP   = 4'b0000,
    OP_JN    = 4'b0001,
    OP_JZ    = 4'b0010,
    OP_LOAD  = 4'b0100,
    OP_STORE = 4'b0101,
    OP_AND   = 4'b1000,
    OP_OR    = 4'b1001,
    OP_ADD   = 4'b1010,
    OP_SUB   = 4'b1011
  } opcode_e;

  // Condition Select field: which condition drives the sequencer's LD/EN.
  // 1 means "load Q with the selected address", 0 means "increment Q".
  typedef enum logic [2:0] {
    CS_FALSE    = 3'b000,
    CS_TRUE     = 3'b001,
    CS_NOT_A11  = 3'b010,
    CS_NOT_ZERO = 3'b011,
    CS_NOT_START= 3'b100
  } cond_sel_e;

  // Address Select field: 0 takes Next Adr, 1 builds {1, DataIn(11:8), 0}.
  typedef enum logic {
    AS_NEXT   = 1'b0,
    AS_OPCODE = 1'b1
  } addr_sel_e;

  // b MUX field: source of the ALU's b input.
  typedef enum logic [1:0] {
    BM_ZERO = 2'b00,
    BM_MDR  = 2'b10,
    BM_PC   = 2'b11
  } bmux_e;

  // ALU operation select, the two low bits of the ALU field.
  typedef enum logic [1:0] {
    ALU_AND = 2'b00,
    ALU_OR  = 2'b01,
    ALU_ADD = 2'b10
  } alu_op_e;

  // ALU field: {b-invert, carry-in, op1, op0}.
  typedef struct packed {
    logic    b_invert;
    logic    carry_in;
    alu_op_e op;
  } alu_ctl_t;

  // Control bits that go from the control store to the dataflow.
  typedef struct packed {
    logic     load_a;
    logic     load_pc;
    logic     load_mar;
    logic     load_mdr;
    alu_ctl_t alu;
    bmux_e    b_mux;
    logic     a_gate;
    logic     read;
    logic     write;
  } ctrl_t;

  // One microinstruction, fields in the order of the template, MSB first:
  // CondSel(3) AddrSel(1) NextAdr(6) LoadA LoadPC LoadMAR LoadMDR ALU(4)
  // bMUX(2) aGate Read Write = 23 bits.
  typedef struct packed {
    cond_sel_e           cond_sel;
    addr_sel_e           addr_sel;
    logic [UADDR_W-1:0]  next_adr;
    ctrl_t               ctrl;
  } uinstr_t;

  // Microaddresses with a fixed role.
  localparam logic [UADDR_W-1:0] UA_STOPPED = 6'b000000;
  localparam logic [UADDR_W-1:0] UA_IFETCH  = 6'b000001;

endpackage
