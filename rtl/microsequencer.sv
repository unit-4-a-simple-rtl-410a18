// microsequencer: next-microaddress logic of the Simple-12 control unit.
//
// Q is a 6-bit register holding the current microaddress. Every cycle the
// Condition Select field of the current microinstruction picks one of
// false, true, ~A(11), ~(ALU = 0) or ~start. When the picked condition is 1,
// Q is loaded from the address MUX; when it is 0, Q is incremented. The
// address MUX, steered by Address Select, gives either the Next Adr field
// or {1, DataIn(11:8), 0}: the latter is the multiway branch of IFetch,
// which also captures the opcode being read from memory, so that bits 4:1
// of Q act as the instruction register IR.
//
// Timing: Q changes on the rising clock edge; rst_n (asynchronous) puts Q
// at Stopped (000000). The structure, the condition codes and the address
// construction follow the Simple-12 sequencing logic. Unassigned condition
// codes (101 to 111) read as false here, and the reset is this design's
// own.
module microsequencer
  import simple12_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cond_sel_e          cond_sel,
  input  addr_sel_e          addr_sel,
  input  logic [UADDR_W-1:0] next_adr,
  input  logic [3:0]         opcode_in,  // DataIn(11:8)
  input  logic               start,
  input  logic               a11,
  input  logic               alu_zero,
  output logic [UADDR_W-1:0] q,          // current microaddress
  output logic [3:0]         ir          // Q(4:1)
);

  logic               ld;
  logic [UADDR_W-1:0] target;

  always_comb begin
    unique case (cond_sel)
      CS_FALSE:     ld = 1'b0;
      CS_TRUE:      ld = 1'b1;
      CS_NOT_A11:   ld = ~a11;
      CS_NOT_ZERO:  ld = ~alu_zero;
      CS_NOT_START: ld = ~start;
      default:      ld = 1'b0;
    endcase
    target = (addr_sel == AS_OPCODE) ? {1'b1, opcode_in, 1'b0} : next_adr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= UA_STOPPED;
    else if (ld) q <= target;
    else         q <= q + 1'b1;
  end

  assign ir = q[4:1];

endmodule
