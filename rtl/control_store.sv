// control_store: the 64-word Simple-12 microprogram ROM.
//
// The microaddress Q selects one 23-bit microinstruction, read
// combinationally, so the word for the current state is valid throughout
// the cycle. The contents are written as a case table over the address.
//
// Layout of the microaddress space:
//   000000        Stopped: PC <- MAR <- 0; stay here while start = 0.
//   000001        IFetch: Read, MDR <- DataIn, PC <- MAR <- PC + 1 and a
//                 multiway branch to 1wxyz0, where wxyz = DataIn(11:8).
//   1wxyz0/1wxyz1 the first two microinstructions of opcode wxyz; the first
//                 is its EAGen step.
//   01wxyz        an overflow word for opcode 1wxyz0 when two are not enough
//                 (used by LOAD and the four operate instructions).
//
// Microprograms (cycles include IFetch):
//   JMP   100000 PC <- MAR <- MDR(7:0)                               2
//   JN    100010 if A(11) = 0 go to IFetch, else fall through to      2/3
//         100011 PC <- MAR <- MDR(7:0)
//   JZ    100100 ALU <- A + 0; if ALU /= 0 go to IFetch, else         2/3
//         100101 PC <- MAR <- MDR(7:0)
//   LOAD  101000 MAR <- MDR(7:0)                                      4
//         101001 Read, MDR <- DataIn, MAR <- PC; go to 010100
//         010100 A <- MDR
//   STORE 101010 MAR <- MDR(7:0)                                      3
//         101011 Write (DataOut = A), MAR <- PC
//   AND/OR/ADD/SUB 11xy00 MAR <- MDR(7:0)                             4
//         11xy01 Read, MDR <- DataIn, MAR <- PC; go to 0110xy
//         0110xy A <- A op MDR (ALU 0000, 0001, 0010, 1110)
//
// The encodings and every microinstruction the Simple-12 microprogram
// prints are taken as printed, with three choices of this design:
//  - The operand-access words (101001, 101011, 11xy01) also do MAR <- PC,
//    as the register-transfer description of OperandAccess asks; without it
//    the next IFetch would read from the operand address.
//  - JZ's test word drives a = A, b = 0, ADD so that "ALU = 0" tests A = 0;
//    field values left open are otherwise zero.
//  - Every unused word (reserved opcodes included) returns to Stopped.
module control_store
  import simple12_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,
  output uinstr_t            uinstr
);

  // Assemble one microinstruction from its fields, in template order.
  function automatic uinstr_t uw(cond_sel_e cs, addr_sel_e as, logic [5:0] next,
                                 logic la, logic lpc, logic lmar, logic lmdr,
                                 logic [3:0] alu4, bmux_e bm, logic ag,
                                 logic rd, logic wr);
    uinstr_t u;
    u.cond_sel      = cs;
    u.addr_sel      = as;
    u.next_adr      = next;
    u.ctrl.load_a   = la;
    u.ctrl.load_pc  = lpc;
    u.ctrl.load_mar = lmar;
    u.ctrl.load_mdr = lmdr;
    u.ctrl.alu      = alu_ctl_t'(alu4);
    u.ctrl.b_mux    = bm;
    u.ctrl.a_gate   = ag;
    u.ctrl.read     = rd;
    u.ctrl.write    = wr;
    return u;
  endfunction

  always_comb begin
    unique case (addr)
      //                               cond          asel       next       LA LPC LMAR LMDR ALU    bMUX     aG Rd Wr
      6'b000000: uinstr = uw(CS_NOT_START, AS_NEXT,   6'b000000, 0, 1, 1, 0, 4'b0010, BM_ZERO, 0, 0, 0);
      6'b000001: uinstr = uw(CS_TRUE,      AS_OPCODE, 6'b000000, 0, 1, 1, 1, 4'b0110, BM_PC,   0, 1, 0);
      // JMP
      6'b100000: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 0, 1, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      // JN
      6'b100010: uinstr = uw(CS_NOT_A11,   AS_NEXT,   UA_IFETCH, 0, 0, 0, 0, 4'b0000, BM_ZERO, 0, 0, 0);
      6'b100011: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 0, 1, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      // JZ
      6'b100100: uinstr = uw(CS_NOT_ZERO,  AS_NEXT,   UA_IFETCH, 0, 0, 0, 0, 4'b0010, BM_ZERO, 1, 0, 0);
      6'b100101: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 0, 1, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      // LOAD
      6'b101000: uinstr = uw(CS_FALSE,     AS_NEXT,   6'b000000, 0, 0, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      6'b101001: uinstr = uw(CS_TRUE,      AS_NEXT,   6'b010100, 0, 0, 1, 1, 4'b0010, BM_PC,   0, 1, 0);
      6'b010100: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 1, 0, 0, 0, 4'b0010, BM_MDR,  0, 0, 0);
      // STORE
      6'b101010: uinstr = uw(CS_FALSE,     AS_NEXT,   6'b000000, 0, 0, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      6'b101011: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 0, 0, 1, 0, 4'b0010, BM_PC,   0, 0, 1);
      // AND, OR, ADD, SUB: EAGen at 11xy00, operand access at 11xy01
      6'b110000, 6'b110010,
      6'b110100, 6'b110110:
                 uinstr = uw(CS_FALSE,     AS_NEXT,   6'b000000, 0, 0, 1, 0, 4'b0010, BM_MDR,  0, 0, 0);
      6'b110001, 6'b110011,
      6'b110101, 6'b110111:
                 uinstr = uw(CS_TRUE,      AS_NEXT,   {4'b0110, addr[2:1]},
                                                                 0, 0, 1, 1, 4'b0010, BM_PC,   0, 1, 0);
      // execute steps in the overflow area
      6'b011000: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 1, 0, 0, 0, 4'b0000, BM_MDR,  1, 0, 0);
      6'b011001: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 1, 0, 0, 0, 4'b0001, BM_MDR,  1, 0, 0);
      6'b011010: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 1, 0, 0, 0, 4'b0010, BM_MDR,  1, 0, 0);
      6'b011011: uinstr = uw(CS_TRUE,      AS_NEXT,   UA_IFETCH, 1, 0, 0, 0, 4'b1110, BM_MDR,  1, 0, 0);
      // unused words, reserved opcodes included: back to Stopped
      default:   uinstr = uw(CS_TRUE,      AS_NEXT,   UA_STOPPED, 0, 0, 0, 0, 4'b0000, BM_ZERO, 0, 0, 0);
    endcase
  end

endmodule
