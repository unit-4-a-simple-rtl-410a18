// simple12_cpu: the microprogrammed Simple-12 processor.
//
// The control unit is a microsequencer (the Q/IR register and its
// next-address logic) and a 64-word control store; the dataflow is the
// datapath with A, PC, MAR, MDR and the ALU. Each cycle the control store
// turns Q into one microinstruction whose control bits drive the datapath
// and the memory Read/Write lines, and whose Condition Select, Address
// Select and Next Adr fields, together with start, A(11), the ALU zero test
// and DataIn(11:8), decide the next Q.
//
// Interface: start is a level. The processor sits in Stopped (PC = 0) while
// start is 0 and runs from address 0 once it is 1. The memory interface is
// address/read/write/data_out/data_in with single-cycle reads
// (combinational DataIn). JMP/JN/JZ take 2 cycles when not taken and JMP 2,
// JN/JZ 3 when taken; LOAD, AND, OR, ADD, SUB take 4 and STORE 3.
//
// This organization follows the Simple-12 microprogrammed design; the
// observation outputs (acc, pc, upc, ir, stopped) are this design's.
module simple12_cpu
  import simple12_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // memory interface
  output logic [ADDR_W-1:0]  address,
  output logic               read,
  output logic               write,
  output logic [DATA_W-1:0]  data_out,
  input  logic [DATA_W-1:0]  data_in,
  // observation
  output logic [DATA_W-1:0]  acc,
  output logic [ADDR_W-1:0]  pc,
  output logic [UADDR_W-1:0] upc,
  output logic [3:0]         ir,
  output logic               stopped
);

  uinstr_t uinstr;
  logic    a11, alu_zero;

  microsequencer u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .cond_sel  (uinstr.cond_sel),
    .addr_sel  (uinstr.addr_sel),
    .next_adr  (uinstr.next_adr),
    .opcode_in (data_in[DATA_W-1 -: 4]),
    .start     (start),
    .a11       (a11),
    .alu_zero  (alu_zero),
    .q         (upc),
    .ir        (ir)
  );

  control_store u_cs (
    .addr   (upc),
    .uinstr (uinstr)
  );

  datapath u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (uinstr.ctrl),
    .data_in  (data_in),
    .address  (address),
    .data_out (data_out),
    .a11      (a11),
    .alu_zero (alu_zero),
    .acc      (acc),
    .pc       (pc)
  );

  assign read    = uinstr.ctrl.read;
  assign write   = uinstr.ctrl.write;
  assign stopped = (upc == UA_STOPPED);

  // The dataflow never reads and writes memory in the same cycle.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(read && write));

endmodule
