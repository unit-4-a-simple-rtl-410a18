// ram: Simple-12 main memory, 256 words of 12 bits.
//
// One port, addressed by the processor's MAR. Reading is combinational:
// while read is 1, rdata shows the addressed word in the same cycle, so the
// processor can load MDR (and branch on the opcode bits) at the end of that
// cycle. While read is 0, rdata is zero. Writing is synchronous: when write
// is 1 the word at addr takes wdata at the rising clock edge. The memory
// array is not reset; a program is placed in it before start is raised.
//
// The size, the 8-bit address, the 12-bit data and the Read/Write/DataIn/
// DataOut signals follow the Simple-12 organization; the single-cycle
// asynchronous read is what its microprogram needs (Read and MDR <- DataIn
// in one microinstruction). Driving zero while not reading is this design's
// choice.
module ram
  import simple12_pkg::*;
#(
  parameter int unsigned WORDS = 2**ADDR_W,
  parameter int unsigned AW    = ADDR_W,
  parameter int unsigned DW    = DATA_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          read,
  input  logic          write,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (write) mem[addr] <= wdata;
  end

  assign rdata = read ? mem[addr] : '0;

endmodule
