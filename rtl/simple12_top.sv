// simple12_top: the Simple-12 computer, processor and 256 x 12 memory.
//
// The processor's MAR addresses the memory; Read and Write come from the
// current microinstruction; A is the write data and the memory's read data
// is DataIn. The program is placed in the memory before start is raised;
// the machine then runs from address 0 until it meets a reserved opcode,
// which sends it back to Stopped (PC = 0).
//
// Ports: clk, rst_n (asynchronous, active low), start (level), and
// observation outputs: the accumulator, PC, the microaddress, IR, a
// stopped flag and the memory bus. Timing is that of simple12_cpu.
module simple12_top
  import simple12_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic [DATA_W-1:0]  acc,
  output logic [ADDR_W-1:0]  pc,
  output logic [UADDR_W-1:0] upc,
  output logic [3:0]         ir,
  output logic               stopped,
  output logic [ADDR_W-1:0]  mem_address,
  output logic               mem_read,
  output logic               mem_write,
  output logic [DATA_W-1:0]  mem_wdata,
  output logic [DATA_W-1:0]  mem_rdata
);

  simple12_cpu u_cpu (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .address  (mem_address),
    .read     (mem_read),
    .write    (mem_write),
    .data_out (mem_wdata),
    .data_in  (mem_rdata),
    .acc      (acc),
    .pc       (pc),
    .upc      (upc),
    .ir       (ir),
    .stopped  (stopped)
  );

  ram u_ram (
    .clk   (clk),
    .addr  (mem_address),
    .read  (mem_read),
    .write (mem_write),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

endmodule
