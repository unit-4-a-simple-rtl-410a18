// simple12_cpu_tb: bus-level test of the Simple-12 processor.
//
// The processor runs against a memory model kept in this testbench
// (combinational read, write on the clock edge). For each instruction of a
// directed program the test counts memory reads and writes and the cycles
// from one IFetch to the next and compares them with the instruction's
// expected figures: JMP and not-taken JN/JZ 1 read and 2 cycles, taken
// JN/JZ 1 read and 3 cycles, LOAD and operate instructions 2 reads and 4
// cycles, STORE 1 read, 1 write and 3 cycles. It also checks that every
// instruction fetch reads the address held in PC and that each write puts A
// at the operand address, and checks the final accumulator and memory.
module simple12_cpu_tb;
  import simple12_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [7:0]  address, pc;
  logic        read, write, stopped;
  logic [11:0] data_out, data_in, acc;
  logic [5:0]  upc;
  logic [3:0]  ir;
  logic [11:0] mem [256];
  int          checks = 0, failures = 0;

  simple12_cpu dut (.clk(clk), .rst_n(rst_n), .start(start), .address(address), .read(read),
                    .write(write), .data_out(data_out), .data_in(data_in), .acc(acc), .pc(pc),
                    .upc(upc), .ir(ir), .stopped(stopped));

  always #5 clk = ~clk;
  assign data_in = read ? mem[address] : 12'h000;
  always @(posedge clk) if (write) mem[address] <= data_out;

  // expected per-instruction figures, in program order
  typedef struct { int cycles; int reads; int writes; } fig_t;
  fig_t exp_fig [$];

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, rd, wr, n;
    logic [7:0] fetch_pc;
    for (int i = 0; i < 256; i++) mem[i] = 12'h000;
    mem[8'hC0] = 12'h00F; mem[8'hC1] = 12'h0F0; mem[8'hC2] = 12'h001; mem[8'hC3] = 12'h800;
    mem[8'h00] = {4'b0100, 8'hC0};  // LOAD  C0      A = 00F
    mem[8'h01] = {4'b1001, 8'hC1};  // OR    C1      A = 0FF
    mem[8'h02] = {4'b1000, 8'hC1};  // AND   C1      A = 0F0
    mem[8'h03] = {4'b1010, 8'hC2};  // ADD   C2      A = 0F1
    mem[8'h04] = {4'b0101, 8'hD0};  // STORE D0
    mem[8'h05] = {4'b0010, 8'h20};  // JZ    20      not taken
    mem[8'h06] = {4'b0001, 8'h20};  // JN    20      not taken
    mem[8'h07] = {4'b1011, 8'hC1};  // SUB   C1      A = 001
    mem[8'h08] = {4'b1011, 8'hC2};  // SUB   C2      A = 000
    mem[8'h09] = {4'b0010, 8'h10};  // JZ    10      taken
    mem[8'h10] = {4'b1011, 8'hC2};  // SUB   C2      A = FFF
    mem[8'h11] = {4'b0001, 8'h18};  // JN    18      taken
    mem[8'h18] = {4'b0000, 8'h30};  // JMP   30
    mem[8'h30] = {4'b0101, 8'hD1};  // STORE D1
    mem[8'h31] = {4'b1100, 8'h00};  // reserved: stop
    exp_fig = '{'{4,2,0}, '{4,2,0}, '{4,2,0}, '{4,2,0}, '{3,1,1}, '{2,1,0}, '{2,1,0},
                '{4,2,0}, '{4,2,0}, '{3,1,0}, '{4,2,0}, '{3,1,0}, '{2,1,0}, '{3,1,1}, '{2,1,0}};

    #12 rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1;
    n = 0; cyc = 0; rd = 0; wr = 0;
    @(posedge clk); #1; start = 0;
    // now in IFetch of the first instruction
    while (n < exp_fig.size()) begin
      // sample the cycle before its clock edge
      @(negedge clk);
      if (upc == UA_IFETCH) begin
        fetch_pc = pc;
        checks++;
        if (!read || address !== fetch_pc) begin
          failures++; $display("fetch at %h read=%b addr=%h", fetch_pc, read, address);
        end
      end
      if (read)  rd++;
      if (write) begin
        wr++;
        checks++;
        if (data_out !== acc || address !== mem[fetch_pc][7:0]) begin
          failures++; $display("bad write %h to %h", data_out, address);
        end
      end
      cyc++;
      @(posedge clk); #1;
      if (upc == UA_IFETCH || upc == UA_STOPPED) begin
        checks++;
        if (cyc != exp_fig[n].cycles || rd != exp_fig[n].reads || wr != exp_fig[n].writes) begin
          failures++;
          $display("instr %0d: %0d cycles %0d reads %0d writes, expected %0d %0d %0d", n, cyc, rd,
                   wr, exp_fig[n].cycles, exp_fig[n].reads, exp_fig[n].writes);
        end
        n++; cyc = 0; rd = 0; wr = 0;
        if (upc == UA_STOPPED) break;
      end
    end
    checks++;
    if (n != exp_fig.size() || !stopped) begin failures++; $display("stopped after %0d", n); end
    checks++;
    if (acc !== 12'hFFF || mem[8'hD0] !== 12'h0F1 || mem[8'hD1] !== 12'hFFF) begin
      failures++; $display("final A=%h D0=%h D1=%h", acc, mem[8'hD0], mem[8'hD1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
