// simple12_top_tb: end-to-end test of the Simple-12 computer.
//
// An instruction-level model of the Simple-12 instruction set runs in
// lockstep with the machine. Each time the machine enters IFetch (the
// start of an instruction) its A and PC are compared with the model, the
// number of cycles the previous instruction took is compared with its
// expected count (JMP 2; JN, JZ 2 not taken and 3 taken; LOAD and the
// operate instructions 4; STORE 3), and the model then executes the
// instruction at PC. At the end of every program the whole memory is
// compared with the model's.
//
// Programs: (1) a loop that adds 7 five times (JZ, JMP, LOAD, STORE, ADD,
// SUB), (2) a maximum finder over a table (SUB, JN, AND, OR), each ended by
// a reserved opcode that returns the machine to Stopped, then (3) random
// programs. The machine runs at its default size. Every mechanism is
// counted and one that never happens counts as a failure: each opcode,
// both outcomes of JN and JZ, the multiway branch into the overflow words,
// waiting in Stopped with start low, and the stop on a reserved opcode.
module simple12_top_tb;
  import simple12_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [11:0] acc, mem_wdata, mem_rdata;
  logic [7:0]  pc, mem_address;
  logic [5:0]  upc;
  logic [3:0]  ir;
  logic        stopped, mem_read, mem_write;

  simple12_top dut (.clk(clk), .rst_n(rst_n), .start(start), .acc(acc), .pc(pc), .upc(upc),
                    .ir(ir), .stopped(stopped), .mem_address(mem_address), .mem_read(mem_read),
                    .mem_write(mem_write), .mem_wdata(mem_wdata), .mem_rdata(mem_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_op [16];
  int n_jn_taken = 0, n_jn_not = 0, n_jz_taken = 0, n_jz_not = 0;
  int n_overflow = 0, n_stop_wait = 0, n_reserved_stop = 0;

  // instruction-level model
  logic [11:0] m_mem [256];
  logic [11:0] m_a;
  logic [7:0]  m_pc;
  bit          m_halted;
  int          m_cycles;       // expected cycles of the instruction in flight

  function automatic logic [11:0] ins(logic [3:0] op, logic [7:0] x);
    return {op, x};
  endfunction

  // Execute one instruction in the model; set m_cycles and count mechanisms.
  task automatic model_step();
    logic [11:0] w;
    logic [3:0]  op;
    logic [7:0]  x;
    w  = m_mem[m_pc];
    op = w[11:8];
    x  = w[7:0];
    n_op[op]++;
    case (op)
      4'b0000: begin m_pc = x; m_cycles = 2; end
      4'b0001: if (m_a[11]) begin m_pc = x; m_cycles = 3; n_jn_taken++; end
               else begin m_pc = m_pc + 1; m_cycles = 2; n_jn_not++; end
      4'b0010: if (m_a == 0) begin m_pc = x; m_cycles = 3; n_jz_taken++; end
               else begin m_pc = m_pc + 1; m_cycles = 2; n_jz_not++; end
      4'b0100: begin m_a = m_mem[x]; m_pc++; m_cycles = 4; end
      4'b0101: begin m_mem[x] = m_a; m_pc++; m_cycles = 3; end
      4'b1000: begin m_a = m_a & m_mem[x]; m_pc++; m_cycles = 4; end
      4'b1001: begin m_a = m_a | m_mem[x]; m_pc++; m_cycles = 4; end
      4'b1010: begin m_a = m_a + m_mem[x]; m_pc++; m_cycles = 4; end
      4'b1011: begin m_a = m_a - m_mem[x]; m_pc++; m_cycles = 4; end
      default: begin m_halted = 1; m_cycles = 2; end  // IFetch, unused word, then Stopped
    endcase
  endtask

  // Put the model's memory into the machine and reset it.
  task automatic load_and_reset();
    rst_n = 0;
    for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = m_mem[i];
    m_a = 0; m_pc = 0; m_halted = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  // Run the loaded program in lockstep for at most max_instr instructions.
  task automatic run_program(int max_instr, bit expect_halt);
    int executed, cyc;
    bit first;
    // Wait in Stopped with start low for a few cycles.
    start = 0;
    repeat (3) begin
      @(posedge clk); #1;
      checks++;
      if (!stopped || pc != 0) begin failures++; $display("not holding in Stopped"); end
      else n_stop_wait++;
    end
    @(negedge clk); start = 1;  // one-cycle start pulse
    executed = 0; cyc = 0; first = 1;
    while (executed < max_instr && !(m_halted && stopped)) begin
      @(posedge clk); #1;
      start = 0;
      cyc++;
      if (upc[5:4] == 2'b01) n_overflow++;
      if (upc == UA_IFETCH || (m_halted && stopped)) begin
        if (!first) begin
          checks++;
          if (cyc != m_cycles) begin
            failures++;
            $display("cycle count: instr before PC=%h took %0d, expected %0d", m_pc, cyc, m_cycles);
          end
        end
        if (upc == UA_IFETCH) begin
          checks++;
          if (acc !== m_a || pc !== m_pc) begin
            failures++;
            $display("state: A=%h exp %h, PC=%h exp %h", acc, m_a, pc, m_pc);
          end
          if (m_halted) begin failures++; $display("machine runs past a reserved opcode"); end
          model_step();
          executed++;
        end
        first = 0; cyc = 0;
      end
      if (cyc > 10) begin failures++; $display("instruction hangs, upc=%b", upc); break; end
    end
    if (expect_halt) begin
      checks++;
      if (!(m_halted && stopped)) begin failures++; $display("program did not stop"); end
    end
    if (m_halted && stopped) begin
      n_reserved_stop++;
      @(posedge clk); #1;
      checks++;
      if (!stopped || pc != 0) begin failures++; $display("did not stay in Stopped"); end
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dut.u_ram.mem[i] !== m_mem[i]) begin
        failures++;
        $display("mem[%h]=%h exp %h", i, dut.u_ram.mem[i], m_mem[i]);
      end
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) n_op[i] = 0;

    // (1) 7 * 5 by repeated addition: sum at 0x82, counter at 0x81.
    for (int i = 0; i < 256; i++) m_mem[i] = 12'h000;
    m_mem[8'h80] = 12'd7;  m_mem[8'h81] = 12'd5; m_mem[8'h82] = 12'd0; m_mem[8'h83] = 12'd1;
    m_mem[8'h00] = ins(4'b0100, 8'h81);  // LOAD  count
    m_mem[8'h01] = ins(4'b0010, 8'h0A);  // JZ    done
    m_mem[8'h02] = ins(4'b1011, 8'h83);  // SUB   one
    m_mem[8'h03] = ins(4'b0101, 8'h81);  // STORE count
    m_mem[8'h04] = ins(4'b0100, 8'h82);  // LOAD  sum
    m_mem[8'h05] = ins(4'b1010, 8'h80);  // ADD   seven
    m_mem[8'h06] = ins(4'b0101, 8'h82);  // STORE sum
    m_mem[8'h07] = ins(4'b0000, 8'h00);  // JMP   top
    m_mem[8'h0A] = ins(4'b1111, 8'h00);  // reserved: stop
    load_and_reset();
    run_program(200, 1);
    checks++;
    if (dut.u_ram.mem[8'h82] !== 12'd35) begin failures++; $display("7*5 gave %0d", dut.u_ram.mem[8'h82]); end

    // (2) maximum of 6 signed values at 0x90..0x95, result at 0xA0.
    for (int i = 0; i < 256; i++) m_mem[i] = 12'h000;
    m_mem[8'h90] = 12'd12; m_mem[8'h91] = 12'hF00; m_mem[8'h92] = 12'd300;
    m_mem[8'h93] = 12'd45; m_mem[8'h94] = 12'd299; m_mem[8'h95] = 12'd7;
    m_mem[8'hA0] = 12'h800;                        // running max, starts at most negative
    for (int k = 0; k < 6; k++) begin
      logic [7:0] b;
      b = 8'(k * 6);
      m_mem[b + 0] = ins(4'b0100, 8'h90 + 8'(k)); // LOAD  v
      m_mem[b + 1] = ins(4'b1011, 8'hA0);         // SUB   max
      m_mem[b + 2] = ins(4'b0001, b + 8'd5);      // JN    skip
      m_mem[b + 3] = ins(4'b0100, 8'h90 + 8'(k)); // LOAD  v
      m_mem[b + 4] = ins(4'b0101, 8'hA0);         // STORE max
      m_mem[b + 5] = ins(4'b1001, 8'hA1);         // OR    zero (no-op on A)
    end
    m_mem[8'h24] = ins(4'b0100, 8'hA0);           // LOAD max
    m_mem[8'h25] = ins(4'b1000, 8'hA2);           // AND  mask
    m_mem[8'h26] = ins(4'b0101, 8'hA3);           // STORE
    m_mem[8'h27] = ins(4'b0110, 8'h00);           // reserved: stop
    m_mem[8'hA2] = 12'h0FF;
    load_and_reset();
    run_program(200, 1);
    checks++;
    if (dut.u_ram.mem[8'hA0] !== 12'd300 || dut.u_ram.mem[8'hA3] !== 12'd44) begin
      failures++; $display("max gave %0d / %0d", dut.u_ram.mem[8'hA0], dut.u_ram.mem[8'hA3]);
    end

    // (3) random programs: code in 0x00..0x3F, data in 0x80..0xFF.
    for (int p = 0; p < 40; p++) begin
      for (int i = 0; i < 256; i++) m_mem[i] = (i >= 128) ? 12'($urandom) : 12'h000;
      for (int i = 0; i < 64; i++) begin
        int r;
        logic [3:0] op;
        r = $urandom_range(0, 99);
        if      (r < 8)  op = 4'b0000;
        else if (r < 20) op = 4'b0001;
        else if (r < 32) op = 4'b0010;
        else if (r < 46) op = 4'b0100;
        else if (r < 60) op = 4'b0101;
        else if (r < 69) op = 4'b1000;
        else if (r < 78) op = 4'b1001;
        else if (r < 88) op = 4'b1010;
        else if (r < 98) op = 4'b1011;
        else             op = 4'($urandom_range(12, 15));
        if (op[3:2] == 2'b00 && op != 4'b0011)
          m_mem[i] = ins(op, 8'($urandom_range(0, 63)));
        else
          m_mem[i] = ins(op, 8'($urandom_range(128, 255)));
      end
      m_mem[63] = ins(4'b0111, 8'h00);
      // a zero data word now and then, so that JZ is taken
      m_mem[8'h80 + 8'($urandom_range(0, 127))] = 12'h000;
      load_and_reset();
      run_program(400, 0);
    end

    // every mechanism must have happened
    foreach (n_op[i]) begin
      if (i inside {0, 1, 2, 4, 5, 8, 9, 10, 11}) begin
        checks++;
        if (n_op[i] == 0) begin failures++; $display("opcode %b never ran", 4'(i)); end
      end
    end
    checks++; if (n_jn_taken == 0)      begin failures++; $display("JN never taken"); end
    checks++; if (n_jn_not == 0)        begin failures++; $display("JN always taken"); end
    checks++; if (n_jz_taken == 0)      begin failures++; $display("JZ never taken"); end
    checks++; if (n_jz_not == 0)        begin failures++; $display("JZ always taken"); end
    checks++; if (n_overflow == 0)      begin failures++; $display("overflow words never used"); end
    checks++; if (n_stop_wait == 0)     begin failures++; $display("never waited in Stopped"); end
    checks++; if (n_reserved_stop == 0) begin failures++; $display("never stopped"); end
    $display("mechanisms: JMP %0d JN %0d/%0d JZ %0d/%0d LOAD %0d STORE %0d AND %0d OR %0d ADD %0d SUB %0d",
             n_op[0], n_jn_taken, n_jn_not, n_jz_taken, n_jz_not, n_op[4], n_op[5], n_op[8],
             n_op[9], n_op[10], n_op[11]);
    $display("overflow-word cycles %0d, Stopped waits %0d, reserved-opcode stops %0d",
             n_overflow, n_stop_wait, n_reserved_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
