// control_store_tb: checks the Simple-12 microprogram word by word.
// Each expected word is written here as its 23-bit field string in
// template order (CondSel AddrSel NextAdr LA LPC LMAR LMDR ALU bMUX aGate
// Read Write), taken from the microprogram listing, and compared with the
// control store output. Words the listing leaves unused must return to
// Stopped with every control bit 0.
module control_store_tb;
  import simple12_pkg::*;

  logic [5:0] addr;
  uinstr_t    uinstr;
  int         checks = 0, failures = 0;
  logic [22:0] expected [64];
  bit          listed [64];

  control_store dut (.addr(addr), .uinstr(uinstr));

  task automatic put(logic [5:0] a, logic [22:0] w);
    expected[a] = w;
    listed[a]   = 1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      listed[i] = 0;
      expected[i] = {3'b001, 1'b0, 6'b000000, 4'b0000, 4'b0000, 2'b00, 1'b0, 1'b0, 1'b0};
    end
    //          cond    as    next       LA LPC LMAR LMDR  ALU      bMUX  aG    Rd    Wr
    put(6'o00, {3'b100, 1'b0, 6'b000000, 4'b0110, 4'b0010, 2'b00, 1'b0, 1'b0, 1'b0});
    put(6'o01, {3'b001, 1'b1, 6'b000000, 4'b0111, 4'b0110, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o40, {3'b001, 1'b0, 6'b000001, 4'b0110, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o42, {3'b010, 1'b0, 6'b000001, 4'b0000, 4'b0000, 2'b00, 1'b0, 1'b0, 1'b0});
    put(6'o43, {3'b001, 1'b0, 6'b000001, 4'b0110, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o44, {3'b011, 1'b0, 6'b000001, 4'b0000, 4'b0010, 2'b00, 1'b1, 1'b0, 1'b0});
    put(6'o45, {3'b001, 1'b0, 6'b000001, 4'b0110, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o50, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o51, {3'b001, 1'b0, 6'b010100, 4'b0011, 4'b0010, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o24, {3'b001, 1'b0, 6'b000001, 4'b1000, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o52, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o53, {3'b001, 1'b0, 6'b000001, 4'b0010, 4'b0010, 2'b11, 1'b0, 1'b0, 1'b1});
    put(6'o60, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o61, {3'b001, 1'b0, 6'b011000, 4'b0011, 4'b0010, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o62, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o63, {3'b001, 1'b0, 6'b011001, 4'b0011, 4'b0010, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o64, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o65, {3'b001, 1'b0, 6'b011010, 4'b0011, 4'b0010, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o66, {3'b000, 1'b0, 6'b000000, 4'b0010, 4'b0010, 2'b10, 1'b0, 1'b0, 1'b0});
    put(6'o67, {3'b001, 1'b0, 6'b011011, 4'b0011, 4'b0010, 2'b11, 1'b0, 1'b1, 1'b0});
    put(6'o30, {3'b001, 1'b0, 6'b000001, 4'b1000, 4'b0000, 2'b10, 1'b1, 1'b0, 1'b0});
    put(6'o31, {3'b001, 1'b0, 6'b000001, 4'b1000, 4'b0001, 2'b10, 1'b1, 1'b0, 1'b0});
    put(6'o32, {3'b001, 1'b0, 6'b000001, 4'b1000, 4'b0010, 2'b10, 1'b1, 1'b0, 1'b0});
    put(6'o33, {3'b001, 1'b0, 6'b000001, 4'b1000, 4'b1110, 2'b10, 1'b1, 1'b0, 1'b0});
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i);
      #1;
      checks++;
      if (uinstr !== expected[i]) begin
        failures++;
        $display("uword %b: got %b exp %b (%s)", addr, uinstr, expected[i],
                 listed[i] ? "listed" : "unused");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
