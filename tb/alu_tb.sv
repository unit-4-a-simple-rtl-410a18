// alu_tb: self-checking test of the Simple-12 ALU.
// Applies random operands under every control code (AND, OR, ADD, SUB,
// increment, pass-through) and compares y and zero with values computed
// here from the operation's definition; also forces zero results.
module alu_tb;
  import simple12_pkg::*;

  logic [11:0] a, b, y, exp_y;
  alu_ctl_t    ctl;
  logic        zero;
  int          checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .ctl(ctl), .y(y), .zero(zero));

  function automatic logic [11:0] ref_alu(logic [11:0] a_i, logic [11:0] b_i, logic [3:0] c);
    logic [11:0] bb;
    bb = c[3] ? ~b_i : b_i;
    case (c[1:0])
      2'b00: return a_i & bb;
      2'b01: return a_i | bb;
      2'b10: return 12'((int'(a_i) + int'(bb) + int'(c[2])) % 4096);
      default: return 12'h000;
    endcase
  endfunction

  task automatic check(logic [3:0] c);
    ctl = alu_ctl_t'(c);
    #1;
    exp_y = ref_alu(a, b, c);
    checks++;
    if (y !== exp_y || zero !== (exp_y == 0)) begin
      failures++;
      $display("ALU mismatch ctl=%b a=%h b=%h y=%h exp=%h zero=%b", c, a, b, y, exp_y, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = 12'($urandom); b = 12'($urandom);
      for (int c = 0; c < 16; c++) check(4'(c));
    end
    // SUB of equal values gives zero; named cases
    a = 12'h5A5; b = 12'h5A5; check(4'b1110);
    if (y != 0) begin failures++; $display("SUB equal not zero"); end
    a = 12'h003; b = 12'h005; check(4'b1110);   // 3 - 5 = -2
    checks++; if (y != 12'hFFE) begin failures++; $display("3-5 wrong: %h", y); end
    a = 12'h000; b = 12'h0FF; check(4'b0110);   // PC + 1 form
    checks++; if (y != 12'h100) begin failures++; $display("inc wrong: %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
