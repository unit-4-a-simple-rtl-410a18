// microsequencer_tb: self-checking test of the Simple-12 next-address logic.
// Drives random condition selects, address selects, branch addresses,
// opcodes and status bits, and compares Q after each clock with a model:
// load the selected address when the selected condition is 1, else Q + 1.
module microsequencer_tb;
  import simple12_pkg::*;

  logic        clk = 0, rst_n = 0;
  cond_sel_e   cond_sel;
  addr_sel_e   addr_sel;
  logic [5:0]  next_adr, q, exp_q;
  logic [3:0]  opcode_in, ir;
  logic        start, a11, alu_zero, c;
  int          checks = 0, failures = 0;
  int          n_load = 0, n_inc = 0, n_multiway = 0;

  microsequencer dut (.clk(clk), .rst_n(rst_n), .cond_sel(cond_sel), .addr_sel(addr_sel),
                      .next_adr(next_adr), .opcode_in(opcode_in), .start(start), .a11(a11),
                      .alu_zero(alu_zero), .q(q), .ir(ir));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cond_sel = CS_FALSE; addr_sel = AS_NEXT; next_adr = 0; opcode_in = 0;
    start = 0; a11 = 0; alu_zero = 0;
    #12 rst_n = 1;
    checks++; if (q !== 6'b000000) begin failures++; $display("reset Q=%b", q); end
    @(negedge clk);
    exp_q = q;
    for (int i = 0; i < 3000; i++) begin
      cond_sel  = cond_sel_e'(3'($urandom_range(0, 4)));
      addr_sel  = addr_sel_e'(1'($urandom));
      next_adr  = 6'($urandom);
      opcode_in = 4'($urandom);
      start = 1'($urandom); a11 = 1'($urandom); alu_zero = 1'($urandom);
      case (cond_sel)
        CS_FALSE:     c = 0;
        CS_TRUE:      c = 1;
        CS_NOT_A11:   c = !a11;
        CS_NOT_ZERO:  c = !alu_zero;
        CS_NOT_START: c = !start;
        default:      c = 0;
      endcase
      if (c) begin
        exp_q = addr_sel ? {1'b1, opcode_in, 1'b0} : next_adr;
        n_load++;
        if (addr_sel) n_multiway++;
      end else begin
        exp_q = exp_q + 1;
        n_inc++;
      end
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q || ir !== exp_q[4:1]) begin
        failures++;
        $display("SEQ mismatch cs=%b as=%b q=%b exp=%b", cond_sel, addr_sel, q, exp_q);
      end
      @(negedge clk);
    end
    checks++;
    if (n_load == 0 || n_inc == 0 || n_multiway == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
