// datapath_tb: self-checking test of the Simple-12 dataflow.
// Applies random control words and memory data for many cycles and keeps
// a register-level model of A, PC, MAR and MDR written here from the
// dataflow description (b MUX, a AND gate, ALU, load enables). Checks the
// registers, Address, DataOut and the two status outputs every cycle.
module datapath_tb;
  import simple12_pkg::*;

  logic        clk = 0, rst_n = 0;
  ctrl_t       ctrl;
  logic [11:0] data_in, data_out, acc;
  logic [7:0]  address, pc;
  logic        a11, alu_zero;
  int          checks = 0, failures = 0;

  logic [11:0] m_a, m_mdr, m_y, m_av, m_bv, m_bb;
  logic [7:0]  m_pc, m_mar;

  datapath dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .data_in(data_in), .address(address),
                .data_out(data_out), .a11(a11), .alu_zero(alu_zero), .acc(acc), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_alu();
    m_av = ctrl.a_gate ? m_a : 12'h000;
    case (ctrl.b_mux)
      BM_MDR:  m_bv = m_mdr;
      BM_PC:   m_bv = {4'h0, m_pc};
      default: m_bv = 12'h000;
    endcase
    m_bb = ctrl.alu.b_invert ? ~m_bv : m_bv;
    case (ctrl.alu.op)
      ALU_AND: m_y = m_av & m_bb;
      ALU_OR:  m_y = m_av | m_bb;
      ALU_ADD: m_y = m_av + m_bb + {11'b0, ctrl.alu.carry_in};
      default: m_y = 12'h000;
    endcase
  endtask

  initial begin
    ctrl = '0; data_in = 0;
    m_a = 0; m_mdr = 0; m_pc = 0; m_mar = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ctrl    = ctrl_t'(13'($urandom));
      data_in = 12'($urandom);
      #1;
      model_alu();
      checks++;
      if (alu_zero !== (m_y == 0) || a11 !== m_a[11] || address !== m_mar ||
          data_out !== m_a || acc !== m_a || pc !== m_pc) begin
        failures++;
        $display("DP mismatch cycle %0d: A=%h/%h PC=%h/%h MAR=%h/%h zero=%b", i,
                 acc, m_a, pc, m_pc, address, m_mar, alu_zero);
      end
      @(posedge clk);
      if (ctrl.load_a)   m_a   = m_y;
      if (ctrl.load_pc)  m_pc  = m_y[7:0];
      if (ctrl.load_mar) m_mar = m_y[7:0];
      if (ctrl.load_mdr) m_mdr = data_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
