// datapath: the Simple-12 dataflow.
//
// Four registers: the accumulator A (12 bits), the program counter PC
// (8 bits), the memory address register MAR (8 bits, drives the memory
// Address) and the memory data register MDR (12 bits, loaded from DataIn).
// A single ALU computes every new value. Its b input comes from the b MUX
// (00: zero, 10: MDR, 11: PC, zero-extended) and its a input from an AND
// gate that passes A when a Gate is 1 and zero otherwise. The ALU result is
// written to A, and its low 8 bits to PC and MAR, each under its own load
// signal, so that one cycle can do e.g. MAR <- PC <- MDR(7:0) or
// PC <- PC + 1 together with MAR <- PC + 1. A drives DataOut directly, so a
// STORE writes A without first copying it to MDR.
//
// Timing: every register loads on the rising clock edge when its load bit
// is set; the status outputs a11 (sign of A) and alu_zero (ALU result is
// zero) are combinational. rst_n is asynchronous and clears all registers.
//
// The register set, the widths, the MUX codes, the AND gate and the
// connections follow the Simple-12 dataflow. The unassigned b MUX code 01
// selects zero and the reset are this design's choices. The Read and Write
// bits of the control word pass by this block to the memory and are not
// used here.
module datapath
  import simple12_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,      // control bits of the current microinstruction
  input  logic [DATA_W-1:0] data_in,   // memory read data
  output logic [ADDR_W-1:0] address,   // memory address (MAR)
  output logic [DATA_W-1:0] data_out,  // memory write data (A)
  output logic              a11,       // A(11): A is negative
  output logic              alu_zero,  // ALU result is zero
  output logic [DATA_W-1:0] acc,       // A, for observation
  output logic [ADDR_W-1:0] pc         // PC, for observation
);

  logic [DATA_W-1:0] a_q, mdr_q;
  logic [ADDR_W-1:0] pc_q, mar_q;
  logic [DATA_W-1:0] alu_a, alu_b, alu_y;

  always_comb begin
    unique case (ctrl.b_mux)
      BM_MDR:  alu_b = mdr_q;
      BM_PC:   alu_b = DATA_W'(pc_q);
      default: alu_b = '0;
    endcase
    alu_a = ctrl.a_gate ? a_q : '0;
  end

  alu #(.W(DATA_W)) u_alu (
    .a    (alu_a),
    .b    (alu_b),
    .ctl  (ctrl.alu),
    .y    (alu_y),
    .zero (alu_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      pc_q  <= '0;
      mar_q <= '0;
      mdr_q <= '0;
    end else begin
      if (ctrl.load_a)   a_q   <= alu_y;
      if (ctrl.load_pc)  pc_q  <= alu_y[ADDR_W-1:0];
      if (ctrl.load_mar) mar_q <= alu_y[ADDR_W-1:0];
      if (ctrl.load_mdr) mdr_q <= data_in;
    end
  end

  assign address  = mar_q;
  assign data_out = a_q;
  assign a11      = a_q[DATA_W-1];
  assign acc      = a_q;
  assign pc       = pc_q;

endmodule
