// CPU data path: registers, two bus multiplexers and the ALU.
//
// Registers (all 8 bits except the 4-bit CCR, all cleared by the active-low
// asynchronous reset):
//   IR  instruction register        MAR memory address register (drives address)
//   PC  program counter             A, B general purpose registers
//   CCR condition codes N Z V C (bit 3 down to bit 0)
// Bus1 selects PC, A or B; it is the ALU's first operand and the write data
// to memory (to_memory). Bus2 selects the ALU result, Bus1 or the byte read
// from memory (from_memory); every register load takes its value from Bus2.
// The ALU's second operand is register B. Each register loads on the rising
// clock edge when its load strobe in the control word is 1; PC_Load has
// priority over PC_Inc. CCR loads the ALU flags. IR and CCR are outputs to the
// control unit.
// The register set, the two multiplexed buses and the control strobe names
// follow the published design; which sources each bus carries and the
// select codes (computer_pkg::bus1_sel_t / bus2_sel_t) are this design's
// own choice.
module data_path
  import computer_pkg::*;
(
  input  logic       clock,
  input  logic       reset,             // active low
  input  ctrl_t      ctrl,
  output byte_t      ir,
  output logic [3:0] ccr_result,
  output byte_t      address,
  input  byte_t      from_memory,
  output byte_t      to_memory
);

  byte_t pc, mar, a_reg, b_reg;
  byte_t bus1, bus2, alu_result;
  logic [3:0] nzvc;

  always_comb begin
    unique case (ctrl.bus1_sel)
      BUS1_PC: bus1 = pc;
      BUS1_A:  bus1 = a_reg;
      BUS1_B:  bus1 = b_reg;
      default: bus1 = 8'h00;
    endcase
  end

  always_comb begin
    unique case (ctrl.bus2_sel)
      BUS2_ALU:  bus2 = alu_result;
      BUS2_BUS1: bus2 = bus1;
      BUS2_MEM:  bus2 = from_memory;
      default:   bus2 = 8'h00;
    endcase
  end

  alu alu_u (
    .a       (bus1),
    .b       (b_reg),
    .alu_sel (ctrl.alu_sel),
    .result  (alu_result),
    .nzvc    (nzvc)
  );

  always_ff @(posedge clock or negedge reset) begin
    if (!reset) begin
      ir         <= '0;
      mar        <= '0;
      pc         <= '0;
      a_reg      <= '0;
      b_reg      <= '0;
      ccr_result <= '0;
    end else begin
      if (ctrl.ir_load)  ir    <= bus2;
      if (ctrl.mar_load) mar   <= bus2;
      if (ctrl.pc_load)  pc    <= bus2;
      else if (ctrl.pc_inc) pc <= pc + 8'd1;
      if (ctrl.a_load)   a_reg <= bus2;
      if (ctrl.b_load)   b_reg <= bus2;
      if (ctrl.ccr_load) ccr_result <= nzvc;
    end
  end

  assign address   = mar;
  assign to_memory = bus1;

endmodule
