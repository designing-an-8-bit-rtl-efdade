// Self-checking testbench for the CPU data path.
//
// Drives a random control word and random memory read data every clock and
// keeps its own copy of PC, MAR, A, B, IR and CCR, updated by the documented
// rules: every load takes Bus2, PC_Load wins over PC_Inc, CCR takes the ALU
// flags, the ALU's operands are Bus1 and B. Before each clock edge it checks
// the combinational outputs (address = MAR, to_memory = Bus1); after the edge
// it checks IR and CCR. Counts that every load strobe and bus source occurred.
module data_path_tb;
  import computer_pkg::*;
  import cpu_ref_pkg::*;

  logic       clock = 0, reset = 0;
  ctrl_t      ctrl;
  byte_t      ir, address, from_memory, to_memory;
  logic [3:0] ccr_result;

  byte_t m_pc, m_mar, m_a, m_b, m_ir, bus1, bus2, alu_r;
  logic [3:0] m_ccr, alu_f;
  int checks = 0, failures = 0;
  int seen [16];

  data_path dut (.clock(clock), .reset(reset), .ctrl(ctrl), .ir(ir), .ccr_result(ccr_result),
                 .address(address), .from_memory(from_memory), .to_memory(to_memory));

  always #5 clock = ~clock;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = CTRL_IDLE; from_memory = 0;
    m_pc = 0; m_mar = 0; m_a = 0; m_b = 0; m_ir = 0; m_ccr = 0;
    foreach (seen[i]) seen[i] = 0;
    #12;
    expect_eq(address, 0, "MAR after reset");
    expect_eq(ir, 0, "IR after reset");
    reset = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clock);
      ctrl.ir_load  = ($urandom_range(0, 5) == 0);
      ctrl.mar_load = ($urandom_range(0, 3) == 0);
      ctrl.pc_load  = ($urandom_range(0, 5) == 0);
      ctrl.pc_inc   = ($urandom_range(0, 2) == 0);
      ctrl.a_load   = ($urandom_range(0, 2) == 0);
      ctrl.b_load   = ($urandom_range(0, 2) == 0);
      ctrl.ccr_load = ($urandom_range(0, 2) == 0);
      ctrl.alu_sel  = alu_op_t'($urandom_range(0, 7));
      ctrl.bus1_sel = bus1_sel_t'($urandom_range(0, 2));
      ctrl.bus2_sel = bus2_sel_t'($urandom_range(0, 2));
      from_memory   = byte_t'($urandom);
      case (ctrl.bus1_sel) BUS1_PC: bus1 = m_pc; BUS1_A: bus1 = m_a; default: bus1 = m_b; endcase
      alu_ref(int'(ctrl.alu_sel), bus1, m_b, alu_r, alu_f);
      case (ctrl.bus2_sel) BUS2_ALU: bus2 = alu_r; BUS2_BUS1: bus2 = bus1; default: bus2 = from_memory; endcase
      #1;
      expect_eq(address, m_mar, "address");
      expect_eq(to_memory, bus1, "to_memory");
      seen[0] += ctrl.ir_load; seen[1] += ctrl.mar_load; seen[2] += ctrl.pc_load;
      seen[3] += ctrl.pc_inc && !ctrl.pc_load; seen[4] += ctrl.a_load; seen[5] += ctrl.b_load;
      seen[6] += ctrl.ccr_load; seen[7 + int'(ctrl.bus1_sel)]++; seen[10 + int'(ctrl.bus2_sel)]++;
      if (ctrl.ir_load)  m_ir  = bus2;
      if (ctrl.mar_load) m_mar = bus2;
      if (ctrl.pc_load)  m_pc  = bus2; else if (ctrl.pc_inc) m_pc = m_pc + 1;
      if (ctrl.a_load)   m_a   = bus2;
      if (ctrl.b_load)   m_b   = bus2;
      if (ctrl.ccr_load) m_ccr = alu_f;
      @(posedge clock); #1;
      expect_eq(ir, m_ir, "IR");
      expect_eq(ccr_result, m_ccr, "CCR");
      expect_eq(address, m_mar, "MAR");
    end
    for (int i = 0; i < 13; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL event %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
