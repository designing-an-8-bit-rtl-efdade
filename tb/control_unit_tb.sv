// Self-checking testbench for the control unit.
//
// Acts as the data path's instruction register: when the control unit raises
// IR_Load it captures the opcode under test. For every opcode of the
// instruction set, every unused opcode class and all sixteen condition code
// values, it runs one instruction from FETCH_0 and compares the control word
// and write strobe of each clock with a table of the expected sequence
// written out below, which also fixes the instruction's length in clocks.
module control_unit_tb;
  import computer_pkg::*;

  typedef struct packed { ctrl_t c; logic w; } step_t;

  logic       clock = 0, reset = 0;
  byte_t      ir = 0;
  logic [3:0] ccr = 0;
  ctrl_t      ctrl;
  logic       write;
  byte_t      next_op;
  int checks = 0, failures = 0, taken = 0, not_taken = 0;

  control_unit dut (.clock(clock), .reset(reset), .ir(ir), .ccr_result(ccr), .ctrl(ctrl), .write(write));

  always #5 clock = ~clock;
  always @(posedge clock) if (ctrl.ir_load) ir <= next_op;

  function automatic step_t s_mar_pc();
    step_t s = '{c: CTRL_IDLE, w: 0};
    s.c.bus1_sel = BUS1_PC; s.c.bus2_sel = BUS2_BUS1; s.c.mar_load = 1; return s;
  endfunction
  function automatic step_t s_inc();
    step_t s = '{c: CTRL_IDLE, w: 0}; s.c.pc_inc = 1; return s;
  endfunction
  function automatic step_t s_none();
    return '{c: CTRL_IDLE, w: 0};
  endfunction
  function automatic step_t s_mem(bit ir_l, bit mar_l, bit a_l, bit b_l, bit pc_l);
    step_t s = '{c: CTRL_IDLE, w: 0};
    s.c.bus2_sel = BUS2_MEM; s.c.ir_load = ir_l; s.c.mar_load = mar_l;
    s.c.a_load = a_l; s.c.b_load = b_l; s.c.pc_load = pc_l; return s;
  endfunction

  function automatic void expected(byte_t op, logic [3:0] f, ref step_t q[$]);
    step_t s;
    bit is_b, cond;
    q.delete();
    q.push_back(s_mar_pc()); q.push_back(s_inc()); q.push_back(s_mem(1, 0, 0, 0, 0)); q.push_back(s_none());
    is_b = (op == LDB_IMM || op == LDB_DIR || op == STB_DIR || op == INCB || op == DECB);
    case (op)
      LDA_IMM, LDB_IMM: begin
        q.push_back(s_mar_pc()); q.push_back(s_inc()); q.push_back(s_mem(0, 0, !is_b, is_b, 0));
      end
      LDA_DIR, LDB_DIR: begin
        q.push_back(s_mar_pc()); q.push_back(s_inc()); q.push_back(s_mem(0, 1, 0, 0, 0));
        q.push_back(s_none()); q.push_back(s_mem(0, 0, !is_b, is_b, 0));
      end
      STA_DIR, STB_DIR: begin
        q.push_back(s_mar_pc()); q.push_back(s_inc()); q.push_back(s_mem(0, 1, 0, 0, 0));
        s = s_none(); s.w = 1; s.c.bus1_sel = is_b ? BUS1_B : BUS1_A; q.push_back(s);
      end
      ADD_AB, SUB_AB, AND_AB, OR_AB, INCA, INCB, DECA, DECB: begin
        s = s_none();
        s.c.bus1_sel = is_b ? BUS1_B : BUS1_A; s.c.bus2_sel = BUS2_ALU;
        s.c.a_load = !is_b; s.c.b_load = is_b; s.c.ccr_load = 1;
        case (op)
          ADD_AB: s.c.alu_sel = ALU_ADD;  SUB_AB: s.c.alu_sel = ALU_SUB;
          AND_AB: s.c.alu_sel = ALU_AND;  OR_AB:  s.c.alu_sel = ALU_OR;
          INCA, INCB: s.c.alu_sel = ALU_INC;
          default:    s.c.alu_sel = ALU_DEC;
        endcase
        q.push_back(s);
      end
      BRA, BMI, BPL, BEQ, BNE, BVS, BVC, BCS, BCC: begin
        case (op)
          BMI: cond = f[3];  BPL: cond = !f[3];  BEQ: cond = f[2];  BNE: cond = !f[2];
          BVS: cond = f[1];  BVC: cond = !f[1];  BCS: cond = f[0];  BCC: cond = !f[0];
          default: cond = 1;
        endcase
        if (cond) begin
          q.push_back(s_mar_pc()); q.push_back(s_none()); q.push_back(s_mem(0, 0, 0, 0, 1));
        end else begin
          q.push_back(s_inc());
        end
      end
      default: ;
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t ops [$] = '{LDA_IMM, LDB_IMM, LDA_DIR, LDB_DIR, STA_DIR, STB_DIR, ADD_AB, SUB_AB,
                       AND_AB, OR_AB, INCA, INCB, DECA, DECB, BRA, BMI, BPL, BEQ, BNE,
                       BVS, BVC, BCS, BCC, 8'h00, 8'hFF, 8'h50};
    step_t q[$];
    #16 reset = 1;   // just after a rising edge: FETCH_0 is seen at the next falling edge
    foreach (ops[i]) begin
      for (int f = 0; f < 16; f++) begin
        // The flags may only change after the rising edge that ends the
        // previous instruction, which still depends on them.
        if (i != 0 || f != 0) begin @(posedge clock); #1; end
        next_op = ops[i];
        ccr = 4'(f);
        expected(ops[i], ccr, q);
        if (q.size() == 7 && ops[i] inside {BMI, BPL, BEQ, BNE, BVS, BVC, BCS, BCC}) taken++;
        if (q.size() == 5 && ops[i] inside {BMI, BPL, BEQ, BNE, BVS, BVC, BCS, BCC}) not_taken++;
        foreach (q[k]) begin
          @(negedge clock);
          checks++;
          if (ctrl !== q[k].c || write !== q[k].w) begin
            failures++;
            if (failures < 10)
              $display("FAIL op=%02h ccr=%04b clock %0d: got %h/%b exp %h/%b",
                       ops[i], ccr, k, ctrl, write, q[k].c, q[k].w);
          end
        end
      end
    end
    // Back in FETCH_0 after the last instruction.
    @(negedge clock);
    checks++;
    if (!(ctrl.mar_load && ctrl.bus1_sel == BUS1_PC)) failures++;
    checks++;
    if (taken == 0 || not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
