// CPU control unit: the fetch-decode-execute finite-state machine.
//
// Every instruction starts with the same four states:
//   FETCH_0  MAR <- PC                  (Bus1 = PC, Bus2 = Bus1)
//   FETCH_1  PC <- PC + 1               (memory reads the opcode)
//   FETCH_2  IR <- memory               (Bus2 = memory)
//   DECODE_3 choose the execute sequence from IR
// and then one of these execute sequences (R is A or B, from the opcode):
//   LDR #imm   LD_IMM_4 MAR<-PC, LD_IMM_5 PC+1, LD_IMM_6 R<-memory   (7 clocks)
//   LDR addr   LD_DIR_4 MAR<-PC, LD_DIR_5 PC+1, LD_DIR_6 MAR<-memory,
//              LD_DIR_7 wait for memory, LD_DIR_8 R<-memory          (9 clocks)
//   STR addr   ST_DIR_4 MAR<-PC, ST_DIR_5 PC+1, ST_DIR_6 MAR<-memory,
//              ST_DIR_7 write = 1 with Bus1 = R                      (8 clocks)
//   ALU op     ALU_4 R <- ALU(Bus1 = R, B), CCR <- flags             (5 clocks)
//   branch     BR_4: condition true  -> MAR<-PC, BR_5 wait, BR_6 PC<-memory
//                                                        (7 clocks taken)
//                    condition false -> PC+1 (skip the target byte)
//                                                        (5 clocks not taken)
// An opcode that is not in the instruction set is skipped like a one-byte
// no-op (4 clocks). The state register resets, active low and asynchronous,
// to FETCH_0; the CPU therefore starts fetching at address 0x00.
// The control word is a Moore output of the state except in BR_4, where it
// also depends on the condition codes. write is 1 only in ST_DIR_7.
// That a state machine generates every control signal of the data path
// through fetch, decode and execute follows the published design; the
// instruction set, its opcodes and this state sequence are this design's own.
module control_unit
  import computer_pkg::*;
(
  input  logic       clock,
  input  logic       reset,             // active low
  input  byte_t      ir,
  input  logic [3:0] ccr_result,
  output ctrl_t      ctrl,
  output logic       write
);

  typedef enum logic [4:0] {
    S_FETCH_0, S_FETCH_1, S_FETCH_2, S_DECODE_3,
    S_LD_IMM_4, S_LD_IMM_5, S_LD_IMM_6,
    S_LD_DIR_4, S_LD_DIR_5, S_LD_DIR_6, S_LD_DIR_7, S_LD_DIR_8,
    S_ST_DIR_4, S_ST_DIR_5, S_ST_DIR_6, S_ST_DIR_7,
    S_ALU_4,
    S_BR_4, S_BR_5, S_BR_6
  } state_t;

  state_t state, next_state;

  // ---------------------------------------------------------- decoding of IR
  logic      uses_b;       // instruction's register is B rather than A
  alu_op_t   alu_op;
  logic      branch_cond;  // condition of a branch opcode

  always_comb begin
    uses_b = (ir == LDB_IMM) || (ir == LDB_DIR) || (ir == STB_DIR) ||
             (ir == INCB) || (ir == DECB);
    unique case (ir)
      SUB_AB:      alu_op = ALU_SUB;
      AND_AB:      alu_op = ALU_AND;
      OR_AB:       alu_op = ALU_OR;
      INCA, INCB:  alu_op = ALU_INC;
      DECA, DECB:  alu_op = ALU_DEC;
      default:     alu_op = ALU_ADD;
    endcase
    unique case (ir)
      BMI:     branch_cond =  ccr_result[CCR_N];
      BPL:     branch_cond = !ccr_result[CCR_N];
      BEQ:     branch_cond =  ccr_result[CCR_Z];
      BNE:     branch_cond = !ccr_result[CCR_Z];
      BVS:     branch_cond =  ccr_result[CCR_V];
      BVC:     branch_cond = !ccr_result[CCR_V];
      BCS:     branch_cond =  ccr_result[CCR_C];
      BCC:     branch_cond = !ccr_result[CCR_C];
      default: branch_cond = 1'b1;   // BRA
    endcase
  end

  // ---------------------------------------------------------- state register
  always_ff @(posedge clock or negedge reset) begin
    if (!reset) state <= S_FETCH_0;
    else        state <= next_state;
  end

  // ---------------------------------------------------------- next state
  always_comb begin
    next_state = S_FETCH_0;
    unique case (state)
      S_FETCH_0:  next_state = S_FETCH_1;
      S_FETCH_1:  next_state = S_FETCH_2;
      S_FETCH_2:  next_state = S_DECODE_3;
      S_DECODE_3: begin
        unique case (ir)
          LDA_IMM, LDB_IMM:                  next_state = S_LD_IMM_4;
          LDA_DIR, LDB_DIR:                  next_state = S_LD_DIR_4;
          STA_DIR, STB_DIR:                  next_state = S_ST_DIR_4;
          ADD_AB, SUB_AB, AND_AB, OR_AB,
          INCA, INCB, DECA, DECB:            next_state = S_ALU_4;
          BRA, BMI, BPL, BEQ, BNE,
          BVS, BVC, BCS, BCC:                next_state = S_BR_4;
          default:                           next_state = S_FETCH_0;
        endcase
      end
      S_LD_IMM_4: next_state = S_LD_IMM_5;
      S_LD_IMM_5: next_state = S_LD_IMM_6;
      S_LD_DIR_4: next_state = S_LD_DIR_5;
      S_LD_DIR_5: next_state = S_LD_DIR_6;
      S_LD_DIR_6: next_state = S_LD_DIR_7;
      S_LD_DIR_7: next_state = S_LD_DIR_8;
      S_ST_DIR_4: next_state = S_ST_DIR_5;
      S_ST_DIR_5: next_state = S_ST_DIR_6;
      S_ST_DIR_6: next_state = S_ST_DIR_7;
      S_BR_4:     next_state = branch_cond ? S_BR_5 : S_FETCH_0;
      S_BR_5:     next_state = S_BR_6;
      default:    next_state = S_FETCH_0;  // LD_IMM_6, LD_DIR_8, ST_DIR_7, ALU_4, BR_6
    endcase
  end

  // ---------------------------------------------------------- control word
  always_comb begin
    ctrl  = CTRL_IDLE;
    write = 1'b0;
    unique case (state)
      S_FETCH_0, S_LD_IMM_4, S_LD_DIR_4, S_ST_DIR_4: begin
        ctrl.bus1_sel = BUS1_PC;
        ctrl.bus2_sel = BUS2_BUS1;
        ctrl.mar_load = 1'b1;
      end
      S_FETCH_1, S_LD_IMM_5, S_LD_DIR_5, S_ST_DIR_5: ctrl.pc_inc = 1'b1;
      S_FETCH_2: begin
        ctrl.bus2_sel = BUS2_MEM;
        ctrl.ir_load  = 1'b1;
      end
      S_LD_IMM_6, S_LD_DIR_8: begin
        ctrl.bus2_sel = BUS2_MEM;
        ctrl.a_load   = !uses_b;
        ctrl.b_load   = uses_b;
      end
      S_LD_DIR_6, S_ST_DIR_6: begin
        ctrl.bus2_sel = BUS2_MEM;
        ctrl.mar_load = 1'b1;
      end
      S_ST_DIR_7: begin
        ctrl.bus1_sel = uses_b ? BUS1_B : BUS1_A;
        write         = 1'b1;
      end
      S_ALU_4: begin
        ctrl.bus1_sel = uses_b ? BUS1_B : BUS1_A;
        ctrl.bus2_sel = BUS2_ALU;
        ctrl.alu_sel  = alu_op;
        ctrl.a_load   = !uses_b;
        ctrl.b_load   = uses_b;
        ctrl.ccr_load = 1'b1;
      end
      S_BR_4: begin
        if (branch_cond) begin
          ctrl.bus1_sel = BUS1_PC;
          ctrl.bus2_sel = BUS2_BUS1;
          ctrl.mar_load = 1'b1;
        end else begin
          ctrl.pc_inc = 1'b1;
        end
      end
      S_BR_6: begin
        ctrl.bus2_sel = BUS2_MEM;
        ctrl.pc_load  = 1'b1;
      end
      default: ;  // DECODE_3, LD_DIR_7, BR_5: no strobes
    endcase
  end

  // A and B are never loaded in the same cycle; a write never coincides with
  // a register load. Both hold in every state, reset included.
  assert property (@(posedge clock) !(ctrl.a_load && ctrl.b_load));
  assert property (@(posedge clock)
                   !(write && (ctrl.a_load || ctrl.b_load || ctrl.mar_load ||
                               ctrl.pc_load || ctrl.ir_load)));

endmodule
