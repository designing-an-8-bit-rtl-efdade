// Self-checking testbench for the CPU (control unit and data path together).
//
// The CPU runs against a flat 256-byte memory with a one-clock synchronous
// read, like the computer's ROM and RAM. Each of several rounds fills the
// memory with a random instruction stream, resets the CPU and runs it in step
// with the instruction-level reference model: at the first clock of every
// instruction (known from the model's clock counts) A, B, PC and CCR must
// match the model, and every memory write must come at the clock, address and
// data the model predicts. Counts every opcode and both outcomes of every
// conditional branch and fails if one never occurred.
module cpu_tb;
  import computer_pkg::*;
  import cpu_ref_pkg::*;

  localparam int ROUNDS = 40;
  localparam int INSNS  = 400;

  logic  clock = 0, reset = 0, write;
  byte_t address, from_memory, to_memory;
  byte_t mem [256];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int op_count [256];
  int taken [256], not_taken [256];

  cpu dut (.clock(clock), .reset(reset), .address(address), .from_memory(from_memory),
           .write(write), .to_memory(to_memory));

  always #5 clock = ~clock;

  always_ff @(posedge clock) begin
    from_memory <= mem[address];
    if (write) mem[address] <= to_memory;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h exp %02h (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  initial begin
    repeat (ROUNDS * INSNS * 10 + 1000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t ops [$] = '{LDA_IMM, LDB_IMM, LDA_DIR, LDB_DIR, STA_DIR, STB_DIR, ADD_AB, SUB_AB,
                       AND_AB, OR_AB, INCA, INCB, DECA, DECB, BRA, BMI, BPL, BEQ, BNE,
                       BVS, BVC, BCS, BCC};
    byte_t conds [$] = '{BMI, BPL, BEQ, BNE, BVS, BVC, BCS, BCC};
    cpu_model m;
    int len;
    foreach (op_count[i]) begin op_count[i] = 0; taken[i] = 0; not_taken[i] = 0; end
    for (int r = 0; r < ROUNDS; r++) begin
      m = new(0);
      for (int i = 0; i < 256; i++) begin
        mem[i] = ($urandom_range(0, 9) < 6) ? ops[$urandom_range(0, ops.size() - 1)] : byte_t'($urandom);
        m.mem[i] = mem[i];
      end
      reset = 0;
      @(negedge clock);
      @(posedge clock); #1;
      reset = 1;               // released just after a rising edge: FETCH_0 is the next clock
      for (int n = 0; n < INSNS; n++) begin
        expect_eq(dut.data_path_u.a_reg, m.a, "A");
        expect_eq(dut.data_path_u.b_reg, m.b, "B");
        expect_eq(dut.data_path_u.pc, m.pc, "PC");
        expect_eq(dut.data_path_u.ccr_result, m.ccr, "CCR");
        len = m.step();
        op_count[m.opcode]++;
        if (m.is_branch) begin
          if (m.branch_taken) taken[m.opcode]++; else not_taken[m.opcode]++;
        end
        for (int c = 0; c < len; c++) begin
          @(negedge clock);
          cycle++;
          if (c == len - 1 && m.did_write) begin
            expect_eq(write, 1, "write strobe");
            expect_eq(address, m.wr_addr, "write address");
            expect_eq(to_memory, m.wr_data, "write data");
          end else begin
            expect_eq(write, 0, "no write");
          end
          @(posedge clock); #1;
        end
      end
    end
    foreach (ops[i]) begin
      checks++;
      if (op_count[ops[i]] == 0) begin failures++; $display("FAIL opcode %02h never ran", ops[i]); end
    end
    foreach (conds[i]) begin
      checks++;
      if (taken[conds[i]] == 0 || not_taken[conds[i]] == 0) begin
        failures++;
        $display("FAIL branch %02h taken %0d not taken %0d", conds[i], taken[conds[i]], not_taken[conds[i]]);
      end
    end
    $display("cycles run: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
