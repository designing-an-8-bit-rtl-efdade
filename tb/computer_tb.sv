// End-to-end testbench of the whole computer.
//
// Builds the computer with a test program in its ROM (listed below with the
// purpose of each instruction) and the input ports set to 0x00, 0x11, ...,
// 0xFF (port i holds i in both nibbles). The program moves data between input
// ports, RAM, ROM and output ports, drives every conditional branch both ways,
// runs a RAM-based counting loop and ends by copying input port 3 and then
// input port 2 to output port 0.
// The CPU is run in step with the instruction-level reference model (with the
// memory map applied): at the first clock of each instruction A, B, PC and CCR
// and all sixteen output ports must match the model. The final port values
// are also checked against constants worked out by hand. The testbench counts
// each mechanism of the design and fails if one never occurred: every opcode,
// both outcomes of every conditional branch, each flag being set, RAM writes
// and reads, ROM data reads, an ignored write to ROM, a read of the output
// page returning 0x00, input port reads and output port writes.
module computer_tb;
  import computer_pkg::*;
  import cpu_ref_pkg::*;

  function automatic rom_image_t test_program();
    rom_image_t p = '0;
    p[8'h00] = LDA_DIR; p[8'h01] = 8'hF0;  // A = input port 0
    p[8'h02] = STA_DIR; p[8'h03] = 8'hE1;  // output port 1 = input port 0
    p[8'h04] = LDB_DIR; p[8'h05] = 8'hF1;  // B = input port 1
    p[8'h06] = STB_DIR; p[8'h07] = 8'h81;  // RAM[0x81] = B
    p[8'h08] = LDA_DIR; p[8'h09] = 8'h81;  // A = RAM[0x81]
    p[8'h0A] = STA_DIR; p[8'h0B] = 8'hE2;  // output port 2 = input port 1, through RAM
    p[8'h0C] = LDA_DIR; p[8'h0D] = 8'h7E;  // A = 0x7F, a data byte in ROM
    p[8'h0E] = STA_DIR; p[8'h0F] = 8'h05;  // write to ROM: ignored
    p[8'h10] = LDA_DIR; p[8'h11] = 8'hE2;  // output page reads back 0x00
    p[8'h12] = STA_DIR; p[8'h13] = 8'hE3;  // output port 3 = 0x00
    p[8'h14] = LDA_DIR; p[8'h15] = 8'h7E;  // A = 0x7F
    p[8'h16] = LDB_IMM; p[8'h17] = 8'h01;
    p[8'h18] = ADD_AB;  // A = 0x80: N=1 V=1
    p[8'h19] = BVC; p[8'h1A] = 8'h1D;  // not taken
    p[8'h1B] = BVS; p[8'h1C] = 8'h1F;  // taken
    p[8'h1D] = STA_DIR; p[8'h1E] = 8'hEF;  // bad1: reached only on a wrong branch
    p[8'h1F] = BMI; p[8'h20] = 8'h23;  // ok1: taken
    p[8'h21] = STA_DIR; p[8'h22] = 8'hEF;
    p[8'h23] = BPL; p[8'h24] = 8'h25;  // ok2: not taken
    p[8'h25] = SUB_AB;  // ok3: A = 0x7F: V=1 N=0
    p[8'h26] = BPL; p[8'h27] = 8'h2A;  // taken
    p[8'h28] = STA_DIR; p[8'h29] = 8'hEF;
    p[8'h2A] = BMI; p[8'h2B] = 8'h1D;  // ok4: not taken
    p[8'h2C] = LDA_IMM; p[8'h2D] = 8'h00;
    p[8'h2E] = SUB_AB;  // A = 0xFF: C=1 (borrow) N=1
    p[8'h2F] = BCC; p[8'h30] = 8'h1D;  // not taken
    p[8'h31] = BCS; p[8'h32] = 8'h35;  // taken
    p[8'h33] = STA_DIR; p[8'h34] = 8'hEF;
    p[8'h35] = INCA;  // ok5: A = 0x00: Z=1 C=1
    p[8'h36] = BNE; p[8'h37] = 8'h1D;  // not taken
    p[8'h38] = BEQ; p[8'h39] = 8'h3C;  // taken
    p[8'h3A] = STA_DIR; p[8'h3B] = 8'hEF;
    p[8'h3C] = STA_DIR; p[8'h3D] = 8'h91;  // ok6: RAM[0x91] = 0 (loop counter)
    p[8'h3E] = LDA_IMM; p[8'h3F] = 8'h0F;
    p[8'h40] = LDB_IMM; p[8'h41] = 8'h3C;
    p[8'h42] = AND_AB;  // A = 0x0C, Z=0 V=0 C=0
    p[8'h43] = BVS; p[8'h44] = 8'h1D;  // not taken
    p[8'h45] = BCS; p[8'h46] = 8'h1D;  // not taken
    p[8'h47] = BEQ; p[8'h48] = 8'h1D;  // not taken
    p[8'h49] = BVC; p[8'h4A] = 8'h4D;  // taken
    p[8'h4B] = STA_DIR; p[8'h4C] = 8'hEF;
    p[8'h4D] = BCC; p[8'h4E] = 8'h51;  // ok7: taken
    p[8'h4F] = STA_DIR; p[8'h50] = 8'hEF;
    p[8'h51] = BNE; p[8'h52] = 8'h55;  // ok8: taken
    p[8'h53] = STA_DIR; p[8'h54] = 8'hEF;
    p[8'h55] = STA_DIR; p[8'h56] = 8'hE5;  // ok9: output port 5 = 0x0C
    p[8'h57] = LDB_IMM; p[8'h58] = 8'h30;
    p[8'h59] = OR_AB;  // A = 0x3C
    p[8'h5A] = STA_DIR; p[8'h5B] = 8'hE6;
    p[8'h5C] = INCB;  // B = 0x31
    p[8'h5D] = DECB;  // B = 0x30
    p[8'h5E] = DECB;  // B = 0x2F
    p[8'h5F] = DECA;  // A = 0x3B
    p[8'h60] = STB_DIR; p[8'h61] = 8'hE7;
    p[8'h62] = STA_DIR; p[8'h63] = 8'hE8;
    p[8'h64] = LDB_DIR; p[8'h65] = 8'hF4;  // B = input port 4 (loop count)
    p[8'h66] = LDA_DIR; p[8'h67] = 8'h91;  // loop: 
    p[8'h68] = INCA;
    p[8'h69] = STA_DIR; p[8'h6A] = 8'h91;  // RAM[0x91] += 1
    p[8'h6B] = DECB;  // Z=1 when B reaches 0
    p[8'h6C] = BNE; p[8'h6D] = 8'h66;
    p[8'h6E] = LDA_DIR; p[8'h6F] = 8'h91;
    p[8'h70] = STA_DIR; p[8'h71] = 8'hE9;  // output port 9 = loop count
    p[8'h72] = LDA_DIR; p[8'h73] = 8'hF3;
    p[8'h74] = STA_DIR; p[8'h75] = 8'hE0;  // output port 0 = input port 3
    p[8'h76] = LDA_DIR; p[8'h77] = 8'hF2;
    p[8'h78] = STA_DIR; p[8'h79] = 8'hE0;  // output port 0 = input port 2
    p[8'h7A] = BRA; p[8'h7B] = 8'h7A;  // done: 
    p[8'h7E] = 8'h7F;  // table
    return p;
  endfunction

  localparam rom_image_t PROG = test_program();
  localparam int INSNS = 450;

  logic  clock = 0, reset = 0;
  byte_t port_in [NUM_PORTS], port_out [NUM_PORTS];
  byte_t exp_out [NUM_PORTS];
  int checks = 0, failures = 0;
  int op_count [256], taken [256], not_taken [256];
  int n_ram_wr = 0, n_ram_rd = 0, n_rom_rd = 0, n_rom_wr = 0, n_outpage_rd = 0,
      n_in_rd = 0, n_out_wr = 0;
  int flag_set [4];
  byte_t port0_history [$];

  computer #(.PROGRAM(PROG)) dut (.clock(clock), .reset(reset), .port_in(port_in), .port_out(port_out));

  always #10 clock = ~clock;   // 50 MHz

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (INSNS * 10 + 100) @(posedge clock);
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
    cpu_model m = new(1);
    int len;
    for (int i = 0; i < int'(NUM_PORTS); i++) begin
      port_in[i] = byte_t'(i * 8'h11);
      m.in_ports[i] = port_in[i];
      exp_out[i] = 8'h00;
    end
    for (int i = 0; i < 128; i++) m.mem[i] = PROG[i];
    foreach (op_count[i]) begin op_count[i] = 0; taken[i] = 0; not_taken[i] = 0; end
    foreach (flag_set[i]) flag_set[i] = 0;
    port0_history.push_back(8'h00);
    // The RAM holds no defined value after power-up; the program writes every
    // RAM byte before reading it, so copy whatever the array holds.
    for (int i = 0; i < 96; i++) m.mem[8'h80 + i] = dut.memory_unit.rw_96x8_sync_u.ram[i];

    @(posedge clock); #1;
    for (int i = 0; i < int'(NUM_PORTS); i++) expect_eq(port_out[i], 8'h00, "port cleared by reset");
    reset = 1;
    for (int n = 0; n < INSNS; n++) begin
      expect_eq(dut.cpu_u.data_path_u.a_reg, m.a, "A");
      expect_eq(dut.cpu_u.data_path_u.b_reg, m.b, "B");
      expect_eq(dut.cpu_u.data_path_u.pc, m.pc, "PC");
      expect_eq(dut.cpu_u.data_path_u.ccr_result, m.ccr, "CCR");
      for (int i = 0; i < int'(NUM_PORTS); i++) expect_eq(port_out[i], exp_out[i], $sformatf("port_out %0d", i));
      len = m.step();
      op_count[m.opcode]++;
      for (int f = 0; f < 4; f++) if (m.ccr[f]) flag_set[f]++;
      if (m.is_branch) begin
        if (m.branch_taken) taken[m.opcode]++; else not_taken[m.opcode]++;
      end
      if (m.did_write) begin
        if (m.wr_addr < 8'h80) n_rom_wr++;
        else if (m.wr_addr < 8'hE0) n_ram_wr++;
        else if (m.wr_addr[7:4] == 4'hE) begin
          n_out_wr++;
          exp_out[m.wr_addr[3:0]] = m.wr_data;
          if (m.wr_addr == 8'hE0 && m.wr_data != port0_history[$]) port0_history.push_back(m.wr_data);
        end
      end
      if (m.did_read) begin
        if (m.rd_addr < 8'h80) n_rom_rd++;
        else if (m.rd_addr < 8'hE0) n_ram_rd++;
        else if (m.rd_addr[7:4] == 4'hE) n_outpage_rd++;
        else n_in_rd++;
      end
      repeat (len) @(posedge clock);
      #1;
    end

    // Hand-computed results of the program.
    expect_eq(port_out[0],  8'h22, "out0 = in2");
    expect_eq(port_out[1],  8'h00, "out1 = in0");
    expect_eq(port_out[2],  8'h11, "out2 = in1 via RAM");
    expect_eq(port_out[3],  8'h00, "out3 = output page read");
    expect_eq(port_out[5],  8'h0C, "out5 = 0x0F & 0x3C");
    expect_eq(port_out[6],  8'h3C, "out6 = 0x0C | 0x30");
    expect_eq(port_out[7],  8'h2F, "out7 = B after INCB, DECB, DECB");
    expect_eq(port_out[8],  8'h3B, "out8 = A after DECA");
    expect_eq(port_out[9],  8'h44, "out9 = loop count = in4");
    expect_eq(port_out[15], 8'h00, "out15 = no wrong branch");
    expect_eq(dut.cpu_u.data_path_u.pc, 8'h7A, "stopped in final loop");
    checks++;
    if (port0_history.size() != 3 || port0_history[1] != 8'h33 || port0_history[2] != 8'h22) begin
      failures++;
      $display("FAIL port 0 history");
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
    for (int f = 0; f < 4; f++) begin
      checks++;
      if (flag_set[f] == 0) begin failures++; $display("FAIL flag %0d never set", f); end
    end
    checks++;
    if (n_ram_wr == 0 || n_ram_rd == 0 || n_rom_rd == 0 || n_rom_wr == 0 || n_outpage_rd == 0 ||
        n_in_rd == 0 || n_out_wr == 0) begin
      failures++;
      $display("FAIL memory coverage");
    end
    $display("ram_wr=%0d ram_rd=%0d rom_rd=%0d rom_wr=%0d outpage_rd=%0d in_rd=%0d out_wr=%0d",
             n_ram_wr, n_ram_rd, n_rom_rd, n_rom_wr, n_outpage_rd, n_in_rd, n_out_wr);

    // Reset in mid-run clears the output ports.
    reset = 0; #1;
    for (int i = 0; i < int'(NUM_PORTS); i++) expect_eq(port_out[i], 8'h00, "port cleared by second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
