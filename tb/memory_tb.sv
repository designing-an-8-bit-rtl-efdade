// Self-checking testbench for the memory system.
//
// Fills the ROM with a pattern (byte i = i XOR 0xC3) and the input ports with
// random bytes, then runs random cycles over the whole address space: writes
// with random data, and reads that hold the address for one clock. A model
// of the memory map (ROM, RAM 0x80-0xDF, output ports 0xE0-0xEF, input ports
// 0xF0-0xFF, 0x00 for reads of the output page) predicts every read and the
// sixteen output ports after every cycle. Counts that each region was both
// read and, where writable, written.
module memory_tb;
  import computer_pkg::*;

  function automatic rom_image_t pattern();
    rom_image_t p;
    for (int i = 0; i < 128; i++) p[i] = byte_t'(i) ^ 8'hC3;
    return p;
  endfunction

  logic  clock = 0, reset = 0, write = 0;
  byte_t address = 0, data_in = 0, data_out;
  byte_t port_in [NUM_PORTS], port_out [NUM_PORTS];
  byte_t ram_model [256], out_model [NUM_PORTS];
  logic  ram_known [256];
  int checks = 0, failures = 0;
  int n_rom_rd = 0, n_ram_rd = 0, n_ram_wr = 0, n_out_wr = 0, n_in_rd = 0, n_out_rd = 0;

  memory #(.PROGRAM(pattern())) dut (
    .clock(clock), .reset(reset), .address(address), .data_in(data_in), .write(write),
    .data_out(data_out), .port_in(port_in), .port_out(port_out));

  always #5 clock = ~clock;

  task automatic expect_eq(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  function automatic byte_t predict(byte_t a);
    if (a < 8'h80)             return a ^ 8'hC3;
    if (a < 8'hE0)             return ram_model[a];
    if (a[7:4] == 4'hF)        return port_in[a[3:0]];
    return 8'h00;
  endfunction

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (port_in[i])   port_in[i] = byte_t'($urandom);
    foreach (out_model[i]) out_model[i] = 8'h00;
    foreach (ram_known[i]) ram_known[i] = 1'b0;
    #12 reset = 1;
    // Initialise the RAM so that every read is predictable.
    for (int i = 8'h80; i <= 8'hDF; i++) begin
      @(negedge clock) address = byte_t'(i); data_in = byte_t'($urandom); write = 1;
      ram_model[i] = data_in;
    end
    @(negedge clock) write = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clock);
      address = byte_t'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        data_in = byte_t'($urandom); write = 1;
        if (address >= 8'h80 && address <= 8'hDF) begin ram_model[address] = data_in; n_ram_wr++; end
        if (address[7:4] == 4'hE) begin out_model[address[3:0]] = data_in; n_out_wr++; end
        @(posedge clock); #1;
      end else begin
        write = 0;
        if (address[7:4] == 4'hF) begin
          #1 expect_eq(data_out, predict(address), "input port (same cycle)");
          n_in_rd++;
        end
        @(posedge clock); #1;
        expect_eq(data_out, predict(address), $sformatf("read %02h", address));
        if (address < 8'h80) n_rom_rd++;
        else if (address < 8'hE0) n_ram_rd++;
        else if (address[7:4] == 4'hE) n_out_rd++;
      end
      for (int i = 0; i < int'(NUM_PORTS); i++) expect_eq(port_out[i], out_model[i], $sformatf("port_out %0d", i));
      if (k == 1500) begin
        // Change an input port and check it is visible without a clock.
        port_in[5] = ~port_in[5];
        address = 8'hF5; write = 0; #1;
        expect_eq(data_out, port_in[5], "changed input port");
      end
    end
    checks++;
    if (n_rom_rd == 0 || n_ram_rd == 0 || n_ram_wr == 0 || n_out_wr == 0 || n_in_rd == 0 || n_out_rd == 0) begin
      failures++;
      $display("FAIL coverage rom_rd=%0d ram_rd=%0d ram_wr=%0d out_wr=%0d in_rd=%0d out_rd=%0d",
               n_rom_rd, n_ram_rd, n_ram_wr, n_out_wr, n_in_rd, n_out_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
