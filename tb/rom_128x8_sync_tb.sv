// Self-checking testbench for the 128 x 8 program ROM.
//
// Loads the ROM with a pattern (byte i = 3*i + 0x5A, modulo 256) through its
// parameter, reads every address and checks that the byte appears one clock
// after the address and that addresses 0x80-0xFF read 0x00.
module rom_128x8_sync_tb;
  import computer_pkg::*;

  function automatic rom_image_t pattern();
    rom_image_t p;
    for (int i = 0; i < 128; i++) p[i] = byte_t'(3 * i + 8'h5A);
    return p;
  endfunction

  logic  clock = 0;
  byte_t address, data_out;
  int checks = 0, failures = 0;

  rom_128x8_sync #(.PROGRAM(pattern())) dut (.clock(clock), .address(address), .data_out(data_out));

  always #5 clock = ~clock;

  initial begin
    repeat (2000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      byte_t expected;
      @(negedge clock) address = byte_t'(i);
      expected = (i < 128) ? byte_t'(3 * i + 8'h5A) : 8'h00;
      @(posedge clock); #1;
      checks++;
      if (data_out !== expected) begin
        failures++;
        $display("FAIL addr=%02h got %02h exp %02h", i, data_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
