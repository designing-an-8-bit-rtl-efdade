// Self-checking testbench for the 96 x 8 data RAM.
//
// Writes every address 0x00-0xFF with a random byte, keeping a copy only for
// 0x80-0xDF, then reads every address back and checks the copy there and 0x00
// elsewhere (so writes outside the range must not land). Also checks the
// one-clock read latency and that a write cycle returns the old contents.
module rw_96x8_sync_tb;
  import computer_pkg::*;

  logic  clock = 0;
  logic  write;
  byte_t address, data_in, data_out;
  byte_t model [256];
  int checks = 0, failures = 0;

  rw_96x8_sync dut (.clock(clock), .address(address), .data_in(data_in),
                    .write(write), .data_out(data_out));

  always #5 clock = ~clock;

  task automatic expect_eq(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 0; address = 0; data_in = 0;
    foreach (model[i]) model[i] = 8'h00;
    // Write the in-range addresses first, then the others: an out-of-range
    // write that aliased into the array would corrupt the copy.
    for (int i = 128; i < 224; i++) begin
      @(negedge clock);
      address = byte_t'(i); data_in = byte_t'($urandom); write = 1;
      model[i] = data_in;
    end
    for (int i = 0; i < 256; i++) begin
      if (i >= 128 && i < 224) continue;
      @(negedge clock);
      address = byte_t'(i); data_in = byte_t'($urandom); write = 1;
    end
    @(negedge clock) write = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clock) address = byte_t'(i);
      @(posedge clock); #1;
      expect_eq(data_out, model[i], $sformatf("read %02h", i));
    end
    // Read-before-write: a write cycle returns the previous byte, the next read the new one.
    @(negedge clock) address = 8'h90; data_in = ~model[8'h90]; write = 1;
    @(posedge clock); #1;
    expect_eq(data_out, model[8'h90], "old data on write");
    @(negedge clock) write = 0;
    @(posedge clock); #1;
    expect_eq(data_out, ~model[8'h90], "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
