// Self-checking testbench for the sixteen output ports.
//
// Checks that reset clears all ports, then issues random writes to random
// addresses over the whole address space and compares all sixteen ports after
// every clock with a model in which only addresses 0xE0-0xEF with write = 1
// change port (address - 0xE0). Finally pulses reset in mid-run.
module output_ports_tb;
  import computer_pkg::*;

  logic  clock = 0, reset = 0, write = 0;
  byte_t address = 0, data_in = 0;
  byte_t port_out [NUM_PORTS];
  byte_t model [NUM_PORTS];
  int checks = 0, failures = 0, port_writes = 0;

  output_ports dut (.clock(clock), .reset(reset), .address(address), .data_in(data_in),
                    .write(write), .port_out(port_out));

  always #5 clock = ~clock;

  task automatic compare(string what);
    for (int i = 0; i < int'(NUM_PORTS); i++) begin
      checks++;
      if (port_out[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s port %0d got %02h exp %02h", what, i, port_out[i], model[i]);
      end
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
    foreach (model[i]) model[i] = 8'h00;
    #12 compare("in reset");
    reset = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clock);
      address = ($urandom_range(0, 1) == 1) ? byte_t'(8'hE0 + $urandom_range(0, 15)) : byte_t'($urandom);
      data_in = byte_t'($urandom);
      write   = ($urandom_range(0, 3) != 0);
      @(posedge clock); #1;
      if (write && address[7:4] == 4'hE) begin
        model[address[3:0]] = data_in;
        port_writes++;
      end
      compare("after write");
      if (k == 1000) begin
        reset = 0; #1;
        foreach (model[i]) model[i] = 8'h00;
        compare("async reset");
        @(negedge clock) reset = 1;
      end
    end
    checks++;
    if (port_writes < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
