// Testbench of the computer exactly as built by default: no parameters are
// overridden, so the ROM holds the default program (copy input port 3 to
// output port 0, then input port 2 to output port 0, then loop).
//
// Stimulus: a 50 MHz clock, the active-low reset pulsed low and released a
// quarter period after start (before the first rising clock edge), and input port i holding i in both nibbles (0x00, 0x11, ...,
// 0xFF). Expected: output port 0 reads 0x00, changes to 0x33 at the rising
// edge that ends the 17th clock after reset (a 9-clock direct load plus an
// 8-clock store) and to 0x22 another 17 clocks later, and no other port ever
// changes. The PC must then stay in the final branch-to-self loop.
module computer_default_tb;
  import computer_pkg::*;

  logic  clock = 0, reset = 1;
  byte_t port_in [NUM_PORTS], port_out [NUM_PORTS];
  int checks = 0, failures = 0;
  int edge_count = 0;
  int change_at [$];
  byte_t change_val [$];
  byte_t last0 = 8'h00;

  computer dut (.clock(clock), .reset(reset), .port_in(port_in), .port_out(port_out));

  always #10 clock = ~clock;

  initial begin
    repeat (400) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rising edges since reset release, and every change of output port 0.
  always @(posedge clock) begin
    if (reset) edge_count <= edge_count + 1;
  end
  always @(negedge clock) begin
    if (port_out[0] != last0) begin
      change_at.push_back(edge_count);
      change_val.push_back(port_out[0]);
      last0 = port_out[0];
    end
    for (int i = 1; i < int'(NUM_PORTS); i++) begin
      checks++;
      if (port_out[i] !== 8'h00) begin
        failures++;
        $display("FAIL port %0d changed to %02h", i, port_out[i]);
      end
    end
  end

  initial begin
    for (int i = 0; i < int'(NUM_PORTS); i++) port_in[i] = byte_t'(i * 8'h11);
    #1 reset = 0;    // falling edge: the asynchronous reset acts at once
    #4 reset = 1;
    repeat (100) @(posedge clock);
    #1;
    checks++;
    if (change_at.size() != 2) begin
      failures++;
      $display("FAIL port 0 changed %0d times", change_at.size());
    end else begin
      checks++;
      if (change_val[0] !== 8'h33 || change_at[0] != 17) begin
        failures++;
        $display("FAIL first change: %02h after %0d clocks", change_val[0], change_at[0]);
      end
      checks++;
      if (change_val[1] !== 8'h22 || change_at[1] != 34) begin
        failures++;
        $display("FAIL second change: %02h after %0d clocks", change_val[1], change_at[1]);
      end
    end
    checks++;
    if (dut.cpu_u.data_path_u.pc !== 8'h08 && dut.cpu_u.data_path_u.pc !== 8'h09 &&
        dut.cpu_u.data_path_u.pc !== 8'h0A) begin
      failures++;
      $display("FAIL PC %02h outside the final loop", dut.cpu_u.data_path_u.pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
