// Sixteen memory-mapped 8-bit output ports.
//
// Port i is a register at address 0xE0 + i. Each port decodes its own address:
// on a rising clock edge with write = 1 and the address equal to its own, it
// stores data_in. All ports clear to 0x00 while the active-low reset is 0
// (asynchronous). The register outputs drive port_out directly, so a written
// value appears one clock edge after the write cycle.
// The number of ports, their width, the address page and the active-low reset
// follow the published design; the asynchronous reset is this design's choice.
module output_ports
  import computer_pkg::*;
(
  input  logic  clock,
  input  logic  reset,                  // active low
  input  byte_t address,
  input  byte_t data_in,
  input  logic  write,
  output byte_t port_out [NUM_PORTS]
);

  always_ff @(posedge clock or negedge reset) begin
    if (!reset) begin
      for (int i = 0; i < int'(NUM_PORTS); i++) port_out[i] <= 8'h00;
    end else if (write && address[7:4] == OUT_PAGE) begin
      port_out[address[3:0]] <= data_in;
    end
  end

endmodule
