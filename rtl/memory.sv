// Memory system of the 8-bit computer.
//
// One 8-bit address bus from the CPU reaches four address ranges:
//   0x00-0x7F program ROM (rom_128x8_sync), 0x80-0xDF data RAM (rw_96x8_sync),
//   0xE0-0xEF sixteen output port registers (output_ports),
//   0xF0-0xFF sixteen input ports, wired straight from port_in.
// The ROM, RAM and output ports each decode their own range and share the
// address, data_in and write signals. A read multiplexer, steered by the
// current address, returns to the CPU the ROM output for addresses below
// 0x80, the RAM output below 0xE0, input port address[3:0] for 0xF0-0xFF and
// 0x00 for the output port page.
// Timing: ROM and RAM reads are registered, so their data is valid one clock
// after the address; an input port is visible in the same cycle; a write to
// RAM or an output port takes effect at the rising edge that ends the write
// cycle. reset is active low and clears the output ports.
// Structure, map and read multiplexer follow the published design. The input
// port is selected by the low address nibble (the port number within the
// 0xF0 page).
module memory
  import computer_pkg::*;
#(
  parameter rom_image_t PROGRAM = default_program()
) (
  input  logic  clock,
  input  logic  reset,                  // active low
  input  byte_t address,
  input  byte_t data_in,
  input  logic  write,
  output byte_t data_out,
  input  byte_t port_in  [NUM_PORTS],
  output byte_t port_out [NUM_PORTS]
);

  byte_t rom_out, ram_out;

  rom_128x8_sync #(.PROGRAM(PROGRAM)) rom_128x8_sync_u (
    .clock    (clock),
    .address  (address),
    .data_out (rom_out)
  );

  rw_96x8_sync rw_96x8_sync_u (
    .clock    (clock),
    .address  (address),
    .data_in  (data_in),
    .write    (write),
    .data_out (ram_out)
  );

  output_ports output_ports_u (
    .clock    (clock),
    .reset    (reset),
    .address  (address),
    .data_in  (data_in),
    .write    (write),
    .port_out (port_out)
  );

  always_comb begin
    if (address <= ROM_LAST)           data_out = rom_out;
    else if (address <= RAM_LAST)      data_out = ram_out;
    else if (address[7:4] == IN_PAGE)  data_out = port_in[address[3:0]];
    else                               data_out = 8'h00;
  end

endmodule
