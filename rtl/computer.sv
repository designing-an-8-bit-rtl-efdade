// The complete 8-bit computer: CPU and memory system.
//
// The CPU fetches and executes a program from the 128-byte ROM at 0x00-0x7F,
// keeps data in the 96-byte RAM at 0x80-0xDF, writes sixteen 8-bit output
// ports at 0xE0-0xEF and reads sixteen 8-bit input ports at 0xF0-0xFF. The
// only traffic between the two halves is the CPU's address, write strobe and
// write data, and the memory's read data. Both run from one clock; reset is
// active low and asynchronous, and execution starts at address 0x00 when it
// is released.
// The ROM contents are the PROGRAM parameter. Its default copies input port 3
// to output port 0 and then input port 2 to output port 0, and stops in a
// loop, so port_out[0] shows 0x00, then port_in[3], then port_in[2].
// The ports are brought out as arrays of sixteen bytes, element i being port i.
module computer
  import computer_pkg::*;
#(
  parameter rom_image_t PROGRAM = default_program()
) (
  input  logic  clock,
  input  logic  reset,                  // active low
  input  byte_t port_in  [NUM_PORTS],
  output byte_t port_out [NUM_PORTS]
);

  byte_t address, data_in, data_out;
  logic  write;

  cpu cpu_u (
    .clock       (clock),
    .reset       (reset),
    .address     (address),
    .from_memory (data_out),
    .write       (write),
    .to_memory   (data_in)
  );

  memory #(.PROGRAM(PROGRAM)) memory_unit (
    .clock    (clock),
    .reset    (reset),
    .address  (address),
    .data_in  (data_in),
    .write    (write),
    .data_out (data_out),
    .port_in  (port_in),
    .port_out (port_out)
  );

endmodule
