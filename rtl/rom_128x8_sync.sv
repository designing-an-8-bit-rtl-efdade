// Program memory: 128 x 8 read-only memory with a synchronous read port.
//
// It occupies addresses 0x00-0x7F of the 8-bit address space and decodes
// that range itself: on every rising clock edge data_out takes the byte at
// the address when the address is in range, and 0x00 otherwise. Read data is
// therefore valid one clock after the address is applied, which is why the
// control unit spends a wait state between loading MAR and using the byte.
// The contents are given by the PROGRAM parameter (entry i = byte at address i).
// The size, the synchronous read and the self-contained range decode follow
// the published design; the zero output outside the range and the parameter
// used for the contents are this design's own choice. There is no reset: the
// output register is a plain memory read register.
module rom_128x8_sync
  import computer_pkg::*;
#(
  parameter rom_image_t PROGRAM = default_program()
) (
  input  logic  clock,
  input  byte_t address,
  output byte_t data_out
);

  byte_t rom [ROM_DEPTH];

  initial begin
    for (int i = 0; i < int'(ROM_DEPTH); i++) rom[i] = PROGRAM[i];
  end

  always_ff @(posedge clock) begin
    if (address <= ROM_LAST) data_out <= rom[address[6:0]];
    else                     data_out <= 8'h00;
  end

endmodule
