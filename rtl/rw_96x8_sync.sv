// Data memory: 96 x 8 read/write memory with synchronous read and write.
//
// It occupies addresses 0x80-0xDF and decodes that range itself, so a write
// anywhere else (to ROM or to an output port) leaves it untouched. On a rising
// clock edge with write = 1 and the address in range the byte on data_in is
// stored; on every rising edge data_out takes the byte at the address when it
// is in range (the old contents on a write, read-before-write), and 0x00
// otherwise. Read data is valid one clock after the address is applied.
// The size, address range and synchronous behaviour follow the published
// design; read-before-write and the zero output outside the range are this
// design's own choices. The array is not reset: contents start undefined, as
// in a real RAM.
module rw_96x8_sync
  import computer_pkg::*;
(
  input  logic  clock,
  input  byte_t address,
  input  byte_t data_in,
  input  logic  write,
  output byte_t data_out
);

  byte_t ram [RAM_DEPTH];

  logic       in_range;
  logic [6:0] index;      // 0..95

  assign in_range = (address >= RAM_FIRST) && (address <= RAM_LAST);
  assign index    = address[6:0];

  always_ff @(posedge clock) begin
    if (in_range) begin
      data_out <= ram[index];
      if (write) ram[index] <= data_in;
    end else begin
      data_out <= 8'h00;
    end
  end

endmodule
