// CPU of the 8-bit computer: control unit plus data path.
//
// The control unit reads the instruction register and the condition codes
// from the data path and drives the data path's control word (register load
// strobes, ALU select, bus selects) and the memory write strobe. The data
// path drives the memory address (its MAR) and the write data (its Bus1) and
// takes the read data from memory. reset is active low. See control_unit.sv
// for the instruction timing and data_path.sv for the registers and buses.
// This split and the signals between the two halves follow the published
// design.
module cpu
  import computer_pkg::*;
(
  input  logic  clock,
  input  logic  reset,                  // active low
  output byte_t address,
  input  byte_t from_memory,
  output logic  write,
  output byte_t to_memory
);

  ctrl_t      ctrl;
  byte_t      ir;
  logic [3:0] ccr_result;

  control_unit control_unit_module (
    .clock      (clock),
    .reset      (reset),
    .ir         (ir),
    .ccr_result (ccr_result),
    .ctrl       (ctrl),
    .write      (write)
  );

  data_path data_path_u (
    .clock       (clock),
    .reset       (reset),
    .ctrl        (ctrl),
    .ir          (ir),
    .ccr_result  (ccr_result),
    .address     (address),
    .from_memory (from_memory),
    .to_memory   (to_memory)
  );

endmodule
