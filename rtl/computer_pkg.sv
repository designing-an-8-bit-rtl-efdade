// Shared types and constants of the 8-bit computer.
//
// The computer is an accumulator machine with two 8-bit registers (A and B),
// an 8-bit program counter, an 8-bit memory address register, an instruction
// register and a 4-bit condition code register (flags N Z V C). It talks to a
// memory system over a single 8-bit address bus, an 8-bit write data bus, an
// 8-bit read data bus and a write strobe.
//
// Memory map (fixed by the memory system):
//   0x00-0x7F  program ROM, 128 x 8, synchronous read
//   0x80-0xDF  data RAM, 96 x 8, synchronous read and write
//   0xE0-0xEF  output ports 0..15 (write only, read back as 0x00)
//   0xF0-0xFF  input ports 0..15 (read only)
//
// The register set, bus structure, control signal names and widths and the
// memory map follow the published design. The opcode values, the ALU
// operation codes and the bus select codes are not published with it and are
// this design's own choice; they are all collected here so that they can be
// changed in one place.
package computer_pkg;

  typedef logic [7:0] byte_t;

  // ---------------------------------------------------------------- memory map
  localparam byte_t ROM_FIRST  = 8'h00;
  localparam byte_t ROM_LAST   = 8'h7F;
  localparam byte_t RAM_FIRST  = 8'h80;
  localparam byte_t RAM_LAST   = 8'hDF;
  localparam logic [3:0] OUT_PAGE = 4'hE;  // 0xE0-0xEF
  localparam logic [3:0] IN_PAGE  = 4'hF;  // 0xF0-0xFF

  localparam int unsigned ROM_DEPTH = 128;
  localparam int unsigned RAM_DEPTH = 96;
  localparam int unsigned NUM_PORTS = 16;

  // Whole program ROM image; entry i is the byte at address i.
  typedef logic [ROM_DEPTH-1:0][7:0] rom_image_t;

  // ---------------------------------------------------------------- opcodes
  localparam byte_t LDA_IMM = 8'h86;  // A <- next byte
  localparam byte_t LDA_DIR = 8'h87;  // A <- M[next byte]
  localparam byte_t LDB_IMM = 8'h88;  // B <- next byte
  localparam byte_t LDB_DIR = 8'h89;  // B <- M[next byte]
  localparam byte_t STA_DIR = 8'h96;  // M[next byte] <- A
  localparam byte_t STB_DIR = 8'h97;  // M[next byte] <- B
  localparam byte_t ADD_AB  = 8'h42;  // A <- A + B
  localparam byte_t SUB_AB  = 8'h43;  // A <- A - B
  localparam byte_t AND_AB  = 8'h44;  // A <- A & B
  localparam byte_t OR_AB   = 8'h45;  // A <- A | B
  localparam byte_t INCA    = 8'h46;  // A <- A + 1
  localparam byte_t INCB    = 8'h47;  // B <- B + 1
  localparam byte_t DECA    = 8'h48;  // A <- A - 1
  localparam byte_t DECB    = 8'h49;  // B <- B - 1
  localparam byte_t BRA     = 8'h20;  // PC <- next byte
  localparam byte_t BMI     = 8'h21;  // branch if N = 1
  localparam byte_t BPL     = 8'h22;  // branch if N = 0
  localparam byte_t BEQ     = 8'h23;  // branch if Z = 1
  localparam byte_t BNE     = 8'h24;  // branch if Z = 0
  localparam byte_t BVS     = 8'h25;  // branch if V = 1
  localparam byte_t BVC     = 8'h26;  // branch if V = 0
  localparam byte_t BCS     = 8'h27;  // branch if C = 1
  localparam byte_t BCC     = 8'h28;  // branch if C = 0

  // ---------------------------------------------------------------- ALU
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,  // A + B
    ALU_SUB  = 3'b001,  // A - B
    ALU_AND  = 3'b010,  // A & B
    ALU_OR   = 3'b011,  // A | B
    ALU_INC  = 3'b100,  // A + 1
    ALU_DEC  = 3'b101,  // A - 1
    ALU_PASS = 3'b110,  // A
    ALU_XOR  = 3'b111   // A ^ B
  } alu_op_t;

  // Condition code bit positions in the 4-bit CCR (N Z V C from bit 3 down).
  localparam int unsigned CCR_N = 3;
  localparam int unsigned CCR_Z = 2;
  localparam int unsigned CCR_V = 1;
  localparam int unsigned CCR_C = 0;

  // ---------------------------------------------------------------- buses
  // Bus1 feeds the ALU's first operand and the memory write data.
  typedef enum logic [1:0] {
    BUS1_PC = 2'b00,
    BUS1_A  = 2'b01,
    BUS1_B  = 2'b10
  } bus1_sel_t;

  // Bus2 feeds every register load input.
  typedef enum logic [1:0] {
    BUS2_ALU = 2'b00,
    BUS2_BUS1 = 2'b01,
    BUS2_MEM = 2'b10
  } bus2_sel_t;

  // Control word from the control unit to the data path.
  typedef struct packed {
    logic      ir_load;
    logic      mar_load;
    logic      pc_load;
    logic      pc_inc;
    logic      a_load;
    logic      b_load;
    alu_op_t   alu_sel;
    logic      ccr_load;
    bus2_sel_t bus2_sel;
    bus1_sel_t bus1_sel;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{alu_sel: ALU_ADD, bus2_sel: BUS2_ALU,
                                  bus1_sel: BUS1_PC, default: 1'b0};

  // ---------------------------------------------------------------- programs
  // Default ROM contents: copy input port 3 to output port 0, then input
  // port 2 to output port 0, then stop in a branch-to-self loop. Port 0
  // therefore goes 0x00 -> (port_in[3]) -> (port_in[2]).
  function automatic rom_image_t default_program();
    rom_image_t p = '0;
    p[0] = LDA_DIR;  p[1] = 8'hF3;
    p[2] = STA_DIR;  p[3] = 8'hE0;
    p[4] = LDA_DIR;  p[5] = 8'hF2;
    p[6] = STA_DIR;  p[7] = 8'hE0;
    p[8] = BRA;      p[9] = 8'h08;
    return p;
  endfunction

endpackage
