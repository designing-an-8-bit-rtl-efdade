// Reference models used by the testbenches: an ALU written with integer
// arithmetic, and an instruction-level model of the CPU with the clock count of
// every instruction. The instruction model reads and writes memory through a
// 256-byte array. With "mapped" set it applies the computer's memory map
// (ROM 0x00-0x7F not writable, RAM 0x80-0xDF, output ports 0xE0-0xEF read as
// 0x00, input ports 0xF0-0xFF from in_ports); otherwise the array is a flat
// read/write memory.
package cpu_ref_pkg;
  import computer_pkg::*;

  function automatic void alu_ref(input int op, input byte_t x, input byte_t y,
                                  output byte_t r, output logic [3:0] f);
    int ux = int'(x), uy = int'(y);
    int sx = (ux > 127) ? ux - 256 : ux;
    int sy = (uy > 127) ? uy - 256 : uy;
    int u, s;
    logic v = 0, c = 0;
    case (op)
      0: begin u = ux + uy; s = sx + sy; c = (u > 255); v = (s > 127 || s < -128); end
      1: begin u = ux - uy; s = sx - sy; c = (u < 0);   v = (s > 127 || s < -128); end
      2: u = ux & uy;
      3: u = ux | uy;
      4: begin u = ux + 1; s = sx + 1; c = (u > 255); v = (s > 127); end
      5: begin u = ux - 1; s = sx - 1; c = (u < 0);   v = (s < -128); end
      7: u = ux ^ uy;
      default: u = ux;
    endcase
    r = u[7:0];
    f = {r[7], r == 8'h00, v, c};
  endfunction

  class cpu_model;
    byte_t      a, b, pc;
    logic [3:0] ccr;
    byte_t      mem [256];
    byte_t      in_ports [16];
    bit         mapped;
    // Result of the last step
    bit         did_write, did_read;
    byte_t      wr_addr, wr_data, rd_addr;
    bit         branch_taken, is_branch;
    byte_t      opcode;

    function new(bit mapped_memory);
      mapped = mapped_memory;
      a = 0; b = 0; pc = 0; ccr = 0;
      foreach (mem[i]) mem[i] = 0;
      foreach (in_ports[i]) in_ports[i] = 0;
    endfunction

    function byte_t rd(byte_t addr);
      if (!mapped)            return mem[addr];
      if (addr < 8'hE0)       return mem[addr];
      if (addr[7:4] == 4'hF)  return in_ports[addr[3:0]];
      return 8'h00;
    endfunction

    function void wr(byte_t addr, byte_t data);
      did_write = 1; wr_addr = addr; wr_data = data;
      if (!mapped || (addr >= 8'h80 && addr < 8'hE0)) mem[addr] = data;
    endfunction

    function byte_t fetch();
      byte_t v = rd(pc);
      pc = pc + 8'd1;
      return v;
    endfunction

    // Executes one instruction; returns its length in clock cycles.
    function int step();
      byte_t op, arg, r;
      logic [3:0] f;
      bit cond;
      did_write = 0; did_read = 0; branch_taken = 0; is_branch = 0;
      op = fetch();
      opcode = op;
      case (op)
        LDA_IMM: begin a = fetch(); return 7; end
        LDB_IMM: begin b = fetch(); return 7; end
        LDA_DIR: begin arg = fetch(); did_read = 1; rd_addr = arg; a = rd(arg); return 9; end
        LDB_DIR: begin arg = fetch(); did_read = 1; rd_addr = arg; b = rd(arg); return 9; end
        STA_DIR: begin arg = fetch(); wr(arg, a); return 8; end
        STB_DIR: begin arg = fetch(); wr(arg, b); return 8; end
        ADD_AB:  begin alu_ref(0, a, b, r, f); a = r; ccr = f; return 5; end
        SUB_AB:  begin alu_ref(1, a, b, r, f); a = r; ccr = f; return 5; end
        AND_AB:  begin alu_ref(2, a, b, r, f); a = r; ccr = f; return 5; end
        OR_AB:   begin alu_ref(3, a, b, r, f); a = r; ccr = f; return 5; end
        INCA:    begin alu_ref(4, a, b, r, f); a = r; ccr = f; return 5; end
        INCB:    begin alu_ref(4, b, b, r, f); b = r; ccr = f; return 5; end
        DECA:    begin alu_ref(5, a, b, r, f); a = r; ccr = f; return 5; end
        DECB:    begin alu_ref(5, b, b, r, f); b = r; ccr = f; return 5; end
        BRA, BMI, BPL, BEQ, BNE, BVS, BVC, BCS, BCC: begin
          is_branch = 1;
          case (op)
            BMI: cond =  ccr[3];  BPL: cond = !ccr[3];
            BEQ: cond =  ccr[2];  BNE: cond = !ccr[2];
            BVS: cond =  ccr[1];  BVC: cond = !ccr[1];
            BCS: cond =  ccr[0];  BCC: cond = !ccr[0];
            default: cond = 1;
          endcase
          if (cond) begin
            branch_taken = 1;
            pc = rd(pc);
            return 7;
          end
          pc = pc + 8'd1;
          return 5;
        end
        default: return 4;
      endcase
    endfunction
  endclass

endpackage
