// 8-bit arithmetic logic unit of the CPU data path.
//
// Purely combinational. Operand a comes from Bus1 (PC, A or B, chosen by the
// control unit) and operand b is always register B. The 3-bit select picks one
// of eight operations (see computer_pkg::alu_op_t). Besides the result the ALU
// produces the four condition codes N Z V C, which the data path latches into
// its condition code register when the control unit asks for it:
//   N = result bit 7, Z = result is zero,
//   V = two's-complement overflow (ADD, SUB, INC, DEC; 0 otherwise),
//   C = carry out of bit 7 for ADD and INC, borrow for SUB and DEC
//       (1 when the unsigned subtraction wraps), 0 for the logic operations.
// That the ALU exists, sits inside the data path and has a 3-bit select and a
// 4-bit flag output follows the published design; the list of operations,
// their codes and the flag rules are this design's own choice.
module alu
  import computer_pkg::*;
(
  input  byte_t       a,
  input  byte_t       b,
  input  alu_op_t     alu_sel,
  output byte_t       result,
  output logic [3:0]  nzvc
);

  logic [8:0] wide;   // result with carry/borrow in bit 8
  logic       v;

  always_comb begin
    wide = '0;
    v    = 1'b0;
    unique case (alu_sel)
      ALU_ADD: begin
        wide = {1'b0, a} + {1'b0, b};
        v    = (a[7] == b[7]) && (wide[7] != a[7]);
      end
      ALU_SUB: begin
        wide = {1'b0, a} - {1'b0, b};
        v    = (a[7] != b[7]) && (wide[7] != a[7]);
      end
      ALU_AND:  wide = {1'b0, a & b};
      ALU_OR:   wide = {1'b0, a | b};
      ALU_INC: begin
        wide = {1'b0, a} + 9'd1;
        v    = (a == 8'h7F);
      end
      ALU_DEC: begin
        wide = {1'b0, a} - 9'd1;
        v    = (a == 8'h80);
      end
      ALU_PASS: wide = {1'b0, a};
      ALU_XOR:  wide = {1'b0, a ^ b};
      default:  wide = '0;
    endcase
  end

  assign result       = wide[7:0];
  assign nzvc[CCR_N]  = wide[7];
  assign nzvc[CCR_Z]  = (wide[7:0] == 8'h00);
  assign nzvc[CCR_V]  = v;
  assign nzvc[CCR_C]  = wide[8];

endmodule
