// Self-checking testbench for the ALU.
//
// Applies every operation to all operand pairs on a grid of corner values and
// to random pairs, and compares result and N Z V C with a reference computed
// in integer arithmetic: the signed result is compared with the 8-bit signed
// range to find V, the unsigned result with 0..255 to find C.
module alu_tb;
  import computer_pkg::*;

  byte_t      a, b, result;
  alu_op_t    sel;
  logic [3:0] nzvc;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_sel(sel), .result(result), .nzvc(nzvc));

  task automatic check_one();
    int ua, ub, sa, sb, u, s;
    logic [7:0] exp_r;
    logic exp_v, exp_c;
    ua = int'(a); ub = int'(b);
    sa = (ua > 127) ? ua - 256 : ua;
    sb = (ub > 127) ? ub - 256 : ub;
    exp_v = 0; exp_c = 0;
    case (sel)
      ALU_ADD: begin u = ua + ub; s = sa + sb; exp_c = (u > 255); exp_v = (s > 127 || s < -128); end
      ALU_SUB: begin u = ua - ub; s = sa - sb; exp_c = (u < 0);   exp_v = (s > 127 || s < -128); end
      ALU_INC: begin u = ua + 1;  s = sa + 1;  exp_c = (u > 255); exp_v = (s > 127); end
      ALU_DEC: begin u = ua - 1;  s = sa - 1;  exp_c = (u < 0);   exp_v = (s < -128); end
      ALU_AND: u = ua & ub;
      ALU_OR:  u = ua | ub;
      ALU_XOR: u = ua ^ ub;
      default: u = ua;
    endcase
    exp_r = u[7:0];
    #1;
    checks++;
    if (result !== exp_r || nzvc !== {exp_r[7], exp_r == 8'h00, exp_v, exp_c}) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%0d a=%02h b=%02h got %02h/%04b exp %02h/%04b", sel, a, b,
                 result, nzvc, exp_r, {exp_r[7], exp_r == 8'h00, exp_v, exp_c});
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t corners [8] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'h81, 8'hFF, 8'h55, 8'hAA};
    for (int op = 0; op < 8; op++) begin
      sel = alu_op_t'(op);
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j];
        #1 check_one();
      end
      for (int k = 0; k < 200; k++) begin
        a = byte_t'($urandom); b = byte_t'($urandom);
        #1 check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
