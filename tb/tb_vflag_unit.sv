// tb_vflag_unit: checks and/or/xor/negate/move on random 128-bit flag
// registers and that other opcodes are not taken as flag operations.
`timescale 1ns/1ps
module tb_vflag_unit;
  import viram_pkg::*;
  vop_e op;
  flag_t a, b, r;
  logic v;
  int checks = 0, failures = 0;

  vflag_unit dut (.op, .a, .b, .r, .valid_op(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vop_e ops [6] = '{OP_FAND, OP_FOR, OP_FXOR, OP_FNOT, OP_FMOV, OP_ADD};
    for (int n = 0; n < 600; n++) begin
      flag_t e;
      op = ops[n % 6];
      a = {4{$urandom()}};
      b = {4{$urandom()}};
      case (op)
        OP_FAND: e = a & b;
        OP_FOR:  e = a | b;
        OP_FXOR: e = a ^ b;
        OP_FNOT: e = ~a;
        OP_FMOV: e = a;
        default: e = '0;
      endcase
      #1;
      checks++;
      if ((op != OP_ADD && (r !== e || !v)) || (op == OP_ADD && v)) begin
        failures++;
        $display("%s: %h exp %h", op.name(), r, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
