// vflag_unit: logical and move operations on vector flag registers.
//
// Flag registers hold one mask bit per element. Besides compares, masks are
// built and combined with these operations: and, or, exclusive or, negate
// (the "vneg" used to invert a compare result) and move, which also gives
// access to flag registers other than the two an instruction can use as its
// mask. The operation covers the whole 128-bit register, independent of the
// vector length (this design's choice). Combinational; the controller reads
// the sources and writes the result in one cycle.
module vflag_unit (
  input  viram_pkg::vop_e  op,
  input  viram_pkg::flag_t a,
  input  viram_pkg::flag_t b,
  output viram_pkg::flag_t r,
  output logic             valid_op   // op is a flag operation
);
  import viram_pkg::*;

  always_comb begin
    valid_op = 1'b1;
    case (op)
      OP_FAND: r = a & b;
      OP_FOR:  r = a | b;
      OP_FXOR: r = a ^ b;
      OP_FNOT: r = ~a;
      OP_FMOV: r = a;
      default: begin r = '0; valid_op = 1'b0; end
    endcase
  end

endmodule
