// velem_alu: integer and fixed-point operation on one W-bit element.
//
// Helper of varith_lane. It does modulo add and subtract, saturating add and
// subtract (the fixed-point add/subtract of the architecture), the bitwise
// logical operations, shifts by the low bits of the second operand, signed
// minimum and maximum, the low W bits of a multiply, the fixed-point
// multiply-add (fxp_madd) and signed less-than / equal compares whose one-bit
// result goes to a flag register. The operation set follows the integer and
// fixed-point instruction classes of the VIRAM architecture; the exact list
// is this design's choice. Purely combinational.
module velem_alu #(
  parameter int unsigned W = 64
) (
  input  viram_pkg::vop_e op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [W-1:0]  c,      // accumulator for multiply-add
  input  logic          hi,
  input  logic [5:0]    shamt,
  input  viram_pkg::rnd_e rnd,
  output logic [W-1:0]  r,
  output logic          f       // compare result
);
  import viram_pkg::*;

  localparam logic signed [W:0] SMAX = (W+1)'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [W:0] SMIN = -SMAX - 1;

  logic [W-1:0]        madd_w;
  logic                madd_sat;
  logic signed [W:0]   ext_sum;
  logic [$clog2(W)-1:0] sa;

  fxp_madd #(.W(W)) u_madd (
    .x(a), .y(b), .z(c), .hi(hi), .shamt(shamt), .rnd(rnd), .w(madd_w), .sat(madd_sat)
  );

  always_comb begin
    sa      = b[$clog2(W)-1:0];
    ext_sum = '0;
    r       = '0;
    f       = 1'b0;
    case (op)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_ADDS, OP_SUBS: begin
        ext_sum = (op == OP_ADDS) ? ((W+1)'($signed(a)) + (W+1)'($signed(b)))
                                  : ((W+1)'($signed(a)) - (W+1)'($signed(b)));
        if (ext_sum > SMAX)      r = {1'b0, {(W-1){1'b1}}};
        else if (ext_sum < SMIN) r = {1'b1, {(W-1){1'b0}}};
        else                     r = ext_sum[W-1:0];
      end
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SLL:  r = a << sa;
      OP_SRL:  r = a >> sa;
      OP_SRA:  r = $signed(a) >>> sa;
      OP_MIN:  r = ($signed(a) < $signed(b)) ? a : b;
      OP_MAX:  r = ($signed(a) > $signed(b)) ? a : b;
      OP_MUL:  r = a * b;
      OP_MADD: r = madd_w;
      OP_CMPLT: f = $signed(a) < $signed(b);
      OP_CMPEQ: f = (a == b);
      default: r = '0;
    endcase
  end

endmodule
