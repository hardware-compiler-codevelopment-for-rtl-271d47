// fxp_madd: fixed-point multiply-add of one element, W = sat(Z + round(X*Y >> shift)).
//
// Following the VIRAM fixed-point model, only half of the bits of each
// multiplier input are used (the upper or the lower half, chosen by `hi`), so
// the signed product of two n/2-bit halves fits in n bits. The product is
// scaled by an arithmetic right shift of `shamt` bits, rounded in one of four
// modes, added to Z and saturated to n bits. All operands have the element
// width n (parameter W), so they can all live in ordinary vector registers.
// The choice of the four rounding modes (truncate, nearest with ties up,
// nearest with ties to even, round to odd) is this design's own.
//
// Purely combinational; the arithmetic unit registers the result.
module fxp_madd #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  y,
  input  logic [W-1:0]  z,
  input  logic          hi,     // 1: use the upper halves of x and y
  input  logic [5:0]    shamt,  // right shift applied to the product
  input  viram_pkg::rnd_e rnd,
  output logic [W-1:0]  w,
  output logic          sat     // result was saturated
);
  import viram_pkg::*;

  localparam int unsigned H = W / 2;

  logic signed [H-1:0]  xh, yh;
  logic signed [W-1:0]  xe, ye, prod;
  logic signed [W-1:0]  q;
  logic [W-1:0]         rem, half, rmask;
  logic [$clog2(W)-1:0] sh;
  logic                 inc;
  logic signed [W+1:0]  qr, sum;
  logic signed [W+1:0]  maxv, minv;

  always_comb begin
    xh   = hi ? x[W-1:H] : x[H-1:0];
    yh   = hi ? y[W-1:H] : y[H-1:0];
    xe   = W'(xh);             // sign extension
    ye   = W'(yh);
    prod = xe * ye;
    sh   = shamt[$clog2(W)-1:0];
    q    = prod >>> sh;
    rmask = (W'(1) << sh) - W'(1);
    rem  = prod & rmask;
    half = (sh == 0) ? '0 : (W'(1) << (sh - 1'b1));
    inc  = 1'b0;
    case (rnd)
      RND_TRUNC:  inc = 1'b0;
      RND_HALFUP: inc = (sh != 0) && (rem >= half);
      RND_EVEN:   inc = (sh != 0) && ((rem > half) || ((rem == half) && q[0]));
      RND_ODD:    inc = (rem != 0) && !q[0];
      default:    inc = 1'b0;
    endcase
    qr   = (W+2)'(q) + (W+2)'(inc);
    sum  = qr + (W+2)'($signed(z));
    maxv = (W+2)'({1'b0, {(W-1){1'b1}}});
    minv = -maxv - 1;
    sat  = 1'b0;
    if (sum > maxv) begin
      w = {1'b0, {(W-1){1'b1}}};
      sat = 1'b1;
    end else if (sum < minv) begin
      w = {1'b1, {(W-1){1'b0}}};
      sat = 1'b1;
    end else begin
      w = sum[W-1:0];
    end
  end

endmodule
