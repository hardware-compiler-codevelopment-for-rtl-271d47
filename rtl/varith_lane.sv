// varith_lane: one lane's 64-bit datapath of a vector arithmetic unit.
//
// The lane word is split according to the virtual processor width (VPW): one
// 64-bit, two 32-bit or four 16-bit element operations are done in the same
// cycle, so narrow data use the whole datapath. All lanes receive the same
// control. The partitioned datapath is built here as separate element ALUs per
// width with a result select, the simplest structure with this behaviour.
//
// Interface: a, b, c are the lane words of the two sources and of the
// accumulator (multiply-add); r is the result word and f the compare result of
// each sub-word (bit s for sub-word s; bits beyond 64/VPW are zero).
// Purely combinational.
module varith_lane (
  input  viram_pkg::vop_e op,
  input  viram_pkg::vpw_e vpw,
  input  logic [63:0]   a,
  input  logic [63:0]   b,
  input  logic [63:0]   c,
  input  logic          hi,
  input  logic [5:0]    shamt,
  input  viram_pkg::rnd_e rnd,
  output logic [63:0]   r,
  output logic [3:0]    f
);
  import viram_pkg::*;

  logic [63:0] r16, r32, r64;
  logic [3:0]  f16;
  logic [1:0]  f32;
  logic        f64;

  for (genvar s = 0; s < 4; s++) begin : g16
    velem_alu #(.W(16)) u_alu (
      .op(op), .a(a[s*16 +: 16]), .b(b[s*16 +: 16]), .c(c[s*16 +: 16]),
      .hi(hi), .shamt(shamt), .rnd(rnd), .r(r16[s*16 +: 16]), .f(f16[s])
    );
  end
  for (genvar s = 0; s < 2; s++) begin : g32
    velem_alu #(.W(32)) u_alu (
      .op(op), .a(a[s*32 +: 32]), .b(b[s*32 +: 32]), .c(c[s*32 +: 32]),
      .hi(hi), .shamt(shamt), .rnd(rnd), .r(r32[s*32 +: 32]), .f(f32[s])
    );
  end
  velem_alu #(.W(64)) u_alu64 (
    .op(op), .a(a), .b(b), .c(c), .hi(hi), .shamt(shamt), .rnd(rnd), .r(r64), .f(f64)
  );

  always_comb begin
    case (vpw)
      VPW16:   begin r = r16; f = f16; end
      VPW32:   begin r = r32; f = {2'b00, f32}; end
      default: begin r = r64; f = {3'b000, f64}; end
    endcase
  end

endmodule
