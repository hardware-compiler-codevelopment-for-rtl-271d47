// vperm_unit: vector element permutations used for reductions and FFTs.
//
// Three permutations, kept separate from the arithmetic so that their data
// movement is regular:
//   OP_HALF   vd[i] = vs1[i + VL/2]            for i < VL/2
//             (moves the second half of a vector into another register; an
//             add reduction repeats "half, add" until one element is left)
//   OP_BFLYL  vd[i] = vs1[i + d]  for i < VL with (i mod 2d) <  d
//   OP_BFLYR  vd[i] = vs1[i - d]  for i < VL with (i mod 2d) >= d
//             (left and right butterfly with programmable radix d)
// Elements of vd not named above keep their value. The exact butterfly
// definition is this design's choice; the design only names left and right
// butterflies with a programmable radix.
//
// Operation: after `start` the unit reads the 8 groups of vs1 and vd, one per
// cycle (8 cycles), then writes the 8 permuted groups of vd (8 cycles) and
// pulses `done`. It is used while the arithmetic and memory pipelines are
// empty. The real design moves elements inside each lane and over a small
// bus between lane pairs; here the whole register is gathered in a buffer,
// which gives the same result.
module vperm_unit (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  viram_pkg::vop_e      op,
  input  viram_pkg::vreg_t     vs1,
  input  viram_pkg::vreg_t     vd,
  input  viram_pkg::vpw_e      vpw,
  input  viram_pkg::vl_t       vl,
  input  logic [7:0]           radix,
  output logic                 busy,
  output logic                 done,
  output viram_pkg::vreg_t     rd_reg [2],
  output viram_pkg::grp_t      rd_grp,
  input  viram_pkg::grp_data_t rd_data [2],
  output logic                 wr_en,
  output viram_pkg::vreg_t     wr_reg,
  output viram_pkg::grp_t      wr_grp,
  output viram_pkg::grp_be_t   wr_be,
  output viram_pkg::grp_data_t wr_data
);
  import viram_pkg::*;

  localparam int unsigned RW = NGRP * GRP_W;   // 2048-bit register image

  typedef enum logic [1:0] {P_IDLE, P_READ, P_WRITE} pstate_e;

  pstate_e     st;
  grp_t        g;
  vop_e        op_q;
  vreg_t       vs1_q, vd_q;
  vpw_e        vpw_q;
  vl_t         vl_q;
  logic [7:0]  rad_q;
  logic [RW-1:0] src, dst, res;

  // Source element index j for destination element i, and whether i is
  // written at all, for n elements in the register at the current VPW.
  function automatic logic [8:0] src_of(int unsigned i, int unsigned n, vop_e fop,
                                        vl_t fvl, logic [7:0] rad, output logic take);
    int unsigned h, d, j;
    h    = int'(fvl) / 2;
    d    = (rad == 0) ? 1 : int'(rad);
    j    = 0;
    take = 1'b0;
    if (i < n && i < int'(fvl)) begin
      case (fop)
        OP_HALF:  begin take = (i < h);             j = i + h; end
        OP_BFLYL: begin take = ((i % (2*d)) < d);  j = i + d; end
        OP_BFLYR: begin take = ((i % (2*d)) >= d); j = i - d; end
        default:  take = 1'b0;
      endcase
      if (j >= n) take = 1'b0;
    end
    return 9'(j);
  endfunction

  // One permutation network per element width. Element i of width W sits at
  // group i/(4k), lane i%4, sub-word (i%(4k))/4 of the register image.
  logic [RW-1:0] res16, res32, res64;

  for (genvar wi = 0; wi < 3; wi++) begin : g_w
    localparam int unsigned W = 16 << wi;
    localparam int unsigned K = 64 / W;
    localparam int unsigned N = RW / W;
    logic [W-1:0] se [N];
    logic [RW-1:0] r;
    for (genvar i = 0; i < N; i++) begin : g_e
      localparam int unsigned OFF = (i / (4*K))*GRP_W + (i % 4)*64 + ((i % (4*K)) / 4)*W;
      logic       take;
      logic [8:0] j;
      assign se[i] = src[OFF +: W];
      always_comb begin
        j = src_of(i, N, op_q, vl_q, rad_q, take);
        r[OFF +: W] = take ? se[j[$clog2(N)-1:0]] : dst[OFF +: W];
      end
    end
    if (wi == 0) begin : g_r16 assign res16 = r; end
    else if (wi == 1) begin : g_r32 assign res32 = r; end
    else begin : g_r64 assign res64 = r; end
  end

  assign res = (vpw_q == VPW16) ? res16 : (vpw_q == VPW32) ? res32 : res64;

  assign rd_reg[0] = vs1_q;
  assign rd_reg[1] = vd_q;
  assign rd_grp    = g;
  assign wr_en     = (st == P_WRITE);
  assign wr_reg    = vd_q;
  assign wr_grp    = g;
  assign wr_be     = '1;
  assign wr_data   = res[int'(g)*GRP_W +: GRP_W];
  assign busy      = (st != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= P_IDLE;
      g    <= '0;
      done <= 1'b0;
      op_q <= OP_NOP;
      vs1_q <= '0;
      vd_q  <= '0;
      vpw_q <= VPW64;
      vl_q  <= '0;
      rad_q <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          st    <= P_READ;
          g     <= '0;
          op_q  <= op;
          vs1_q <= vs1;
          vd_q  <= vd;
          vpw_q <= vpw;
          vl_q  <= vl;
          rad_q <= radix;
        end
        P_READ: begin
          g <= g + 1'b1;
          if (g == grp_t'(NGRP-1)) st <= P_WRITE;
        end
        P_WRITE: begin
          g <= g + 1'b1;
          if (g == grp_t'(NGRP-1)) begin
            st   <= P_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == P_READ) begin
      src[int'(g)*GRP_W +: GRP_W] <= rd_data[0];
      dst[int'(g)*GRP_W +: GRP_W] <= rd_data[1];
    end
  end

endmodule
