// varith_unit: one vector arithmetic functional unit (Arith Unit 0 or 1).
//
// It executes one element group (four lanes x one 64-bit word) per cycle.
// Following the delayed pipeline of VIRAM-1, an operation issued at stage 0
// first passes idle delay stages 1..13, reads its source operands and its
// mask at stage 14 (VR), the same stage at which a vector load writes its
// result, executes in stage 15 (X) and writes the register file or a flag
// register at stage 16 (VW). An add issued one cycle after the load that
// fetches its source therefore needs no stall. One execute stage is this
// design's choice (the design shows X0..XN).
//
// Masked execution ignores updates: every element is computed, but only the
// elements with index < VL whose mask bit (vf0 or vf1, chosen by msel) is set
// are written. Compares write one flag bit per active element. The .vs form
// replaces the second operand by the scalar replicated to every element.
//
// Interface: iss is sampled in the issue cycle; three register read ports and
// one flag read port are used at stage 14; one register write port and one
// flag write port at stage 16. When `stall` is high nothing moves and nothing
// is written. `busy` is high while any stage holds an operation.
module varith_unit (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 stall,
  input  viram_pkg::uop_t      iss,
  // register file reads at VR
  output viram_pkg::vreg_t     rd_reg [3],
  output viram_pkg::grp_t      rd_grp,
  input  viram_pkg::grp_data_t rd_data [3],
  output viram_pkg::freg_t     frd_reg,
  input  viram_pkg::flag_t     frd_data,
  // write-back at VW
  output logic                 wr_en,
  output viram_pkg::vreg_t     wr_reg,
  output viram_pkg::grp_t      wr_grp,
  output viram_pkg::grp_be_t   wr_be,
  output viram_pkg::grp_data_t wr_data,
  output logic                 fwr_en,
  output viram_pkg::freg_t     fwr_reg,
  output viram_pkg::flag_t     fwr_bm,
  output viram_pkg::flag_t     fwr_data,
  output logic                 busy
);
  import viram_pkg::*;

  uop_t      pipe [1:ST_VR];     // delay stages and the VR stage
  uop_t      ex_u, wb_u;         // X and VW stages
  grp_data_t ex_a, ex_b, ex_c;
  grp_be_t   ex_be;
  grp_data_t wb_r;
  grp_be_t   wb_be;
  logic [LANES*4-1:0] wb_f;
  logic [63:0]        bsc;
  grp_data_t          lane_r;
  logic [LANES*4-1:0] lane_f;

  // ---------------------------------------------------------- delay stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= ST_VR; s++) pipe[s] <= '0;
      ex_u <= '0;
      wb_u <= '0;
    end else if (!stall) begin
      pipe[1] <= iss;
      for (int s = 2; s <= ST_VR; s++) pipe[s] <= pipe[s-1];
      ex_u <= pipe[ST_VR];
      wb_u <= ex_u;
    end
  end

  // ---------------------------------------------------------- VR stage
  assign rd_reg[0] = pipe[ST_VR].vs1;
  assign rd_reg[1] = pipe[ST_VR].vs2;
  assign rd_reg[2] = pipe[ST_VR].vd;      // accumulator of multiply-add
  assign rd_grp    = pipe[ST_VR].grp;
  assign frd_reg   = {3'b000, pipe[ST_VR].msel};

  always_comb begin
    case (pipe[ST_VR].vpw)
      VPW16:   bsc = {4{pipe[ST_VR].scalar[15:0]}};
      VPW32:   bsc = {2{pipe[ST_VR].scalar[31:0]}};
      default: bsc = pipe[ST_VR].scalar;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!stall) begin
      ex_a  <= rd_data[0];
      ex_b  <= pipe[ST_VR].vs ? {LANES{bsc}} : rd_data[1];
      ex_c  <= rd_data[2];
      ex_be <= elem_be(pipe[ST_VR].grp, pipe[ST_VR].vpw, pipe[ST_VR].vl, frd_data);
    end
  end

  // ---------------------------------------------------------- X stage
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    varith_lane u_lane (
      .op(ex_u.op), .vpw(ex_u.vpw),
      .a(ex_a[l*64 +: 64]), .b(ex_b[l*64 +: 64]), .c(ex_c[l*64 +: 64]),
      .hi(ex_u.hi), .shamt(ex_u.shamt), .rnd(ex_u.rnd),
      .r(lane_r[l*64 +: 64]), .f(lane_f[l*4 +: 4])
    );
  end

  always_ff @(posedge clk) begin
    if (!stall) begin
      wb_r  <= lane_r;
      wb_f  <= lane_f;
      wb_be <= ex_be;
    end
  end

  // ---------------------------------------------------------- VW stage
  logic is_cmp;
  assign is_cmp  = (wb_u.op == OP_CMPLT) || (wb_u.op == OP_CMPEQ);
  assign wr_en   = wb_u.valid && !is_cmp && !stall;
  assign wr_reg  = wb_u.vd;
  assign wr_grp  = wb_u.grp;
  assign wr_be   = wb_be;
  assign wr_data = wb_r;
  assign fwr_en  = wb_u.valid && is_cmp && !stall;
  assign fwr_reg = wb_u.fd;

  // Flag bits of this group: element i = (g*k + s)*LANES + l.
  always_comb begin
    int unsigned k, i;
    k        = vpw_k(wb_u.vpw);
    i        = 0;
    fwr_bm   = '0;
    fwr_data = '0;
    for (int unsigned s = 0; s < 4; s++)
      for (int unsigned l = 0; l < LANES; l++)
        if (s < k) begin
          i = (int'(wb_u.grp) * k + s) * LANES + l;
          if (i < MVL_MAX) begin
            fwr_bm[i]   = wb_be[l*8 + s*(8/k)];
            fwr_data[i] = wb_f[l*4 + s];
          end
        end
  end

  always_comb begin
    busy = ex_u.valid || wb_u.valid;
    for (int s = 1; s <= ST_VR; s++) busy = busy || pipe[s].valid;
  end

endmodule
