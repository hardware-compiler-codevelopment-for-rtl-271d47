// vcoproc: the VIRAM-1 vector coprocessor.
//
// Vector instructions arrive from the scalar core through an instruction
// queue. Three sequencers, one per functional unit (arithmetic unit 0,
// arithmetic unit 1, memory unit), each take one instruction and issue its
// element groups, one group per cycle, into that unit's delayed pipeline, so
// up to three vector instructions run at once. With four 64-bit lanes a group
// is 4, 8 or 16 elements (VPW 64, 32, 16), and an instruction of length VL
// takes ceil(VL / group size) cycles in its unit.
//
// Delayed pipeline: every unit reads its register operands at stage 14, the
// stage at which a load writes its result, and arithmetic results are written
// at stage 16. A vector add that uses the result of a load can therefore be
// issued one cycle after that load and follow it group by group without a
// stall, although the load waits a full DRAM row access. Correct ordering is
// kept by two simple rules:
//  * chaining: an instruction that shares a register with an older one still
//    being issued by another sequencer issues its group g only after the
//    older one has issued group g (flag dependences wait for the older
//    instruction to finish issuing, because flag bits of a group move with
//    VPW);
//  * write-time counters: each vector and flag register keeps the number of
//    cycles until its last pending write. A group issues only if every
//    register it reads is written before its read stage and every register
//    it writes was written before its own write stage.
// A memory bank conflict stalls the whole coprocessor for a cycle.
//
// Permutations (vperm_unit), flag logic (vflag_unit) wait until all units are
// empty and then run alone; VL and VPW changes take effect at once, because
// each sequencer keeps the VL and VPW its instruction was dispatched with.
// The queue depth, the rules above and the instruction record are this
// design's choices; lanes, register file sizes, unit count, VPW, masks,
// pipeline length and memory access modes follow VIRAM-1.
module vcoproc (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the scalar core
  input  logic                 in_valid,
  output logic                 in_ready,
  input  viram_pkg::vinstr_t   in_instr,
  output logic                 idle,
  output viram_pkg::vl_t       vl,
  output logic [7:0]           mvl,       // read-only maximum vector length
  // to the memory crossbar
  output viram_pkg::mreq_t     lreq [4],
  input  logic                 lgnt [4],
  input  viram_pkg::mrsp_t     lrsp [4],
  output viram_pkg::mreq_t     sreq [4],
  input  logic                 sgnt [4],
  output logic                 stall      // memory stall this cycle
);
  import viram_pkg::*;

  localparam int unsigned NSEQ = 3;       // 0, 1: arithmetic units, 2: memory unit

  typedef struct packed {
    logic     active;
    vinstr_t  in;
    vl_t      vl;
    vpw_e     vpw;
    logic [3:0] ngrp;
    grp_t     grp;
    logic [1:0] sub;
    logic [NSEQ-1:0] dep;     // group-by-group chaining on these sequencers
    logic [NSEQ-1:0] depf;    // wait for these sequencers to finish
  } seq_t;

  typedef struct packed {
    logic [NVREG-1:0] vr;     // vector registers read
    logic [NVREG-1:0] vw;     // vector registers written
    logic [NFREG-1:0] fr;
    logic [NFREG-1:0] fw;
  } use_t;

  // ------------------------------------------------------------ queue
  logic    q_valid, q_pop;
  vinstr_t q;

  vinstq #(.DEPTH(4)) u_q (
    .clk, .rst_n, .in_valid, .in_ready, .in_instr,
    .out_valid(q_valid), .out_ready(q_pop), .out_instr(q)
  );

  // ------------------------------------------------------------ decode
  function automatic logic is_arith(vop_e op);
    return op inside {OP_ADD, OP_SUB, OP_ADDS, OP_SUBS, OP_AND, OP_OR, OP_XOR,
                      OP_SLL, OP_SRL, OP_SRA, OP_MIN, OP_MAX, OP_MUL, OP_MADD,
                      OP_CMPLT, OP_CMPEQ};
  endfunction

  function automatic logic is_cmp(vop_e op);
    return op inside {OP_CMPLT, OP_CMPEQ};
  endfunction

  function automatic logic is_flag(vop_e op);
    return op inside {OP_FAND, OP_FOR, OP_FXOR, OP_FNOT, OP_FMOV};
  endfunction

  function automatic logic is_perm(vop_e op);
    return op inside {OP_HALF, OP_BFLYL, OP_BFLYR};
  endfunction

  function automatic use_t uses(vinstr_t i);
    use_t u;
    u = '0;
    u.fr[{3'b000, i.msel}] = 1'b1;
    if (is_arith(i.op)) begin
      u.vr[i.vs1] = 1'b1;
      if (!i.vs) u.vr[i.vs2] = 1'b1;
      if (i.op == OP_MADD) u.vr[i.vd] = 1'b1;
      if (is_cmp(i.op)) u.fw[i.fd] = 1'b1;
      else              u.vw[i.vd] = 1'b1;
    end else if (i.op == OP_LD) begin
      if (i.amode == AM_INDEX) u.vr[i.vs2] = 1'b1;
      u.vw[i.vd] = 1'b1;
    end else if (i.op == OP_ST) begin
      if (i.amode == AM_INDEX) u.vr[i.vs2] = 1'b1;
      u.vr[i.vd] = 1'b1;
    end
    return u;
  endfunction

  function automatic logic [7:0] mvl_of(vpw_e w);
    return 8'(MVL64 * vpw_k(w));
  endfunction

  // ------------------------------------------------------------ state
  seq_t        seq [NSEQ];
  vl_t         vl_r;
  vpw_e        vpw_r;
  logic [4:0]  vcnt [NVREG];
  logic [4:0]  fcnt [NFREG];
  logic        bar_run;           // a permutation is running

  assign vl  = vl_r;
  assign mvl = mvl_of(vpw_r);

  vpw_e set_vpw;
  assign set_vpw = (q.scalar[1:0] == 2'd0) ? VPW16 : (q.scalar[1:0] == 2'd1) ? VPW32 : VPW64;

  // unit status
  logic a_busy [2];
  logic m_busy, p_busy, p_done;
  logic any_busy;
  assign any_busy = a_busy[0] || a_busy[1] || m_busy || p_busy;

  // ------------------------------------------------------------ issue
  uop_t            uop [NSEQ];
  logic [NSEQ-1:0] ready, fire, last;

  always_comb begin
    for (int u = 0; u < NSEQ; u++) begin
      vinstr_t in;
      use_t    us;
      logic    ok;
      in = seq[u].in;
      us = uses(in);
      ok = seq[u].active;
      // chaining on older instructions in other units
      for (int j = 0; j < NSEQ; j++) begin
        if (seq[u].dep[j]  && seq[j].active && !(seq[j].grp > seq[u].grp)) ok = 1'b0;
        if (seq[u].depf[j] && seq[j].active) ok = 1'b0;
      end
      // pending writes
      for (int r = 0; r < NVREG; r++) begin
        if (us.vw[r] && vcnt[r] > 5'((u == 2) ? ST_VW_LD : ST_VW_AR)) ok = 1'b0;
        if (us.vr[r]) begin
          if (u == 2 && in.amode == AM_INDEX && r == int'(in.vs2)) begin
            if (vcnt[r] != 0) ok = 1'b0;               // index read at stage 0
          end else if (vcnt[r] > 5'(ST_VR)) ok = 1'b0;
        end
      end
      for (int r = 0; r < NFREG; r++) begin
        if (us.fw[r] && fcnt[r] > 5'(ST_VW_AR)) ok = 1'b0;
        if (us.fr[r] && fcnt[r] > 5'(ST_VR))    ok = 1'b0;
      end
      ready[u] = ok;
      last[u]  = (seq[u].grp == grp_t'(seq[u].ngrp - 4'd1)) &&
                 (u != 2 || in.amode == AM_SEQ || seq[u].sub == 2'(vpw_k(seq[u].vpw) - 1));

      uop[u]        = '0;
      uop[u].valid  = ready[u];
      uop[u].op     = in.op;
      uop[u].vd     = in.vd;
      uop[u].vs1    = in.vs1;
      uop[u].vs2    = in.vs2;
      uop[u].fd     = in.fd;
      uop[u].msel   = in.msel;
      uop[u].vs     = in.vs;
      uop[u].hi     = in.hi;
      uop[u].rnd    = in.rnd;
      uop[u].shamt  = in.shamt;
      uop[u].scalar = in.scalar;
      uop[u].grp    = seq[u].grp;
      uop[u].sub    = seq[u].sub;
      uop[u].vpw    = seq[u].vpw;
      uop[u].vl     = seq[u].vl;
      uop[u].amode  = in.amode;
      uop[u].mw     = in.mw;
      uop[u].munsigned = in.munsigned;
      uop[u].base   = in.base;
      uop[u].stride = in.stride;
    end
  end

  assign fire = ready & {NSEQ{!stall}};

  // ------------------------------------------------------------ dispatch
  logic [NSEQ-1:0] disp;
  logic            do_flag, do_perm, do_set;
  use_t            qu;

  always_comb begin
    disp    = '0;
    do_flag = 1'b0;
    do_perm = 1'b0;
    do_set  = 1'b0;
    qu      = uses(q);
    if (q_valid && !bar_run) begin
      if (is_arith(q.op)) begin
        if (!seq[0].active)      disp[0] = 1'b1;
        else if (!seq[1].active) disp[1] = 1'b1;
      end else if (q.op == OP_LD || q.op == OP_ST) begin
        if (!seq[2].active) disp[2] = 1'b1;
      end else if (is_flag(q.op) || is_perm(q.op)) begin
        if (seq[0].active == 1'b0 && seq[1].active == 1'b0 && seq[2].active == 1'b0 && !any_busy) begin
          do_flag = is_flag(q.op);
          do_perm = is_perm(q.op);
        end
      end else begin
        do_set = 1'b1;                  // SETVL, SETVPW, NOP
      end
    end
    q_pop = (|disp) || do_flag || do_perm || do_set;
  end

  // next values of the write-time counters
  logic [4:0]      vcnt_n [NVREG];
  logic [4:0]      fcnt_n [NFREG];
  logic [NSEQ-1:0] dep_n, depf_n;   // dependences of the instruction being dispatched
  use_t            su [NSEQ];

  always_comb begin
    for (int u = 0; u < NSEQ; u++) su[u] = uses(seq[u].in);
    for (int r = 0; r < NVREG; r++) begin
      vcnt_n[r] = (vcnt[r] != 0) ? vcnt[r] - 1'b1 : 5'd0;
      for (int u = 0; u < NSEQ; u++)
        if (fire[u] && su[u].vw[r]) begin
          if (u == 2) vcnt_n[r] = (vcnt_n[r] > 5'(ST_VW_LD)) ? vcnt_n[r] : 5'(ST_VW_LD);
          else        vcnt_n[r] = (vcnt_n[r] > 5'(ST_VW_AR)) ? vcnt_n[r] : 5'(ST_VW_AR);
        end
    end
    for (int r = 0; r < NFREG; r++) begin
      fcnt_n[r] = (fcnt[r] != 0) ? fcnt[r] - 1'b1 : 5'd0;
      for (int u = 0; u < 2; u++)
        if (fire[u] && su[u].fw[r]) fcnt_n[r] = (fcnt_n[r] > 5'(ST_VW_AR)) ? fcnt_n[r] : 5'(ST_VW_AR);
    end
    for (int j = 0; j < NSEQ; j++) begin
      dep_n[j]  = seq[j].active && !(fire[j] && last[j]) &&
                  (((qu.vw & (su[j].vr | su[j].vw)) != 0) || ((qu.vr & su[j].vw) != 0));
      depf_n[j] = seq[j].active && !(fire[j] && last[j]) &&
                  (((qu.fw & (su[j].fr | su[j].fw)) != 0) || ((qu.fr & su[j].fw) != 0));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NSEQ; u++) seq[u] <= '0;
      for (int r = 0; r < NVREG; r++) vcnt[r] <= '0;
      for (int r = 0; r < NFREG; r++) fcnt[r] <= '0;
      vl_r    <= vl_t'(MVL64);
      vpw_r   <= VPW64;
      bar_run <= 1'b0;
    end else begin
      // write-time counters
      if (!stall) begin
        vcnt <= vcnt_n;
        fcnt <= fcnt_n;
      end
      // sequencers
      for (int u = 0; u < NSEQ; u++) begin
        if (fire[u]) begin
          if (u == 2 && seq[u].in.amode != AM_SEQ && seq[u].sub != 2'(vpw_k(seq[u].vpw) - 1)) begin
            seq[u].sub <= seq[u].sub + 1'b1;
          end else begin
            seq[u].sub <= '0;
            seq[u].grp <= seq[u].grp + 1'b1;
          end
          if (last[u]) seq[u].active <= 1'b0;
        end
        // an older instruction that finishes issuing releases its dependents
        for (int j = 0; j < NSEQ; j++)
          if (fire[j] && last[j]) begin
            seq[u].dep[j]  <= 1'b0;
            seq[u].depf[j] <= 1'b0;
          end
      end
      for (int u = 0; u < NSEQ; u++) begin
        if (disp[u]) begin
          seq[u].in     <= q;
          seq[u].vl     <= vl_r;
          seq[u].vpw    <= vpw_r;
          seq[u].ngrp   <= 4'(n_groups(vl_r, vpw_r));
          seq[u].grp    <= '0;
          seq[u].sub    <= '0;
          seq[u].active <= (vl_r != 0);
          seq[u].dep  <= dep_n;
          seq[u].depf <= depf_n;
        end
      end
      // control registers
      if (do_set) begin
        if (q.op == OP_SETVL)
          vl_r <= (q.scalar > 64'(mvl_of(vpw_r))) ? mvl_of(vpw_r) : vl_t'(q.scalar);
        else if (q.op == OP_SETVPW) begin
          vpw_r <= set_vpw;
          if (vl_r > mvl_of(set_vpw)) vl_r <= mvl_of(set_vpw);   // VL never exceeds MVL
        end
      end
      if (do_perm)      bar_run <= 1'b1;
      else if (p_done)  bar_run <= 1'b0;
    end
  end

  // ------------------------------------------------------------ register files
  grp_data_t rd_data [10];
  vreg_t     rd_reg  [10];
  grp_t      rd_grp  [10];
  logic      wr_en   [4];
  vreg_t     wr_reg  [4];
  grp_t      wr_grp  [4];
  grp_be_t   wr_be   [4];
  grp_data_t wr_data [4];

  vrf #(.NREG(NVREG), .NGRP(NGRP), .GW(GRP_W), .NRD(10), .NWR(4)) u_vrf (
    .clk, .rd_reg, .rd_grp, .rd_data, .wr_en, .wr_reg, .wr_grp, .wr_be, .wr_data
  );

  freg_t frd_reg  [5];
  flag_t frd_data [5];
  logic  fwr_en   [3];
  freg_t fwr_reg  [3];
  flag_t fwr_bm   [3];
  flag_t fwr_data [3];

  vfrf #(.NREG(NFREG), .FW(MVL_MAX), .NRD(5), .NWR(3)) u_vfrf (
    .clk, .rst_n, .rd_reg(frd_reg), .rd_data(frd_data),
    .wr_en(fwr_en), .wr_reg(fwr_reg), .wr_bm(fwr_bm), .wr_data(fwr_data)
  );

  // ------------------------------------------------------------ arithmetic units
  for (genvar a = 0; a < 2; a++) begin : g_arith
    vreg_t ar_reg [3];
    grp_t  ar_grp;
    grp_data_t ar_data [3];
    assign rd_reg[3*a+0] = ar_reg[0];
    assign rd_reg[3*a+1] = ar_reg[1];
    assign rd_reg[3*a+2] = ar_reg[2];
    assign rd_grp[3*a+0] = ar_grp;
    assign rd_grp[3*a+1] = ar_grp;
    assign rd_grp[3*a+2] = ar_grp;
    assign ar_data[0] = rd_data[3*a+0];
    assign ar_data[1] = rd_data[3*a+1];
    assign ar_data[2] = rd_data[3*a+2];

    varith_unit u_arith (
      .clk, .rst_n, .stall, .iss(uop[a]),
      .rd_reg(ar_reg), .rd_grp(ar_grp), .rd_data(ar_data),
      .frd_reg(frd_reg[a]), .frd_data(frd_data[a]),
      .wr_en(wr_en[a]), .wr_reg(wr_reg[a]), .wr_grp(wr_grp[a]), .wr_be(wr_be[a]),
      .wr_data(wr_data[a]),
      .fwr_en(fwr_en[a]), .fwr_reg(fwr_reg[a]), .fwr_bm(fwr_bm[a]), .fwr_data(fwr_data[a]),
      .busy(a_busy[a])
    );
  end

  // ------------------------------------------------------------ memory unit
  vreg_t     m_reg  [2];
  grp_t      m_grp  [2];
  grp_data_t m_data [2];
  assign rd_reg[6] = m_reg[0];
  assign rd_reg[7] = m_reg[1];
  assign rd_grp[6] = m_grp[0];
  assign rd_grp[7] = m_grp[1];
  assign m_data[0] = rd_data[6];
  assign m_data[1] = rd_data[7];

  vmem_unit u_mem (
    .clk, .rst_n, .stall, .stall_req(stall), .iss(uop[2]),
    .rd_reg(m_reg), .rd_grp(m_grp), .rd_data(m_data),
    .frd_reg(frd_reg[2]), .frd_data(frd_data[2]),
    .wr_en(wr_en[2]), .wr_reg(wr_reg[2]), .wr_grp(wr_grp[2]), .wr_be(wr_be[2]),
    .wr_data(wr_data[2]),
    .lreq, .lgnt, .lrsp, .sreq, .sgnt, .busy(m_busy)
  );

  // ------------------------------------------------------------ permutation unit
  vreg_t     p_reg  [2];
  grp_t      p_grp;
  grp_data_t p_data [2];
  assign rd_reg[8] = p_reg[0];
  assign rd_reg[9] = p_reg[1];
  assign rd_grp[8] = p_grp;
  assign rd_grp[9] = p_grp;
  assign p_data[0] = rd_data[8];
  assign p_data[1] = rd_data[9];

  vperm_unit u_perm (
    .clk, .rst_n, .start(do_perm), .op(q.op), .vs1(q.vs1), .vd(q.vd),
    .vpw(vpw_r), .vl(vl_r), .radix(q.scalar[7:0]), .busy(p_busy), .done(p_done),
    .rd_reg(p_reg), .rd_grp(p_grp), .rd_data(p_data),
    .wr_en(wr_en[3]), .wr_reg(wr_reg[3]), .wr_grp(wr_grp[3]), .wr_be(wr_be[3]),
    .wr_data(wr_data[3])
  );

  // ------------------------------------------------------------ flag unit
  flag_t f_res;
  logic  f_ok;
  assign frd_reg[3] = q.fs1;
  assign frd_reg[4] = q.fs2;

  vflag_unit u_flag (.op(q.op), .a(frd_data[3]), .b(frd_data[4]), .r(f_res), .valid_op(f_ok));

  assign fwr_en[2]   = do_flag && f_ok;
  assign fwr_reg[2]  = q.fd;
  assign fwr_bm[2]   = '1;
  assign fwr_data[2] = f_res;

  assign idle = !q_valid && !seq[0].active && !seq[1].active && !seq[2].active && !any_busy;

endmodule
