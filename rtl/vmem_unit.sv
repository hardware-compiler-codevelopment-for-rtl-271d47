// vmem_unit: the vector memory (load/store) unit with its delayed pipeline.
//
// There is no cache: every vector access goes to the DRAM banks through the
// crossbar. One element group is handled per micro-op. The pipeline has 15
// stages, numbered from issue:
//   stage 0  (G)   four address generators form the element addresses; loads
//                  send their requests to the crossbar here,
//   stage 1  (T)   translation slot (addresses are physical in this design),
//   stage 14 (VW)  loads write the register file; stores read their data and
//                  mask (VR) and send the write requests.
// Stages 2..13 cover the DRAM latency, which is always budgeted as a full row
// access. Read data return from the banks into a buffer indexed by a slot tag
// given at stage 0, so their exact arrival time does not matter as long as it
// is before stage 14.
//
// Access patterns: unit-stride (sequential) micro-ops move a whole 256-bit
// group per cycle and may start at any byte address, so they use at most two
// memory words (ports 0 and 1). Strided and indexed micro-ops move four
// elements per cycle, one per address generator and port: for VPW narrower
// than 64 a group takes 64/VPW micro-ops, one per sub-word slot `sub`. The
// index register is read at stage 0. Strided/indexed elements must be aligned
// to their size. Memory data may be as wide as the register elements or
// narrower (8, 16 or 32 bits, field `mw`): they are packed densely in memory,
// sign- or zero-extended (`munsigned`) on load and truncated on store, so a
// unit-stride group then covers fewer than 32 bytes. Memory operations leave the
// unit in program order, but a store writes at stage 14 while a later load
// reads at stage 0, so a load that must see an earlier store to the same
// addresses needs software to wait for the store to finish (a memory
// barrier); the unit does not compare addresses.
//
// Stalls: if the crossbar refuses any request of the stage-0 load or the
// stage-14 store (bank conflict or busy bank), `stall` is raised, the whole
// coprocessor pipeline freezes for the cycle and the refused requests are
// retried; granted ones are remembered and not repeated.
module vmem_unit (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 stall,      // global freeze (includes our own)
  output logic                 stall_req,
  input  viram_pkg::uop_t      iss,
  // register file
  output viram_pkg::vreg_t     rd_reg [2], // 0: index (stage 0), 1: store data (stage 14)
  output viram_pkg::grp_t      rd_grp [2],
  input  viram_pkg::grp_data_t rd_data [2],
  output viram_pkg::freg_t     frd_reg,
  input  viram_pkg::flag_t     frd_data,
  output logic                 wr_en,
  output viram_pkg::vreg_t     wr_reg,
  output viram_pkg::grp_t      wr_grp,
  output viram_pkg::grp_be_t   wr_be,
  output viram_pkg::grp_data_t wr_data,
  // crossbar: load ports and store ports
  output viram_pkg::mreq_t     lreq [4],
  input  logic                 lgnt [4],
  input  viram_pkg::mrsp_t     lrsp [4],
  output viram_pkg::mreq_t     sreq [4],
  input  logic                 sgnt [4],
  output logic                 busy
);
  import viram_pkg::*;

  localparam int unsigned NSLOT = 16;

  typedef struct packed {
    uop_t                   u;
    logic [3:0]             slot;
    logic [3:0][ADDR_W-1:0] addr;   // element / group addresses
  } mstage_t;

  mstage_t   pipe [1:ST_VW_LD];
  mstage_t   s0;
  logic [3:0] slot_ctr;
  logic [3:0] ldone, sdone;         // requests already granted
  logic [3:0] lneed, sneed;
  logic [3:0] lgv, sgv;
  logic [255:0] rbuf [NSLOT][4];

  // ------------------------------------------------------------- stage 0
  function automatic logic [ADDR_W-1:0] elem_idx(uop_t u, int unsigned l);
    return ADDR_W'((int'(u.grp) * vpw_k(u.vpw) + int'(u.sub)) * LANES + l);
  endfunction

  assign rd_reg[0] = iss.vs2;
  assign rd_grp[0] = iss.grp;

  // Bytes one unit-stride group covers in memory (at most 32).
  logic [5:0] s0_gb;
  assign s0_gb = 6'(4 * vpw_k(iss.vpw) * mem_bytes(iss.vpw, iss.mw));

  always_comb begin
    logic [63:0] lw;
    logic [63:0] ix;
    int unsigned bw;
    s0      = '0;
    s0.u    = iss;
    s0.slot = slot_ctr;
    lneed   = '0;
    bw      = vpw_bits(iss.vpw);
    lw      = '0;
    ix      = '0;
    if (iss.amode == AM_SEQ) begin
      s0.addr[0] = iss.base + ADDR_W'(iss.grp) * ADDR_W'(s0_gb);
      s0.addr[1] = s0.addr[0] + 32;
      lneed[0]   = 1'b1;
      lneed[1]   = (7'(s0.addr[0][4:0]) + 7'(s0_gb) > 7'd32);
    end else begin
      for (int unsigned l = 0; l < 4; l++) begin
        lw = rd_data[0][l*64 +: 64];
        ix = lw >> (int'(iss.sub) * bw);
        if (bw == 16)      ix = {48'd0, ix[15:0]};
        else if (bw == 32) ix = {32'd0, ix[31:0]};
        if (iss.amode == AM_STRIDE) s0.addr[l] = iss.base + elem_idx(iss, l) * iss.stride;
        else                        s0.addr[l] = iss.base + ADDR_W'(ix);
        lneed[l] = (elem_idx(iss, l) < ADDR_W'(iss.vl));
      end
    end
    if (!(iss.valid && iss.op == OP_LD)) lneed = '0;
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      lreq[p]       = '0;
      lreq[p].valid = lneed[p] && !ldone[p];
      lreq[p].we    = 1'b0;
      lreq[p].waddr = s0.addr[p][ADDR_W-1:5];
      lreq[p].tag   = TAG_W'(slot_ctr);
      lgv[p]        = lgnt[p];
    end
  end

  // ------------------------------------------------------------- stage 14
  mstage_t  sw;
  logic [511:0] sdata512;
  logic [63:0]  sbe512;
  grp_data_t    mem_img;
  grp_be_t      mem_be;
  flag_t        mask;
  logic [3:0][255:0] swdata;
  logic [3:0][31:0]  swbe;

  assign sw       = pipe[ST_VW_LD];
  assign rd_reg[1] = sw.u.vd;
  assign rd_grp[1] = sw.u.grp;
  assign frd_reg  = {3'b000, sw.u.msel};
  assign mask     = frd_data;

  // byte enables of a unit-stride group in memory order
  // Packing between the lane layout and memory order for every pair of
  // element width BW and memory width MW <= BW: element p of the group sits
  // at bits p*MW in memory, truncated on store and extended on load.
  logic [511:0]           ld_two;
  logic [2:0][3:0][255:0] st_img, ld_img;
  int unsigned            sw_mb;
  logic [1:0]             sw_mi;
  logic [63:0]            sw_mmask;

  assign sw_mb    = mem_bytes(sw.u.vpw, sw.u.mw);
  assign sw_mi    = (sw_mb == 1) ? 2'd0 : (sw_mb == 2) ? 2'd1 : (sw_mb == 4) ? 2'd2 : 2'd3;
  assign sw_mmask = (sw_mb == 8) ? '1 : ((64'd1 << (sw_mb * 8)) - 64'd1);
  assign ld_two   = {rbuf[sw.slot][1], rbuf[sw.slot][0]} >> (sw.addr[0][4:0] * 8);

  for (genvar wi = 0; wi < 3; wi++) begin : g_w
    localparam int unsigned BW = 16 << wi;
    localparam int unsigned K  = 64 / BW;
    for (genvar mi = 0; mi < 4; mi++) begin : g_m
      localparam int unsigned MW = 8 << mi;
      if (MW <= BW) begin : g_ok
        for (genvar p = 0; p < 4*K; p++) begin : g_p
          assign st_img[wi][mi][p*MW +: MW] = rd_data[1][(p%4)*64 + (p/4)*BW +: MW];
          assign ld_img[wi][mi][(p%4)*64 + (p/4)*BW +: BW] =
            sw.u.munsigned ? BW'(ld_two[p*MW +: MW]) : BW'($signed(ld_two[p*MW +: MW]));
        end
        if (4*K*MW < 256) begin : g_pad
          assign st_img[wi][mi][255:4*K*MW] = '0;
        end
      end else begin : g_no
        assign st_img[wi][mi] = '0;
        assign ld_img[wi][mi] = '0;
      end
    end
  end

  always_comb begin
    int unsigned k, idx;
    k      = vpw_k(sw.u.vpw);
    idx    = 0;
    mem_be = '0;
    for (int unsigned p = 0; p < 16; p++)
      if (p < 4*k) begin
        idx = int'(sw.u.grp) * 4 * k + p;
        if (idx < int'(sw.u.vl) && mask[idx])
          for (int unsigned b = 0; b < 8; b++)
            if (b < sw_mb) mem_be[p*sw_mb + b] = 1'b1;
      end
  end

  always_comb begin
    int unsigned bw, e;
    logic [63:0] ev;
    bw       = vpw_bits(sw.u.vpw);
    e        = 0;
    ev       = '0;
    mem_img  = st_img[sw.u.vpw][sw_mi];
    sdata512 = {256'd0, mem_img} << (sw.addr[0][4:0] * 8);
    sbe512   = {32'd0, mem_be} << sw.addr[0][4:0];
    sneed    = '0;
    swdata   = '0;
    swbe     = '0;
    if (sw.u.amode == AM_SEQ) begin
      swdata[0] = sdata512[255:0];
      swdata[1] = sdata512[511:256];
      swbe[0]   = sbe512[31:0];
      swbe[1]   = sbe512[63:32];
      sneed[0]  = (swbe[0] != '0);
      sneed[1]  = (swbe[1] != '0);
    end else begin
      for (int unsigned l = 0; l < 4; l++) begin
        e  = (int'(sw.u.grp) * vpw_k(sw.u.vpw) + int'(sw.u.sub)) * LANES + l;
        ev = (rd_data[1][l*64 +: 64] >> (int'(sw.u.sub) * bw)) & sw_mmask;
        swdata[l] = {192'd0, ev} << (sw.addr[l][4:0] * 8);
        swbe[l]   = ((32'd1 << sw_mb) - 32'd1) << sw.addr[l][4:0];
        sneed[l]  = (e < int'(sw.u.vl)) && (e < MVL_MAX) && mask[e];
      end
    end
    if (!(sw.u.valid && sw.u.op == OP_ST)) sneed = '0;
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      sreq[p]       = '0;
      sreq[p].valid = sneed[p] && !sdone[p];
      sreq[p].we    = 1'b1;
      sreq[p].waddr = (sw.u.amode == AM_SEQ && p == 1) ? sw.addr[1][ADDR_W-1:5]
                                                       : sw.addr[p][ADDR_W-1:5];
      sreq[p].wdata = swdata[p];
      sreq[p].be    = swbe[p];
      sgv[p]        = sgnt[p];
    end
  end

  // load write-back: assemble the group from the returned words
  always_comb begin
    int unsigned  bw;
    logic [63:0]  ev;
    grp_be_t      be_all;
    bw      = vpw_bits(sw.u.vpw);
    ev      = '0;
    be_all  = elem_be(sw.u.grp, sw.u.vpw, sw.u.vl, mask);
    wr_data = '0;
    wr_be   = '0;
    if (sw.u.amode == AM_SEQ) begin
      wr_data = ld_img[sw.u.vpw][sw_mi];
      wr_be   = be_all;
    end else begin
      for (int unsigned l = 0; l < 4; l++) begin
        ev = 64'(rbuf[sw.slot][l] >> (sw.addr[l][4:0] * 8)) & sw_mmask;
        if (!sw.u.munsigned && (ev & ((sw_mmask >> 1) + 64'd1)) != 0) ev = ev | ~sw_mmask;
        wr_data[l*64 +: 64] = ev << (int'(sw.u.sub) * bw);
        for (int unsigned b = 0; b < 8; b++)
          if (b >= int'(sw.u.sub) * bw/8 && b < (int'(sw.u.sub) + 1) * bw/8)
            wr_be[l*8 + b] = be_all[l*8 + b];
      end
    end
  end

  assign wr_en  = sw.u.valid && sw.u.op == OP_LD && !stall;
  assign wr_reg = sw.u.vd;
  assign wr_grp = sw.u.grp;

  // ------------------------------------------------------------- stall
  logic lstall, sstall;
  always_comb begin
    lstall = 1'b0;
    sstall = 1'b0;
    for (int p = 0; p < 4; p++) begin
      if (lneed[p] && !ldone[p] && !lgv[p]) lstall = 1'b1;
      if (sneed[p] && !sdone[p] && !sgv[p]) sstall = 1'b1;
    end
  end
  assign stall_req = lstall || sstall;

  // ------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= ST_VW_LD; s++) pipe[s] <= '0;
      slot_ctr <= '0;
      ldone    <= '0;
      sdone    <= '0;
    end else if (stall) begin
      for (int p = 0; p < 4; p++) begin
        if (lreq[p].valid && lgv[p]) ldone[p] <= 1'b1;
        if (sreq[p].valid && sgv[p]) sdone[p] <= 1'b1;
      end
    end else begin
      pipe[1] <= s0;
      for (int s = 2; s <= ST_VW_LD; s++) pipe[s] <= pipe[s-1];
      if (iss.valid && iss.op == OP_LD) slot_ctr <= slot_ctr + 1'b1;
      ldone <= '0;
      sdone <= '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++)
      if (lrsp[p].valid) rbuf[lrsp[p].tag[3:0]][p] <= lrsp[p].rdata;
  end

  always_comb begin
    busy = 1'b0;
    for (int s = 1; s <= ST_VW_LD; s++) busy = busy || pipe[s].u.valid;
  end

endmodule
