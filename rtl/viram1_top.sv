// viram1_top: the VIRAM-1 media processor without its scalar core.
//
// VIRAM-1 joins a scalar MIPS core, a vector coprocessor and an embedded-DRAM
// main memory on one die. This top holds the vector coprocessor (four 64-bit
// lanes, two arithmetic units, one memory unit, 8 KB vector registers), the
// memory crossbar, eight 1.75 MB DRAM banks (14 MB) and the two-channel DMA
// engine. The scalar core is not part of this RTL: its two connections are
// ports here, the coprocessor instruction port (vector instructions with
// their scalar operands) and a 256-bit memory port on the crossbar.
//
// Crossbar ports, lowest number first on a bank conflict: 0-3 vector stores
// (the oldest accesses, at the end of the delayed pipeline), 4-7 vector loads,
// 8 DMA, 9 scalar core. Addresses are byte addresses; consecutive 32-byte
// words go to consecutive banks.
//
// Timing: one clock (200 MHz in VIRAM-1), active-low asynchronous reset. The
// scalar memory port gets `sc_gnt` in the request cycle and read data
// DRAM_LAT cycles after the grant, on sc_rsp.
module viram1_top #(
  parameter int unsigned BANK_WORDS = viram_pkg::BANK_WORDS,
  parameter int unsigned DRAM_LAT   = viram_pkg::DRAM_LAT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coprocessor interface to the scalar core
  input  logic                 vi_valid,
  output logic                 vi_ready,
  input  viram_pkg::vinstr_t   vi_instr,
  output logic                 v_idle,
  output viram_pkg::vl_t       v_vl,
  output logic [7:0]           v_mvl,
  // scalar core memory port
  input  viram_pkg::mreq_t     sc_req,
  output logic                 sc_gnt,
  output viram_pkg::mrsp_t     sc_rsp,
  // DMA programming and system bus
  input  logic                 dma_start,
  input  logic                 dma_ch,
  input  logic [31:0]          dma_ext_addr,
  input  logic [31:0]          dma_dram_addr,
  input  logic [15:0]          dma_nwords,
  input  logic                 dma_dir,
  output logic [1:0]           dma_busy,
  output logic [1:0]           dma_done,
  output logic                 sb_req_valid,
  input  logic                 sb_req_ready,
  output logic                 sb_req_we,
  output logic [31:0]          sb_req_addr,
  output logic [255:0]         sb_req_wdata,
  input  logic                 sb_rsp_valid,
  input  logic [255:0]         sb_rsp_rdata
);
  import viram_pkg::*;

  localparam int unsigned NP  = 10;
  localparam int unsigned IDW = 4;
  localparam int unsigned BAW = $clog2(BANK_WORDS);

  mreq_t req [NP];
  logic  gnt [NP];
  mrsp_t rsp [NP];

  mreq_t v_lreq [4];
  logic  v_lgnt [4];
  mrsp_t v_lrsp [4];
  mreq_t v_sreq [4];
  logic  v_sgnt [4];
  logic  v_stall;

  vcoproc u_vc (
    .clk, .rst_n, .in_valid(vi_valid), .in_ready(vi_ready), .in_instr(vi_instr),
    .idle(v_idle), .vl(v_vl), .mvl(v_mvl),
    .lreq(v_lreq), .lgnt(v_lgnt), .lrsp(v_lrsp), .sreq(v_sreq), .sgnt(v_sgnt),
    .stall(v_stall)
  );

  mreq_t d_req;
  mrsp_t d_rsp;
  logic  d_gnt;

  dma_engine #(.NCH(2)) u_dma (
    .clk, .rst_n, .cfg_start(dma_start), .cfg_ch(dma_ch), .cfg_ext_addr(dma_ext_addr),
    .cfg_dram_addr(dma_dram_addr), .cfg_nwords(dma_nwords), .cfg_dir(dma_dir),
    .ch_busy(dma_busy), .ch_done(dma_done),
    .sb_req_valid, .sb_req_ready, .sb_req_we, .sb_req_addr, .sb_req_wdata,
    .sb_rsp_valid, .sb_rsp_rdata,
    .xreq(d_req), .xgnt(d_gnt), .xrsp(d_rsp)
  );

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      req[p]     = v_sreq[p];
      req[4 + p] = v_lreq[p];
      v_sgnt[p]  = gnt[p];
      v_lgnt[p]  = gnt[4 + p];
      v_lrsp[p]  = rsp[4 + p];
    end
    req[8] = d_req;
    req[9] = sc_req;
  end
  assign d_gnt  = gnt[8];
  assign d_rsp  = rsp[8];
  assign sc_gnt = gnt[9];
  assign sc_rsp = rsp[9];

  logic             b_valid [NBANK];
  logic             b_ready [NBANK];
  logic             b_we    [NBANK];
  logic [BAW-1:0]   b_addr  [NBANK];
  logic [255:0]     b_wdata [NBANK];
  logic [31:0]      b_be    [NBANK];
  logic [IDW-1:0]   b_id    [NBANK];
  logic [TAG_W-1:0] b_tag   [NBANK];
  logic             r_valid [NBANK];
  logic [255:0]     r_rdata [NBANK];
  logic [IDW-1:0]   r_id    [NBANK];
  logic [TAG_W-1:0] r_tag   [NBANK];
  logic             b_act   [NBANK];

  mem_xbar #(.NP(NP), .NB(NBANK), .BAW(BAW), .IDW(IDW)) u_xbar (
    .req, .gnt, .rsp,
    .b_valid, .b_ready, .b_we, .b_addr, .b_wdata, .b_be, .b_id, .b_tag,
    .r_valid, .r_rdata, .r_id, .r_tag
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    dram_bank #(.WORDS(BANK_WORDS), .LAT(DRAM_LAT), .ROW_WORDS(32), .IDW(IDW), .TW(TAG_W)) u_bank (
      .clk, .rst_n,
      .req_valid(b_valid[b]), .req_ready(b_ready[b]), .req_we(b_we[b]), .req_addr(b_addr[b]),
      .req_wdata(b_wdata[b]), .req_be(b_be[b]), .req_id(b_id[b]), .req_tag(b_tag[b]),
      .rsp_valid(r_valid[b]), .rsp_rdata(r_rdata[b]), .rsp_id(r_id[b]), .rsp_tag(r_tag[b]),
      .act(b_act[b])
    );
  end

  // The delayed pipeline budgets the DRAM latency between the load request
  // (stage 0) and the register write (stage 14).
  initial assert (DRAM_LAT < ST_VW_LD);

endmodule
