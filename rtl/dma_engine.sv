// dma_engine: two-channel DMA engine between the system bus and on-chip DRAM.
//
// Each channel is programmed with a system-bus word address, a DRAM byte
// address (256-bit aligned), a length in 256-bit words and a direction, and
// started. The engine moves one word at a time and alternates between the
// channels that have work, so both make progress. Into DRAM (dir = 0): read
// the word on the system bus, wait for the data, write it through the
// crossbar. Out of DRAM (dir = 1): read through the crossbar, wait for the
// data, write it on the system bus. `done` pulses for a channel when its last
// word has been moved.
//
// The design only states that a two-channel DMA engine on the crossbar
// connects to external devices or memory over a system bus; the programming
// interface, the word-at-a-time transfer and the valid/ready system-bus
// handshake (read data returned later on sb_rsp_valid) are this design's.
module dma_engine #(
  parameter int unsigned NCH = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // programming
  input  logic                 cfg_start,
  input  logic [$clog2(NCH)-1:0] cfg_ch,
  input  logic [31:0]          cfg_ext_addr,   // system bus word address
  input  logic [31:0]          cfg_dram_addr,  // DRAM byte address
  input  logic [15:0]          cfg_nwords,
  input  logic                 cfg_dir,        // 0: into DRAM, 1: out of DRAM
  output logic [NCH-1:0]       ch_busy,
  output logic [NCH-1:0]       ch_done,
  // system bus
  output logic                 sb_req_valid,
  input  logic                 sb_req_ready,
  output logic                 sb_req_we,
  output logic [31:0]          sb_req_addr,
  output logic [255:0]         sb_req_wdata,
  input  logic                 sb_rsp_valid,
  input  logic [255:0]         sb_rsp_rdata,
  // crossbar port
  output viram_pkg::mreq_t     xreq,
  input  logic                 xgnt,
  input  viram_pkg::mrsp_t     xrsp
);
  import viram_pkg::*;

  typedef enum logic [2:0] {D_IDLE, D_SB_RD, D_SB_WAIT, D_X_WR, D_X_RD, D_X_WAIT, D_SB_WR} dstate_e;

  typedef struct packed {
    logic        busy;
    logic        dir;
    logic [31:0] ext;
    logic [31:0] dram;
    logic [15:0] n;
  } chan_t;

  chan_t       ch [NCH];
  dstate_e     st;
  logic [$clog2(NCH)-1:0] cur, nxt;
  logic [255:0] buf_q;
  logic        have;

  always_comb begin
    for (int c = 0; c < NCH; c++) ch_busy[c] = ch[c].busy;
    // round robin: the first busy channel after the current one
    nxt  = cur;
    have = 1'b0;
    for (int k = NCH; k >= 1; k--) begin
      int unsigned c;
      c = (int'(cur) + k) % NCH;
      if (ch[c].busy) begin
        nxt  = ($clog2(NCH))'(c);
        have = 1'b1;
      end
    end
  end

  always_comb begin
    sb_req_valid = (st == D_SB_RD) || (st == D_SB_WR);
    sb_req_we    = (st == D_SB_WR);
    sb_req_addr  = ch[cur].ext;
    sb_req_wdata = buf_q;
    xreq         = '0;
    xreq.valid   = (st == D_X_WR) || (st == D_X_RD);
    xreq.we      = (st == D_X_WR);
    xreq.waddr   = ch[cur].dram[ADDR_W-1:5];
    xreq.wdata   = buf_q;
    xreq.be      = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= D_IDLE;
      cur     <= '0;
      ch_done <= '0;
      buf_q   <= '0;
      for (int c = 0; c < NCH; c++) ch[c] <= '0;
    end else begin
      ch_done <= '0;
      if (cfg_start && !ch[cfg_ch].busy) begin
        ch[cfg_ch].busy <= (cfg_nwords != 0);
        ch[cfg_ch].dir  <= cfg_dir;
        ch[cfg_ch].ext  <= cfg_ext_addr;
        ch[cfg_ch].dram <= cfg_dram_addr;
        ch[cfg_ch].n    <= cfg_nwords;
      end
      case (st)
        D_IDLE: if (have) begin
          cur <= nxt;
          st  <= ch[nxt].dir ? D_X_RD : D_SB_RD;
        end
        D_SB_RD:   if (sb_req_ready) st <= D_SB_WAIT;
        D_SB_WAIT: if (sb_rsp_valid) begin buf_q <= sb_rsp_rdata; st <= D_X_WR; end
        D_X_RD:    if (xgnt) st <= D_X_WAIT;
        D_X_WAIT:  if (xrsp.valid) begin buf_q <= xrsp.rdata; st <= D_SB_WR; end
        D_X_WR, D_SB_WR:
          if ((st == D_X_WR && xgnt) || (st == D_SB_WR && sb_req_ready)) begin
            ch[cur].ext  <= ch[cur].ext + 1;
            ch[cur].dram <= ch[cur].dram + 32;
            ch[cur].n    <= ch[cur].n - 1'b1;
            if (ch[cur].n == 16'd1) begin
              ch[cur].busy <= 1'b0;
              ch_done[cur] <= 1'b1;
            end
            st <= D_IDLE;
          end
        default: st <= D_IDLE;
      endcase
    end
  end

endmodule
