// tb_dma_engine: checks the two-channel DMA engine with a system-bus model
// and a crossbar-port model.
//
// The system bus accepts requests at random and returns read data two cycles
// later; the crossbar port grants at random and returns read data five
// cycles later. Channel 0 copies external words into DRAM while channel 1
// copies a DRAM region out to external memory. Checks: every word arrives at
// the right place in both directions, each channel's done pulses exactly
// once, the channels interleave while both are busy, and a start request on
// a busy channel is ignored.
`timescale 1ns/1ps
module tb_dma_engine;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic cfg_start, cfg_ch, cfg_dir;
  logic [31:0] cfg_ext_addr, cfg_dram_addr;
  logic [15:0] cfg_nwords;
  logic [1:0] ch_busy, ch_done;
  logic sb_req_valid, sb_req_ready, sb_req_we, sb_rsp_valid;
  logic [31:0] sb_req_addr;
  logic [255:0] sb_req_wdata, sb_rsp_rdata;
  mreq_t xreq;
  logic xgnt;
  mrsp_t xrsp;
  int checks = 0, failures = 0, switches = 0, done_cnt [2] = '{0, 0};

  logic [255:0] ext [int];
  logic [255:0] dram [int];
  logic [255:0] sbp [2];
  logic sbv [2];
  mrsp_t xp [5];

  dma_engine #(.NCH(2)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    sb_req_ready = ($urandom_range(2) != 0);
    xgnt = xreq.valid && ($urandom_range(2) != 0);
  end
  assign sb_rsp_valid = sbv[1];
  assign sb_rsp_rdata = sbp[1];
  assign xrsp = xp[4];

  logic last_cur = 0;
  always @(posedge clk) begin
    sbv[1] <= sbv[0]; sbp[1] <= sbp[0];
    sbv[0] <= 0;
    if (sb_req_valid && sb_req_ready) begin
      if (sb_req_we) ext[int'(sb_req_addr)] = sb_req_wdata;
      else begin sbv[0] <= 1; sbp[0] <= ext.exists(int'(sb_req_addr)) ? ext[int'(sb_req_addr)] : '0; end
    end
    for (int s = 4; s > 0; s--) xp[s] <= xp[s-1];
    xp[0] <= '0;
    if (xreq.valid && xgnt) begin
      if (xreq.we) dram[int'(xreq.waddr)] = xreq.wdata;
      else begin xp[0].valid <= 1; xp[0].rdata <= dram.exists(int'(xreq.waddr)) ? dram[int'(xreq.waddr)] : '0; end
    end
    for (int c = 0; c < 2; c++) if (ch_done[c]) done_cnt[c]++;
    if (ch_busy == 2'b11 && dut.st == dut.D_IDLE && dut.have) begin
      if (dut.nxt != last_cur) switches++;
      last_cur = dut.nxt;
    end
  end

  task automatic start(input logic c, input logic d, input int e, input int a, input int n);
    @(negedge clk);
    cfg_start = 1; cfg_ch = c; cfg_dir = d; cfg_ext_addr = e; cfg_dram_addr = a; cfg_nwords = 16'(n);
    @(negedge clk);
    cfg_start = 0;
  endtask

  initial begin
    cfg_start = 0; cfg_ch = 0; cfg_dir = 0; cfg_ext_addr = 0; cfg_dram_addr = 0; cfg_nwords = 0;
    sbv = '{0, 0}; sbp = '{'0, '0};
    for (int s = 0; s < 5; s++) xp[s] = '0;
    for (int i = 0; i < 40; i++) ext[100 + i] = {8{$urandom()}};
    for (int i = 0; i < 30; i++) dram[2000 + i] = {8{$urandom()}};
    #3 rst_n = 1;
    start(0, 0, 100, 32 * 500, 40);
    start(1, 1, 700, 32 * 2000, 30);
    start(0, 1, 9999, 0, 5);       // channel 0 busy: must be ignored
    while (ch_busy != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (!dram.exists(500 + i) || dram[500 + i] !== ext[100 + i]) begin failures++; $display("in word %0d", i); end
    end
    for (int i = 0; i < 30; i++) begin
      checks++;
      if (!ext.exists(700 + i) || ext[700 + i] !== dram[2000 + i]) begin failures++; $display("out word %0d", i); end
    end
    checks++;
    if (done_cnt[0] != 1 || done_cnt[1] != 1) begin failures++; $display("done pulses %0d %0d", done_cnt[0], done_cnt[1]); end
    checks++;
    if (ext.exists(9999) || dram.size() != 70) begin failures++; $display("start on busy channel was taken"); end
    checks++;
    if (switches < 20) begin failures++; $display("channels did not interleave (%0d)", switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
