// mem_xbar: the memory crossbar between the requesters and the DRAM banks.
//
// NP requester ports (vector memory unit load and store address generators,
// the scalar core, the DMA engine) reach NB banks. Consecutive 256-bit words
// are interleaved over the banks: bank = word address mod NB, word in bank =
// word address / NB. Every cycle each bank that is ready grants one of the
// ports that address it, the lowest-numbered port first, so ports addressing
// different banks proceed in parallel and the rest see `gnt` low and retry
// (a bank conflict). The grant is combinational in the request cycle. Read
// data come back from the banks after their fixed latency together with the
// port number and tag, and are steered to that port. Address interleaving and
// fixed priority are this design's choices; the design only gives a
// crossbar of 12.8 GB/s between the memory system and its users.
module mem_xbar #(
  parameter int unsigned NP   = 10,
  parameter int unsigned NB   = 8,
  parameter int unsigned BAW  = 16,       // word address width inside a bank
  parameter int unsigned IDW  = 4
) (
  input  viram_pkg::mreq_t     req [NP],
  output logic                 gnt [NP],
  output viram_pkg::mrsp_t     rsp [NP],
  // bank side
  output logic                 b_valid [NB],
  input  logic                 b_ready [NB],
  output logic                 b_we    [NB],
  output logic [BAW-1:0]       b_addr  [NB],
  output logic [255:0]         b_wdata [NB],
  output logic [31:0]          b_be    [NB],
  output logic [IDW-1:0]       b_id    [NB],
  output logic [viram_pkg::TAG_W-1:0] b_tag [NB],
  input  logic                 r_valid [NB],
  input  logic [255:0]         r_rdata [NB],
  input  logic [IDW-1:0]       r_id    [NB],
  input  logic [viram_pkg::TAG_W-1:0] r_tag [NB]
);
  import viram_pkg::*;

  localparam int unsigned BSW = $clog2(NB);

  logic [BSW-1:0] bank_of [NP];

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      bank_of[p] = req[p].waddr[BSW-1:0];
      gnt[p]     = 1'b0;
    end
    for (int b = 0; b < NB; b++) begin
      b_valid[b] = 1'b0;
      b_we[b]    = 1'b0;
      b_addr[b]  = '0;
      b_wdata[b] = '0;
      b_be[b]    = '0;
      b_id[b]    = '0;
      b_tag[b]   = '0;
      for (int p = NP - 1; p >= 0; p--) begin
        if (req[p].valid && bank_of[p] == BSW'(b)) begin
          b_valid[b] = 1'b1;
          b_we[b]    = req[p].we;
          b_addr[b]  = BAW'(req[p].waddr >> BSW);
          b_wdata[b] = req[p].wdata;
          b_be[b]    = req[p].be;
          b_id[b]    = IDW'(p);
          b_tag[b]   = req[p].tag;
        end
      end
    end
    // the port whose request went to a ready bank is granted
    for (int p = 0; p < NP; p++)
      if (req[p].valid && b_ready[bank_of[p]] && b_id[bank_of[p]] == IDW'(p))
        gnt[p] = 1'b1;
  end

  always_comb begin
    for (int p = 0; p < NP; p++) rsp[p] = '0;
    for (int b = 0; b < NB; b++)
      if (r_valid[b]) begin
        rsp[r_id[b]].valid = 1'b1;
        rsp[r_id[b]].rdata = r_rdata[b];
        rsp[r_id[b]].tag   = r_tag[b];
      end
  end

endmodule
