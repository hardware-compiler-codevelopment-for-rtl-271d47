// tb_vec_mem: behavioural memory for testbenches of the vector memory unit.
//
// Serves the four load ports and four store ports of the vector memory unit
// like the crossbar and banks would: a request is granted in its cycle with
// probability GRANT_PCT percent (refusals make the unit stall and retry),
// writes take effect at once under byte enables, and read data come back
// LAT cycles after the grant with the request's tag. Storage is an
// associative array of 256-bit words, initially zero.
module tb_vec_mem #(
  parameter int unsigned LAT = 5,
  parameter int unsigned GRANT_PCT = 100
) (
  input  logic              clk,
  input  viram_pkg::mreq_t  lreq [4],
  output logic              lgnt [4],
  output viram_pkg::mrsp_t  lrsp [4],
  input  viram_pkg::mreq_t  sreq [4],
  output logic              sgnt [4]
);
  import viram_pkg::*;

  logic [255:0] words [longint];
  mrsp_t        pipe [LAT][4];
  logic         roll_l [4], roll_s [4];
  int           n_refused = 0;

  always @(negedge clk)
    for (int p = 0; p < 4; p++) begin
      roll_l[p] = ($urandom_range(99) < GRANT_PCT);
      roll_s[p] = ($urandom_range(99) < GRANT_PCT);
    end

  always_comb
    for (int p = 0; p < 4; p++) begin
      lgnt[p] = lreq[p].valid && roll_l[p];
      sgnt[p] = sreq[p].valid && roll_s[p];
      lrsp[p] = pipe[LAT-1][p];
    end

  function automatic logic [255:0] rd(longint a);
    return words.exists(a) ? words[a] : '0;
  endfunction

  always @(posedge clk) begin
    for (int s = LAT - 1; s > 0; s--) pipe[s] <= pipe[s-1];
    for (int p = 0; p < 4; p++) begin
      pipe[0][p] <= '0;
      if (lreq[p].valid && !lgnt[p]) n_refused++;
      if (lgnt[p]) begin
        pipe[0][p].valid <= 1'b1;
        pipe[0][p].rdata <= rd(longint'(lreq[p].waddr));
        pipe[0][p].tag   <= lreq[p].tag;
      end
      if (sgnt[p]) begin
        logic [255:0] w;
        w = rd(longint'(sreq[p].waddr));
        for (int b = 0; b < 32; b++) if (sreq[p].be[b]) w[b*8 +: 8] = sreq[p].wdata[b*8 +: 8];
        words[longint'(sreq[p].waddr)] = w;
      end
    end
  end

  initial for (int s = 0; s < LAT; s++) for (int p = 0; p < 4; p++) pipe[s][p] = '0;

endmodule
