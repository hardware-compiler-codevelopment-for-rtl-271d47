// tb_mem_xbar: checks the crossbar's bank selection, fixed-priority grant and
// response steering.
//
// Each cycle all ten ports present random requests (mostly to a few banks so
// that conflicts are common) and the banks are randomly ready. Expected
// behaviour, computed independently here: a port is granted exactly when it
// is the lowest-numbered port addressing a ready bank; the bank sees that
// port's request with the address divided by the bank count, and the port
// number as id. Random bank responses with distinct ids must appear on the
// port named by the id, with data and tag, and nowhere else.
`timescale 1ns/1ps
module tb_mem_xbar;
  import viram_pkg::*;
  localparam int NP = 10, NB = 8;
  mreq_t req [NP];
  logic gnt [NP];
  mrsp_t rsp [NP];
  logic b_valid [NB], b_ready [NB], b_we [NB];
  logic [15:0] b_addr [NB];
  logic [255:0] b_wdata [NB];
  logic [31:0] b_be [NB];
  logic [3:0] b_id [NB];
  logic [7:0] b_tag [NB];
  logic r_valid [NB];
  logic [255:0] r_rdata [NB];
  logic [3:0] r_id [NB];
  logic [7:0] r_tag [NB];
  int checks = 0, failures = 0, n_conf = 0;

  mem_xbar #(.NP(NP), .NB(NB), .BAW(16), .IDW(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ids [NP];
      for (int p = 0; p < NP; p++) begin
        req[p] = '0;
        req[p].valid = ($urandom_range(2) != 0);
        req[p].we    = $urandom_range(1);
        req[p].waddr = {16'($urandom), 3'($urandom_range(3))} | 27'(($urandom_range(1)) << 20);
        req[p].wdata = {8{$urandom()}};
        req[p].be    = $urandom();
        req[p].tag   = 8'($urandom);
        ids[p] = p;
      end
      ids.shuffle();
      for (int b = 0; b < NB; b++) begin
        b_ready[b] = ($urandom_range(3) != 0);
        r_valid[b] = ($urandom_range(1) == 1);
        r_rdata[b] = {8{$urandom()}};
        r_id[b]    = 4'(ids[b]);
        r_tag[b]   = 8'($urandom);
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        int win, cnt;
        win = -1; cnt = 0;
        for (int p = 0; p < NP; p++)
          if (req[p].valid && int'(req[p].waddr % NB) == b) begin
            cnt++;
            if (win < 0) win = p;
          end
        if (cnt > 1) n_conf++;
        checks++;
        if (b_valid[b] != (win >= 0)) begin failures++; $display("bank %0d valid", b); end
        else if (win >= 0) begin
          checks++;
          if (b_id[b] != 4'(win) || b_addr[b] != 16'(req[win].waddr / NB) || b_we[b] != req[win].we ||
              b_wdata[b] !== req[win].wdata || b_be[b] != req[win].be || b_tag[b] != req[win].tag) begin
            failures++; $display("bank %0d sees wrong request", b);
          end
        end
      end
      for (int p = 0; p < NP; p++) begin
        logic eg;
        int bk;
        bk = int'(req[p].waddr % NB);
        eg = req[p].valid && b_ready[bk];
        for (int q = 0; q < p; q++) if (req[q].valid && int'(req[q].waddr % NB) == bk) eg = 0;
        checks++;
        if (gnt[p] != eg) begin failures++; $display("port %0d grant %0b exp %0b", p, gnt[p], eg); end
      end
      for (int p = 0; p < NP; p++) begin
        int src;
        src = -1;
        for (int b = 0; b < NB; b++) if (r_valid[b] && r_id[b] == 4'(p)) src = b;
        checks++;
        if (rsp[p].valid != (src >= 0) || (src >= 0 && (rsp[p].rdata !== r_rdata[src] || rsp[p].tag != r_tag[src]))) begin
          failures++; $display("port %0d response wrong", p);
        end
      end
    end
    checks++;
    if (n_conf < 100) begin failures++; $display("too few conflicts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
