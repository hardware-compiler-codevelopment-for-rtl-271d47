// tb_dram_bank: checks one DRAM bank against a reference array.
//
// Random reads and byte-masked writes, mostly to a few rows so that both row
// hits and row changes occur. Checks: read data equal the reference and
// arrive exactly LAT cycles after acceptance with their id and tag; a row
// change pulses `act` and blocks the bank for LAT-1 cycles; accesses to the
// open row are accepted on consecutive cycles. A smaller bank is used so the
// reference array stays small; the timing does not depend on the size.
`timescale 1ns/1ps
module tb_dram_bank;
  localparam int unsigned WORDS = 1024, LAT = 5, ROWW = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic req_valid, req_ready, req_we, rsp_valid, act;
  logic [9:0] req_addr;
  logic [255:0] req_wdata, rsp_rdata;
  logic [31:0] req_be;
  logic [3:0] req_id, rsp_id;
  logic [7:0] req_tag, rsp_tag;
  logic [255:0] ref_mem [WORDS];
  int checks = 0, failures = 0, n_act = 0, n_b2b = 0, cyc = 0;

  typedef struct { int due; logic [255:0] d; logic [3:0] id; logic [7:0] tag; } exp_t;
  exp_t q [$];

  dram_bank #(.WORDS(WORDS), .LAT(LAT), .ROW_WORDS(ROWW)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_acc = -10, blocked_until = -1;
  logic [4:0] cur_row;
  logic row_valid = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rsp_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected response"); end
      else begin
        e = q.pop_front();
        if (e.due != cyc || e.d !== rsp_rdata || e.id != rsp_id || e.tag != rsp_tag) begin
          failures++;
          $display("rsp cyc %0d due %0d data ok %0b", cyc, e.due, e.d === rsp_rdata);
        end
      end
    end
    if (req_valid) begin
      logic exp_act;
      exp_act = !row_valid || cur_row != req_addr[9:5];
      checks++;
      if (req_ready != (cyc > blocked_until)) begin failures++; $display("ready wrong at %0d", cyc); end
      if (req_ready) begin
        checks++;
        if (act != exp_act) begin failures++; $display("act wrong at %0d", cyc); end
        if (act) begin n_act++; blocked_until = cyc + LAT - 1; end
        if (!exp_act && last_acc == cyc - 1) n_b2b++;
        row_valid = 1; cur_row = req_addr[9:5];
        last_acc = cyc;
        if (req_we) begin
          for (int b = 0; b < 32; b++) if (req_be[b]) ref_mem[req_addr][b*8 +: 8] = req_wdata[b*8 +: 8];
        end else
          q.push_back('{cyc + LAT, ref_mem[req_addr], req_id, req_tag});
      end
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) ref_mem[i] = '0;
    for (int i = 0; i < WORDS; i++) dut.mem[i] = '0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0; req_id = 0; req_tag = 0;
    #3 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!req_valid || req_ready || $urandom_range(3) == 0) begin
        req_valid = ($urandom_range(4) != 0);
        req_we    = ($urandom_range(2) == 0);
        if ($urandom_range(7) == 0) req_addr[9:5] = 5'($urandom);
        req_addr[4:0] = 5'($urandom);
        req_wdata = {8{$urandom()}};
        req_be    = $urandom();
        req_id    = 4'($urandom);
        req_tag   = 8'($urandom);
      end
    end
    req_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d reads never answered", q.size()); end
    checks++;
    if (n_act < 50 || n_b2b < 50) begin failures++; $display("act %0d b2b %0d", n_act, n_b2b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
