// tb_vfrf: checks the flag register file: all ones after reset, bit-enabled
// writes from every port, whole-register reads on every port.
`timescale 1ns/1ps
module tb_vfrf;
  localparam int NRD = 5, NWR = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic [3:0]   rd_reg [NRD];
  logic [127:0] rd_data [NRD];
  logic         wr_en [NWR];
  logic [3:0]   wr_reg [NWR];
  logic [127:0] wr_bm [NWR];
  logic [127:0] wr_data [NWR];
  logic [127:0] model [16];
  int checks = 0, failures = 0;

  vfrf dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
    for (int r = 0; r < 16; r++) model[r] = '1;
    #3 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        wr_en[p]  = ($urandom_range(1) == 1) && n > 0;
        wr_reg[p] = 4'(($urandom_range(4) * NWR) + p);
        wr_bm[p]  = {4{$urandom()}};
        wr_data[p] = {4{$urandom()}};
        if (wr_en[p]) model[wr_reg[p]] = (model[wr_reg[p]] & ~wr_bm[p]) | (wr_data[p] & wr_bm[p]);
      end
      @(negedge clk);
      for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
      for (int q = 0; q < NRD; q++) begin
        rd_reg[q] = 4'($urandom());
        #0.1;
        checks++;
        if (rd_data[q] !== model[rd_reg[q]]) begin
          failures++;
          if (failures < 5) $display("flag %0d: %h exp %h", rd_reg[q], rd_data[q], model[rd_reg[q]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
