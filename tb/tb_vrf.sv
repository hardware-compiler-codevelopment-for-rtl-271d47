// tb_vrf: checks the multiported vector register file.
//
// Random byte-enabled writes on all write ports (to distinct addresses in a
// cycle) are mirrored in a model array; every read port is compared with the
// model after each write cycle.
`timescale 1ns/1ps
module tb_vrf;
  localparam int NRD = 10, NWR = 4;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  logic [4:0]   rd_reg [NRD];
  logic [2:0]   rd_grp [NRD];
  logic [255:0] rd_data [NRD];
  logic         wr_en [NWR];
  logic [4:0]   wr_reg [NWR];
  logic [2:0]   wr_grp [NWR];
  logic [31:0]  wr_be [NWR];
  logic [255:0] wr_data [NWR];
  logic [255:0] model [256];
  int checks = 0, failures = 0;

  vrf #(.NRD(NRD), .NWR(NWR)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
    // fill everything once
    for (int a = 0; a < 256; a += NWR) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        wr_en[p] = 1'b1; {wr_reg[p], wr_grp[p]} = 8'(a + p); wr_be[p] = '1;
        wr_data[p] = {8{$urandom()}};
        model[a + p] = wr_data[p];
      end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int p = 0; p < NWR; p++) begin
        logic [7:0] ad;
        ad = 8'(($urandom_range(63) * NWR) + p);   // distinct per port
        wr_en[p] = ($urandom_range(1) == 1);
        {wr_reg[p], wr_grp[p]} = ad;
        wr_be[p] = $urandom();
        wr_data[p] = {8{$urandom()}};
        if (wr_en[p])
          for (int b = 0; b < 32; b++) if (wr_be[p][b]) model[ad][b*8 +: 8] = wr_data[p][b*8 +: 8];
      end
      @(negedge clk);
      for (int p = 0; p < NWR; p++) wr_en[p] = 1'b0;
      for (int q = 0; q < NRD; q++) begin
        logic [7:0] ad;
        ad = 8'($urandom());
        {rd_reg[q], rd_grp[q]} = ad;
        #0.1;
        checks++;
        if (rd_data[q] !== model[ad]) begin
          failures++;
          if (failures < 5) $display("read %0d at %h: %h exp %h", q, ad, rd_data[q], model[ad]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
