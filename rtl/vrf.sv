// vrf: the 8 KB multiported vector register file.
//
// 32 vector registers of 32 x 64-bit elements (64 x 32-bit or 128 x 16-bit at
// narrower VPW). Each register is stored as 8 element groups of 256 bits, one
// 64-bit word per lane, so that lane l's columns form that lane's vertical
// partition of the register file and lanes never exchange data for ordinary
// element operations. Every port reads or writes one whole group.
//
// Ports (the count is this design's choice; the design only says
// "multiported"): NRD combinational read ports and NWR write ports with byte
// enables, written at the clock edge. Byte enables carry the vector length
// and mask, so masked-off elements are simply not updated. When two write
// ports hit the same bytes in one cycle the higher-numbered port wins; the
// controller never does this. Contents are not reset.
module vrf #(
  parameter int unsigned NREG = 32,
  parameter int unsigned NGRP = 8,
  parameter int unsigned GW   = 256,
  parameter int unsigned NRD  = 10,
  parameter int unsigned NWR  = 4
) (
  input  logic                    clk,
  input  logic [$clog2(NREG)-1:0] rd_reg  [NRD],
  input  logic [$clog2(NGRP)-1:0] rd_grp  [NRD],
  output logic [GW-1:0]           rd_data [NRD],
  input  logic                    wr_en   [NWR],
  input  logic [$clog2(NREG)-1:0] wr_reg  [NWR],
  input  logic [$clog2(NGRP)-1:0] wr_grp  [NWR],
  input  logic [GW/8-1:0]         wr_be   [NWR],
  input  logic [GW-1:0]           wr_data [NWR]
);

  logic [GW-1:0] mem [NREG*NGRP];

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rd_data[p] = mem[{rd_reg[p], rd_grp[p]}];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (wr_en[p])
        for (int b = 0; b < GW/8; b++)
          if (wr_be[p][b]) mem[{wr_reg[p], wr_grp[p]}][b*8 +: 8] <= wr_data[p][b*8 +: 8];
  end

endmodule
