// vfrf: the 256 B vector flag register file.
//
// 16 flag registers with one bit per element (128 bits, the longest vector at
// VPW=16). Flag bit i belongs to element i and is kept in the same lane as
// that element. Readers get whole registers combinationally and pick the bits
// of the element group they work on; writers give a bit enable so that only
// the flags of active elements change. Reset sets every flag to one, so that
// vf0 and vf1, the two registers an instruction can select as its mask,
// start out enabling all elements (reset value is this design's choice).
module vfrf #(
  parameter int unsigned NREG = 16,
  parameter int unsigned FW   = 128,
  parameter int unsigned NRD  = 5,
  parameter int unsigned NWR  = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] rd_reg  [NRD],
  output logic [FW-1:0]           rd_data [NRD],
  input  logic                    wr_en   [NWR],
  input  logic [$clog2(NREG)-1:0] wr_reg  [NWR],
  input  logic [FW-1:0]           wr_bm   [NWR],   // bit enables
  input  logic [FW-1:0]           wr_data [NWR]
);

  logic [FW-1:0] f [NREG];

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rd_data[p] = f[rd_reg[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) f[r] <= '1;
    end else begin
      for (int p = 0; p < NWR; p++)
        if (wr_en[p])
          f[wr_reg[p]] <= (f[wr_reg[p]] & ~wr_bm[p]) | (wr_data[p] & wr_bm[p]);
    end
  end

endmodule
