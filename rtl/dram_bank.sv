// dram_bank: one embedded DRAM bank of VIRAM-1 (1.75 MB, 256-bit interface).
//
// Model of the bank as the vector processor sees it: a synchronous, pipelined
// 256-bit interface that presents the bank as a single sub-bank. A request is
// accepted when `req_ready` is high; a read returns its word exactly LAT
// cycles later (LAT = 5 cycles = 25 ns row access at 200 MHz), whether or not
// the row was already open, matching the delayed pipeline that always budgets
// the full row-access latency. Writes take effect at acceptance, under byte
// enables. Only the work that is needed is started: an access to the row held
// in the sense amplifiers does not activate a row, and back-to-back accesses
// to that row are accepted every cycle. An access to another row activates it
// (`act` pulses) and, because accesses cannot overlap inside the bank, the
// bank accepts nothing more until that access completes (LAT-1 further
// cycles). The row size (ROW_WORDS) and this busy time are this design's
// choices. The storage is an array, so the module is synthesizable; a real
// chip uses a DRAM macro here. Requester id and tag are returned with the data.
module dram_bank #(
  parameter int unsigned WORDS     = 57344,
  parameter int unsigned LAT       = 5,
  parameter int unsigned ROW_WORDS = 32,
  parameter int unsigned IDW       = 4,
  parameter int unsigned TW        = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_we,
  input  logic [$clog2(WORDS)-1:0] req_addr,
  input  logic [255:0]             req_wdata,
  input  logic [31:0]              req_be,
  input  logic [IDW-1:0]           req_id,
  input  logic [TW-1:0]            req_tag,
  output logic                     rsp_valid,
  output logic [255:0]             rsp_rdata,
  output logic [IDW-1:0]           rsp_id,
  output logic [TW-1:0]            rsp_tag,
  output logic                     act        // row activation this cycle
);

  localparam int unsigned AW  = $clog2(WORDS);
  localparam int unsigned RW  = (WORDS / ROW_WORDS > 1) ? $clog2(WORDS / ROW_WORDS) : 1;
  localparam int unsigned CW  = $clog2(LAT + 1);

  logic [255:0]   mem [WORDS];
  logic [CW-1:0]  busy;
  logic           row_open;
  logic [RW-1:0]  open_row, row;
  logic           acc;

  logic           pv [LAT];
  logic [255:0]   pd [LAT];
  logic [IDW-1:0] pi [LAT];
  logic [TW-1:0]  pt [LAT];

  assign row       = RW'(req_addr / AW'(ROW_WORDS));
  assign req_ready = (busy == '0);
  assign acc       = req_valid && req_ready;
  assign act       = acc && (!row_open || row != open_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= '0;
      row_open <= 1'b0;
      open_row <= '0;
      for (int s = 0; s < LAT; s++) pv[s] <= 1'b0;
    end else begin
      if (act) begin
        busy     <= CW'(LAT - 1);
        row_open <= 1'b1;
        open_row <= row;
      end else if (busy != '0) begin
        busy <= busy - 1'b1;
      end
      pv[0] <= acc && !req_we;
      for (int s = 1; s < LAT; s++) pv[s] <= pv[s-1];
    end
  end

  always_ff @(posedge clk) begin
    if (acc && req_we)
      for (int b = 0; b < 32; b++)
        if (req_be[b]) mem[req_addr][b*8 +: 8] <= req_wdata[b*8 +: 8];
    pd[0] <= mem[req_addr];
    pi[0] <= req_id;
    pt[0] <= req_tag;
    for (int s = 1; s < LAT; s++) begin
      pd[s] <= pd[s-1];
      pi[s] <= pi[s-1];
      pt[s] <= pt[s-1];
    end
  end

  assign rsp_valid = pv[LAT-1];
  assign rsp_rdata = pd[LAT-1];
  assign rsp_id    = pi[LAT-1];
  assign rsp_tag   = pt[LAT-1];

endmodule
