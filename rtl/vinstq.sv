// vinstq: instruction queue between the scalar core and the vector coprocessor.
//
// The scalar core hands vector instructions (with their scalar operands
// already read) to the coprocessor through this small FIFO, so it can run
// ahead while long vector instructions execute. Valid/ready handshake on both
// sides: an entry is written when in_valid && in_ready and removed when
// out_valid && out_ready. Depth (4) is this design's choice. Reset empties it.
module vinstq #(
  parameter int unsigned DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  viram_pkg::vinstr_t   in_instr,
  output logic                 out_valid,
  input  logic                 out_ready,
  output viram_pkg::vinstr_t   out_instr
);
  import viram_pkg::*;

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  vinstr_t          q [DEPTH];
  logic [AW-1:0]    rp, wp;
  logic [AW:0]      cnt;
  logic             push, pop;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_instr = q[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (push) begin
        q[wp] <= in_instr;
        wp    <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
      // the occupancy can never exceed the depth
      a_cnt_bound: assert (cnt <= (AW+1)'(DEPTH));
    end
  end

endmodule
