// tb_vperm_unit: checks vhalf and the left/right butterflies at each VPW.
//
// A model register file in the testbench answers the unit's reads and takes
// its writes. The expected register is computed element by element from the
// permutation definitions; elements not moved must keep their old value.
// The operation must take 16 cycles (8 group reads, 8 group writes).
`timescale 1ns/1ps
module tb_vperm_unit;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic start, busy, done, wr_en;
  vop_e op;
  vreg_t vs1, vd, rd_reg [2], wr_reg;
  vpw_e vpw;
  vl_t vl;
  logic [7:0] radix;
  grp_t rd_grp, wr_grp;
  grp_data_t rd_data [2], wr_data;
  grp_be_t wr_be;
  logic [255:0] rf [32][8];
  int checks = 0, failures = 0;

  vperm_unit dut (.*);

  assign rd_data[0] = rf[rd_reg[0]][rd_grp];
  assign rd_data[1] = rf[rd_reg[1]][rd_grp];
  always @(posedge clk) if (wr_en) rf[wr_reg][wr_grp] <= wr_data;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // element i of a register image at width w (lanes round-robin)
  function automatic longint unsigned el(int r, int i, int w);
    int k, g, p;
    k = 64 / w; g = i / (4*k); p = i % (4*k);
    return (rf[r][g] >> ((p % 4)*64 + (p / 4)*w)) & ((w == 64) ? '1 : ((64'd1 << w) - 1));
  endfunction

  initial begin
    vop_e ops [3] = '{OP_HALF, OP_BFLYL, OP_BFLYR};
    start = 0; op = OP_HALF; vs1 = 0; vd = 0; vpw = VPW64; vl = 0; radix = 0;
    #3 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      longint unsigned exp_el [128];
      int w, mvl, cyc, h, d;
      for (int r = 0; r < 4; r++) for (int g = 0; g < 8; g++) rf[r][g] = {8{$urandom()}};
      op = ops[n % 3];
      vpw = vpw_e'((n / 3) % 3);
      w = 16 << int'(vpw);
      mvl = 2048 / w;
      vl = vl_t'((n % 2) ? mvl : $urandom_range(mvl, 2));
      radix = 8'(1 << $urandom_range(3));
      vs1 = 5'd1; vd = 5'd2;
      h = int'(vl) / 2; d = radix;
      for (int i = 0; i < mvl; i++) begin
        exp_el[i] = el(2, i, w);
        if (i < vl) case (op)
          OP_HALF:  if (i < h && i + h < mvl) exp_el[i] = el(1, i + h, w);
          OP_BFLYL: if ((i % (2*d)) < d && i + d < mvl) exp_el[i] = el(1, i + d, w);
          OP_BFLYR: if ((i % (2*d)) >= d) exp_el[i] = el(1, i - d, w);
          default: ;
        endcase
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (cyc != 17) begin failures++; $display("took %0d cycles", cyc); end
      for (int i = 0; i < mvl; i++) begin
        checks++;
        if (el(2, i, w) != exp_el[i]) begin
          failures++;
          if (failures < 10) $display("%s w=%0d vl=%0d d=%0d elem %0d: %h exp %h", op.name(), w, vl, d, i, el(2, i, w), exp_el[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
