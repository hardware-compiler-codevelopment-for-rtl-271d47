// tb_varith_unit: checks one arithmetic unit's delayed pipeline.
//
// A model register file (random, constant) and two random mask registers
// answer the unit's reads. Random element-group operations (add, subtract,
// logic, min/max, compares, .vs scalar form) at random VPW, vector length
// and mask are issued, with random pipeline freezes. Checks: each result
// appears exactly in the 16th unfrozen cycle after issue (the VW stage), is
// never written while frozen, has the right element values, and writes only
// the elements below VL whose mask bit is set (byte enables for vector
// results, bit mask for compare results into a flag register).
`timescale 1ns/1ps
module tb_varith_unit;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic stall, wr_en, fwr_en, busy;
  uop_t iss;
  vreg_t rd_reg [3], wr_reg;
  grp_t rd_grp, wr_grp;
  grp_data_t rd_data [3], wr_data;
  freg_t frd_reg, fwr_reg;
  flag_t frd_data, fwr_bm, fwr_data;
  grp_be_t wr_be;
  logic [255:0] rf [32][8];
  flag_t fr [2];
  int checks = 0, failures = 0, adv = 0, n_vw = 0, n_fw = 0, n_stall = 0;

  typedef struct { int due; logic isf; grp_data_t d; grp_be_t be; flag_t bm; flag_t fd; vreg_t vd; freg_t fdr; grp_t g; } exp_t;
  exp_t q [$];

  varith_unit dut (.*);

  for (genvar r = 0; r < 3; r++) assign rd_data[r] = rf[rd_reg[r]][rd_grp];
  assign frd_data = fr[frd_reg[0]];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned eop(vop_e op, longint unsigned a, longint unsigned b, int w, output logic f);
    longint signed sa, sb;
    longint unsigned m;
    m  = (w == 64) ? '1 : ((64'd1 << w) - 1);
    sa = longint'(a << (64 - w)) >>> (64 - w);
    sb = longint'(b << (64 - w)) >>> (64 - w);
    f  = 0;
    case (op)
      OP_ADD: return (a + b) & m;
      OP_SUB: return (a - b) & m;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_MIN: return (sa < sb) ? a : b;
      OP_MAX: return (sa > sb) ? a : b;
      OP_CMPLT: begin f = sa < sb; return 0; end
      OP_CMPEQ: begin f = (a == b); return 0; end
      default: return 0;
    endcase
  endfunction

  function automatic exp_t model(uop_t u, int due);
    exp_t e;
    int w, k;
    w = 16 << int'(u.vpw); k = 64 / w;
    e.due = due; e.isf = (u.op == OP_CMPLT || u.op == OP_CMPEQ);
    e.d = '0; e.be = '0; e.bm = '0; e.fd = '0; e.vd = u.vd; e.fdr = u.fd; e.g = u.grp;
    for (int l = 0; l < 4; l++)
      for (int s = 0; s < k; s++) begin
        longint unsigned a, b, m, r;
        logic f;
        int i;
        m = (w == 64) ? '1 : ((64'd1 << w) - 1);
        a = (rf[u.vs1][u.grp] >> (l*64 + s*w)) & m;
        b = u.vs ? (u.scalar & m) : ((rf[u.vs2][u.grp] >> (l*64 + s*w)) & m);
        r = eop(u.op, a, b, w, f);
        i = (int'(u.grp) * k + s) * 4 + l;
        e.d = e.d | (grp_data_t'(r) << (l*64 + s*w));
        if (i < int'(u.vl) && fr[u.msel][i]) begin
          for (int y = 0; y < w/8; y++) e.be[l*8 + s*(w/8) + y] = 1'b1;
          e.bm[i] = 1'b1;
          e.fd[i] = f;
        end
      end
    return e;
  endfunction

  initial begin
    vop_e ops [9] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MIN, OP_MAX, OP_CMPLT, OP_CMPEQ};
    for (int r = 0; r < 32; r++) for (int g = 0; g < 8; g++) rf[r][g] = {8{$urandom()}};
    // make some equal elements for compare-equal
    rf[3] = rf[4];
    fr[0] = {4{$urandom()}}; fr[1] = '1;
    stall = 0; iss = '0;
    #3 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      stall = ($urandom_range(7) == 0) && n < 3950;
      iss = '0;
      if ($urandom_range(1) == 1 && n < 3950) begin
        iss.valid = 1;
        iss.op = ops[$urandom_range(8)];
        iss.vd = 5'($urandom_range(31));
        iss.fd = 4'($urandom_range(15));
        iss.vs1 = 5'($urandom_range(3, 6));
        iss.vs2 = 5'($urandom_range(3, 6));
        iss.vs = ($urandom_range(5) == 0);
        iss.scalar = {$urandom(), $urandom()};
        iss.grp = 3'($urandom);
        iss.vpw = vpw_e'($urandom_range(2));
        iss.vl = vl_t'($urandom_range(2048 / (16 << int'(iss.vpw))));
        iss.msel = $urandom_range(1);
      end
      #0.2;
      if (stall) begin
        n_stall++;
        checks++;
        if (wr_en || fwr_en) begin failures++; $display("write while frozen"); end
      end else begin
        adv++;
        if (wr_en || fwr_en) begin
          exp_t e;
          checks++;
          if (q.size() == 0) begin failures++; $display("unexpected write"); end
          else begin
            e = q.pop_front();
            if (e.due != adv) begin failures++; $display("write at %0d due %0d", adv, e.due); end
            else if (e.isf) begin
              n_fw++;
              if (!fwr_en || wr_en || fwr_reg != e.fdr || fwr_bm != e.bm || ((fwr_data ^ e.fd) & e.bm) != 0) begin
                failures++; $display("flag write wrong");
              end
            end else begin
              n_vw++;
              if (!wr_en || fwr_en || wr_reg != e.vd || wr_grp != e.g || wr_be != e.be) begin
                failures++; $display("vector write wrong at %0d be %h exp %h reg %0d/%0d grp %0d/%0d", adv, wr_be, e.be, wr_reg, e.vd, wr_grp, e.g);
              end
              for (int b = 0; b < 32; b++)
                if (e.be[b] && wr_data[b*8 +: 8] != e.d[b*8 +: 8]) begin
                  failures++; $display("data byte %0d", b); break;
                end
            end
          end
        end
        if (iss.valid) q.push_back(model(iss, adv + 16));
      end
    end
    checks++;
    if (q.size() != 0 || n_vw < 500 || n_fw < 100 || busy) begin
      failures++; $display("left %0d vw %0d fw %0d", q.size(), n_vw, n_fw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
