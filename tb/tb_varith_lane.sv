// tb_varith_lane: checks the VPW-partitioned lane datapath.
//
// For random operands, every integer operation and each of VPW 16/32/64, the
// expected lane word is built sub-word by sub-word from a 64-bit integer
// model (modulo and saturating add/subtract, logic, shifts, signed min/max,
// low product, signed compares giving one flag per sub-word).
module tb_varith_lane;
  import viram_pkg::*;

  vop_e        op;
  vpw_e        vpw;
  logic [63:0] a, b, c, r;
  logic [3:0]  f;
  int checks = 0, failures = 0;

  varith_lane dut (.op, .vpw, .a, .b, .c, .hi(1'b0), .shamt(6'd0), .rnd(RND_TRUNC), .r, .f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint signed sx(longint unsigned v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction

  function automatic longint unsigned clamp(longint signed v, int w);
    longint signed mx;
    mx = (w == 64) ? 64'sh7FFF_FFFF_FFFF_FFFF : ((64'sd1 <<< (w - 1)) - 1);
    if (v > mx) v = mx;
    if (v < -mx - 1) v = -mx - 1;
    return v;
  endfunction

  initial begin
    vop_e ops [14] = '{OP_ADD, OP_SUB, OP_ADDS, OP_SUBS, OP_AND, OP_OR, OP_XOR, OP_SLL,
                       OP_SRL, OP_SRA, OP_MIN, OP_MAX, OP_MUL, OP_CMPLT};
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] er;
      logic [3:0]  ef;
      int w, k;
      op  = ops[n % 14];
      vpw = vpw_e'(n % 3);
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      c = '0;
      if (n % 5 == 0) b = a;
      w = 16 << int'(vpw);
      k = 64 / w;
      er = '0;
      ef = '0;
      for (int s = 0; s < k; s++) begin
        longint unsigned ua, ub, m, v;
        longint signed sa, sb;
        m  = (w == 64) ? '1 : ((64'd1 << w) - 1);
        ua = (a >> (s*w)) & m;
        ub = (b >> (s*w)) & m;
        sa = sx(ua, w);
        sb = sx(ub, w);
        case (op)
          OP_ADD:  v = ua + ub;
          OP_SUB:  v = ua - ub;
          OP_ADDS: v = (w == 64) ? ((sa > 0 && sb > 0 && sa + sb < 0) ? 64'h7FFF_FFFF_FFFF_FFFF :
                                    (sa < 0 && sb < 0 && sa + sb >= 0) ? 64'h8000_0000_0000_0000 : ua + ub)
                                 : clamp(sa + sb, w);
          OP_SUBS: v = (w == 64) ? ((sa >= 0 && sb < 0 && sa - sb < 0) ? 64'h7FFF_FFFF_FFFF_FFFF :
                                    (sa < 0 && sb > 0 && sa - sb >= 0) ? 64'h8000_0000_0000_0000 : ua - ub)
                                 : clamp(sa - sb, w);
          OP_AND:  v = ua & ub;
          OP_OR:   v = ua | ub;
          OP_XOR:  v = ua ^ ub;
          OP_SLL:  v = ua << (ub % w);
          OP_SRL:  v = ua >> (ub % w);
          OP_SRA:  v = sa >>> (ub % w);
          OP_MIN:  v = (sa < sb) ? ua : ub;
          OP_MAX:  v = (sa > sb) ? ua : ub;
          OP_MUL:  v = ua * ub;
          default: v = 0;
        endcase
        if (op == OP_CMPLT) ef[s] = (sa < sb);
        else er = er | ((v & m) << (s*w));
      end
      #1;
      checks++;
      if (r !== er || f !== ef) begin
        failures++;
        if (failures < 10) $display("op=%s vpw=%0d a=%h b=%h: r=%h exp %h f=%b exp %b",
                                    op.name(), w, a, b, r, er, f, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
