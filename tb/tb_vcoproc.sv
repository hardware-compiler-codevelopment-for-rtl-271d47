// tb_vcoproc: runs random vector programs on the coprocessor and compares the
// final register, flag and memory state with an instruction-level model.
//
// The coprocessor is connected to the behavioural memory tb_vec_mem, which
// refuses a fifth of all requests so that memory stalls occur. Programs mix
// arithmetic (modulo and saturating add, subtract, xor, minimum, multiply,
// with vector or scalar second operand), compares into flag registers,
// masked execution under vf0/vf1, unit-stride and strided loads and stores
// (memory data as wide as the elements or narrower, sign- or zero-extended)
// and VL/VPW changes, on a small set of registers so that read-after-write,
// write-after-read and write-after-write dependences between the three units
// are frequent. Loads read a preloaded region and stores write a separate
// one (ordering between stores and later loads of the same addresses is
// left to software). A directed check first confirms chaining: an add that
// uses a load's result issues its first group one cycle after the load's.
`timescale 1ns/1ps
module tb_vcoproc;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #1 clk = ~clk;
  initial #0.5 rst_n = 1'b0;        // a real reset edge clears the pipelines at once
  logic in_valid, in_ready, idle, stall;
  vinstr_t in_instr;
  vl_t vl;
  logic [7:0] mvl;
  mreq_t lreq [4], sreq [4];
  logic lgnt [4], sgnt [4];
  mrsp_t lrsp [4];
  int checks = 0, failures = 0, n_stall = 0, n_chain = 0;
  localparam int STBASE = 32'h0002_0000;

  vcoproc dut (.*);
  tb_vec_mem #(.LAT(5), .GRANT_PCT(80)) mem (.clk, .lreq, .lgnt, .lrsp, .sreq, .sgnt);

  // ------------------------------------------------ reference state
  logic [2047:0] mr [32];
  logic [127:0]  mf [16];
  logic [7:0]    mm [int];          // store region bytes
  int            m_vl = 32, m_w = 64;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (stall) n_stall++;
    for (int u = 0; u < 2; u++)
      if (dut.fire[u] && dut.seq[u].dep[2] && dut.seq[2].active) n_chain++;
  end

  function automatic int bitpos(int e, int w);
    int k, g, p;
    k = 64 / w; g = e / (4*k); p = e % (4*k);
    return g*256 + (p % 4)*64 + (p / 4)*w;
  endfunction
  function automatic longint unsigned getel(int r, int e, int w);
    return 64'(mr[r] >> bitpos(e, w)) & ((w == 64) ? '1 : ((64'd1 << w) - 1));
  endfunction
  function automatic void setel(int r, int e, int w, longint unsigned v);
    for (int b = 0; b < w; b++) mr[r][bitpos(e, w) + b] = v[b];
  endfunction
  function automatic logic [7:0] ldbyte(int a);
    logic [255:0] x;
    x = mem.words.exists(longint'(a >> 5)) ? mem.words[longint'(a >> 5)] : '0;
    return x[(a & 31)*8 +: 8];
  endfunction
  function automatic longint signed sx(longint unsigned v, int w);
    return longint'(v << (64 - w)) >>> (64 - w);
  endfunction

  function automatic void model(vinstr_t i);
    int w;
    w = m_w;
    case (i.op)
      OP_SETVL:  m_vl = (int'(i.scalar) > 2048 / w) ? 2048 / w : int'(i.scalar);
      OP_SETVPW: begin m_w = 16 << int'(i.scalar[1:0]); if (m_vl > 2048 / m_w) m_vl = 2048 / m_w; end
      default:
        for (int e = 0; e < m_vl; e++)
          if (mf[i.msel][e]) begin
            longint unsigned a, b, m, r;
            longint signed sa, sb, s;
            int ad, mb;
            m  = (w == 64) ? '1 : ((64'd1 << w) - 1);
            a  = getel(i.vs1, e, w);
            b  = i.vs ? (i.scalar & m) : getel(i.vs2, e, w);
            sa = sx(a, w); sb = sx(b, w);
            mb = int'(mem_bytes(vpw_e'(w == 16 ? 0 : w == 32 ? 1 : 2), i.mw));
            ad = int'(i.base) + ((i.amode == AM_STRIDE) ? e * int'(i.stride) : e * mb);
            case (i.op)
              OP_ADD: setel(i.vd, e, w, a + b);
              OP_SUB: setel(i.vd, e, w, a - b);
              OP_XOR: setel(i.vd, e, w, a ^ b);
              OP_MIN: setel(i.vd, e, w, (sa < sb) ? a : b);
              OP_MUL: setel(i.vd, e, w, a * b);
              OP_ADDS: begin
                longint signed mx;
                mx = (w == 64) ? 64'h7fff_ffff_ffff_ffff : ((64'sd1 <<< (w - 1)) - 1);
                if (w == 64) begin
                  s = sa + sb;
                  if (sa >= 0 && sb >= 0 && s < 0) s = mx;
                  else if (sa < 0 && sb < 0 && s >= 0) s = -mx - 1;
                end else begin
                  s = sa + sb;
                  if (s > mx) s = mx; else if (s < -mx - 1) s = -mx - 1;
                end
                setel(i.vd, e, w, s);
              end
              OP_CMPLT: mf[i.fd][e] = (sa < sb);
              OP_LD: begin
                longint unsigned v;
                v = 0;
                for (int y = 0; y < mb; y++) v |= longint'(ldbyte(ad + y)) << (8*y);
                if (!i.munsigned && mb < 8 && v[mb*8-1]) v |= ~((64'd1 << (mb*8)) - 1);
                setel(i.vd, e, w, v);
              end
              OP_ST: begin
                longint unsigned v;
                v = getel(i.vd, e, w);
                for (int y = 0; y < mb; y++) mm[ad + y] = 8'(v >> (8*y));
              end
              default: ;
            endcase
          end
    endcase
  endfunction

  task automatic issue(vinstr_t i);
    @(negedge clk);
    in_valid = 1'b1;
    in_instr = i;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    model(i);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  function automatic vinstr_t rnd_instr();
    vinstr_t i;
    vop_e aops [7] = '{OP_ADD, OP_SUB, OP_XOR, OP_MIN, OP_MUL, OP_ADDS, OP_CMPLT};
    int c;
    i = '0;
    c = $urandom_range(99);
    i.vd  = 5'($urandom_range(1, 6));
    i.vs1 = 5'($urandom_range(1, 6));
    i.vs2 = 5'($urandom_range(1, 6));
    i.msel = ($urandom_range(3) == 0);
    i.fd = 4'($urandom_range(0, 1));
    i.scalar = {$urandom(), $urandom()};
    if (c < 55) begin
      i.op = aops[$urandom_range(6)];
      i.vs = ($urandom_range(4) == 0);
    end else if (c < 75) begin
      i.op = OP_LD;
      i.amode = ($urandom_range(2) == 0) ? AM_STRIDE : AM_SEQ;
      i.stride = 32'($urandom_range(1, 5) * 8);
      i.base = 32'($urandom_range(2000)) & ~32'h7;
      if (i.amode == AM_SEQ) i.base = 32'($urandom_range(4000));
    end else if (c < 92) begin
      i.op = OP_ST;
      i.amode = ($urandom_range(2) == 0) ? AM_STRIDE : AM_SEQ;
      i.stride = 32'($urandom_range(1, 5) * 8);
      i.base = STBASE + (32'($urandom_range(2000)) & ~32'h7);
      if (i.amode == AM_SEQ) i.base = STBASE + 32'($urandom_range(4000));
    end else if (c < 96) begin
      i.op = OP_SETVL;
      i.scalar = 64'($urandom_range(130));
    end else begin
      i.op = OP_SETVPW;
      i.scalar = 64'($urandom_range(2));
    end
    if (i.op == OP_LD || i.op == OP_ST) begin
      i.mw = ($urandom_range(1) == 1) ? MW_VPW : mw_e'($urandom_range(1, 3));
      i.munsigned = $urandom_range(1);
    end
    return i;
  endfunction

  task automatic compare(string what);
    for (int r = 0; r < 32; r++)
      for (int g = 0; g < 8; g++) begin
        checks++;
        if (dut.u_vrf.mem[r*8 + g] !== mr[r][g*256 +: 256]) begin
          failures++;
          if (failures < 8) $display("%s: v%0d group %0d differs", what, r, g);
        end
      end
    for (int f = 0; f < 16; f++) begin
      checks++;
      if (dut.u_vfrf.f[f] !== mf[f]) begin failures++; if (failures < 8) $display("%s: vf%0d differs", what, f); end
    end
  endtask

  initial begin
    vinstr_t i;
    int t_ld, t_add;
    in_valid = 0; in_instr = '0;
    for (int a = 0; a < 256; a++) mem.words[longint'(a)] = {8{$urandom()}};
    for (int r = 0; r < 32; r++) begin
      mr[r] = {64{$urandom()}};
      for (int g = 0; g < 8; g++) dut.u_vrf.mem[r*8 + g] = mr[r][g*256 +: 256];
    end
    for (int f = 0; f < 16; f++) mf[f] = '1;
    #3 rst_n = 1;
    // directed: load then dependent add, one cycle apart
    i = '0; i.op = OP_LD; i.vd = 5'd1; i.base = 32'd64; issue(i);
    i = '0; i.op = OP_ADD; i.vd = 5'd2; i.vs1 = 5'd1; i.vs2 = 5'd1; issue(i);
    t_ld = -1; t_add = -1;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk);
      if (t_ld < 0 && dut.fire[2]) t_ld = c;
      if (t_add < 0 && (dut.fire[0] || dut.fire[1])) t_add = c;
    end
    checks++;
    if (t_add != t_ld + 1) begin failures++; $display("chained add issued at %0d, load at %0d", t_add, t_ld); end
    wait_idle();
    compare("chain");
    // random programs
    for (int p = 0; p < 12; p++) begin
      for (int n = 0; n < 60; n++) begin
        i = rnd_instr();
        issue(i);
      end
      wait_idle();
      compare($sformatf("program %0d", p));
      // make vf0 fully set again now and then so masks do not die out
      if (p % 3 == 2) begin
        i = '0; i.op = OP_SETVPW; i.scalar = 64'd0; issue(i);
        i = '0; i.op = OP_SETVL; i.scalar = 64'd128; issue(i);
        i = '0; i.op = OP_CMPLT; i.fd = 4'd0; i.vs1 = 5'd31; i.vs = 1'b1; i.scalar = 64'h8000; i.msel = 1'b1; issue(i);
        i = '0; i.op = OP_SETVPW; i.scalar = 64'd2; issue(i);
        wait_idle();
      end
    end
    for (int wa = STBASE / 32; wa < STBASE / 32 + 160; wa++)
      for (int b = 0; b < 32; b++) begin
        logic [7:0] ex;
        ex = mm.exists(wa*32 + b) ? mm[wa*32 + b] : 8'h00;
        checks++;
        if (ldbyte(wa*32 + b) !== ex) begin
          failures++;
          if (failures < 12) $display("store byte %h: %h exp %h", wa*32 + b, ldbyte(wa*32 + b), ex);
        end
      end
    checks++;
    if (n_stall < 50 || n_chain < 20) begin failures++; $display("coverage: stall %0d chain %0d", n_stall, n_chain); end
    $display("stalls %0d chained issues %0d", n_stall, n_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
