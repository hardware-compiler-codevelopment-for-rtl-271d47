// tb_viram1_top: end-to-end test of the VIRAM-1 vector processor and memory.
//
// The testbench plays the scalar core: it fills DRAM through the scalar
// memory port and the DMA engine, sends vector programs through the
// coprocessor port and reads the results back. A byte-level shadow of every
// memory word it touches is kept, and the expected result of each program is
// computed here with plain loops, independently of the hardware.
//
// Programs: unit-stride load/load/add/store with an unaligned store address
// (the delayed pipeline lets the add follow the load without stalls);
// strided load with a stride that maps every element to one bank (bank
// conflicts stall the pipeline); indexed load at VPW=32 (sparse gather); the
// chroma-key kernel at VPW=16 with compare, flag negate and two masked
// stores; fixed-point multiply-add and saturating add at VPW=16; a sum
// reduction with vhalf; a butterfly; two DMA channels running at once; and
// 8-bit memory data loaded at VPW=16 with zero and sign extension and stored
// back at 8 and 16 bits.
// Every mechanism is counted and must occur at least once. All parameters of
// the top are at their defaults (8 banks of 1.75 MB).
`timescale 1ns/1ps
module tb_viram1_top;
  import viram_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #0.5 rst_n = 1'b0;        // a real reset edge clears the pipelines at once
  always #2.5 clk = ~clk;

  logic      vi_valid;
  logic      vi_ready;
  vinstr_t   vi_instr;
  logic      v_idle;
  vl_t       v_vl;
  logic [7:0] v_mvl;
  mreq_t     sc_req;
  logic      sc_gnt;
  mrsp_t     sc_rsp;
  logic      dma_start, dma_ch, dma_dir;
  logic [31:0] dma_ext_addr, dma_dram_addr;
  logic [15:0] dma_nwords;
  logic [1:0]  dma_busy, dma_done;
  logic        sb_req_valid, sb_req_ready, sb_req_we, sb_rsp_valid;
  logic [31:0] sb_req_addr;
  logic [255:0] sb_req_wdata, sb_rsp_rdata;

  viram1_top dut (.*);

  int checks = 0;
  int failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ system bus memory
  logic [255:0] ext_mem [256];
  logic         sb_pend;
  logic [255:0] sb_data;
  always_ff @(posedge clk) begin
    sb_rsp_valid <= 1'b0;
    if (sb_req_valid && sb_req_ready) begin
      if (sb_req_we) ext_mem[sb_req_addr[7:0]] <= sb_req_wdata;
      else begin
        sb_rsp_valid <= 1'b1;
        sb_rsp_rdata <= ext_mem[sb_req_addr[7:0]];
      end
    end
  end
  always @(negedge clk) sb_req_ready <= ($urandom_range(3) != 0);

  // ------------------------------------------------------------ shadow memory
  logic [255:0] shadow [int];

  function automatic void m_wr(int unsigned a, int unsigned n, longint unsigned v);
    for (int unsigned b = 0; b < n; b++) begin
      int unsigned w;
      w = (a + b) >> 5;
      if (!shadow.exists(w)) shadow[w] = '0;
      shadow[w][((a + b) % 32)*8 +: 8] = v[b*8 +: 8];
    end
  endfunction

  function automatic longint unsigned m_rd(int unsigned a, int unsigned n);
    longint unsigned v;
    v = 0;
    for (int unsigned b = 0; b < n; b++) begin
      int unsigned w;
      w = (a + b) >> 5;
      if (shadow.exists(w)) v[b*8 +: 8] = shadow[w][((a + b) % 32)*8 +: 8];
    end
    return v;
  endfunction

  task automatic sc_write(int unsigned w, logic [255:0] d);
    @(negedge clk);
    sc_req = '0;
    sc_req.valid = 1'b1;
    sc_req.we = 1'b1;
    sc_req.waddr = 27'(w);
    sc_req.wdata = d;
    sc_req.be = '1;
    @(posedge clk);
    while (!sc_gnt) @(posedge clk);
    @(negedge clk);
    sc_req = '0;
  endtask

  task automatic sc_read(int unsigned w, output logic [255:0] d);
    @(negedge clk);
    sc_req = '0;
    sc_req.valid = 1'b1;
    sc_req.waddr = 27'(w);
    @(posedge clk);
    while (!sc_gnt) @(posedge clk);
    @(negedge clk);
    sc_req = '0;
    while (!sc_rsp.valid) @(posedge clk);
    d = sc_rsp.rdata;
    @(negedge clk);
  endtask

  task automatic push_range(int unsigned a, int unsigned bytes);
    for (int unsigned w = a >> 5; w <= (a + bytes - 1) >> 5; w++) begin
      if (!shadow.exists(w)) shadow[w] = '0;
      sc_write(w, shadow[w]);
    end
  endtask

  task automatic check_range(int unsigned a, int unsigned bytes, string what);
    logic [255:0] d;
    for (int unsigned w = a >> 5; w <= (a + bytes - 1) >> 5; w++) begin
      sc_read(w, d);
      checks++;
      if (d !== shadow[w]) begin
        failures++;
        $display("%s: word %0h differs: got %h exp %h", what, w, d, shadow[w]);
      end
    end
  endtask

  // ------------------------------------------------------------ vector issue
  function automatic vinstr_t mk(vop_e op, int vd = 0, int vs1 = 0, int vs2 = 0);
    vinstr_t i;
    i = '0;
    i.op = op;
    i.vd = vreg_t'(vd);
    i.vs1 = vreg_t'(vs1);
    i.vs2 = vreg_t'(vs2);
    return i;
  endfunction

  task automatic issue(vinstr_t i);
    @(negedge clk);
    vi_valid = 1'b1;
    vi_instr = i;
    @(posedge clk);
    while (!vi_ready) @(posedge clk);
    @(negedge clk);
    vi_valid = 1'b0;
  endtask

  task automatic setvl(int n);
    vinstr_t i;
    i = mk(OP_SETVL);
    i.scalar = 64'(n);
    issue(i);
  endtask

  task automatic setvpw(vpw_e w);
    vinstr_t i;
    i = mk(OP_SETVPW);
    i.scalar = (w == VPW16) ? 64'd0 : (w == VPW32) ? 64'd1 : 64'd2;
    issue(i);
  endtask

  task automatic vld(int vd, int unsigned base, amode_e am = AM_SEQ, int unsigned stride = 0,
                     int vidx = 0, bit msel = 0);
    vinstr_t i;
    i = mk(OP_LD, vd, 0, vidx);
    i.base = base;
    i.amode = am;
    i.stride = stride;
    i.msel = msel;
    issue(i);
  endtask

  task automatic vst(int vs, int unsigned base, bit msel = 0);
    vinstr_t i;
    i = mk(OP_ST, vs);
    i.base = base;
    i.msel = msel;
    issue(i);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    @(posedge clk);
    while (!v_idle) @(posedge clk);
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_stall, n_chain, n_unal, n_strided, n_indexed, n_vpw[3], n_masked_st, n_perm, n_flag;
  int n_act, n_rowhit, n_dma_in, n_dma_out, n_sat, n_narrow;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_vc.stall) n_stall++;
    for (int u = 0; u < 2; u++)
      if (dut.u_vc.fire[u] && dut.u_vc.seq[u].dep[2] && dut.u_vc.seq[2].active) n_chain++;
    if (dut.u_vc.fire[2]) begin
      if (dut.u_vc.uop[2].mw == MW8) n_narrow++;
      if (dut.u_vc.uop[2].amode == AM_STRIDE) n_strided++;
      if (dut.u_vc.uop[2].amode == AM_INDEX) n_indexed++;
      if (dut.u_vc.uop[2].op == OP_ST && dut.u_vc.uop[2].msel) n_masked_st++;
    end
    for (int u = 0; u < 3; u++)
      if (dut.u_vc.fire[u]) n_vpw[int'(dut.u_vc.uop[u].vpw)]++;
    if ((dut.u_vc.u_mem.lreq[1].valid && dut.v_lgnt[1]) || (dut.u_vc.u_mem.sreq[1].valid && dut.v_sgnt[1] &&
        dut.u_vc.u_mem.sw.u.amode == AM_SEQ)) n_unal++;
    if (dut.u_vc.do_perm) n_perm++;
    if (dut.u_vc.do_flag) n_flag++;
    for (int b = 0; b < NBANK; b++) begin
      if (dut.b_act[b]) n_act++;
      else if (dut.b_valid[b] && dut.b_ready[b]) n_rowhit++;
    end
    if (dut.u_dma.xreq.valid && dut.u_dma.xgnt) begin
      if (dut.u_dma.xreq.we) n_dma_in++;
      else n_dma_out++;
    end
  end

  // ------------------------------------------------------------ reference helpers
  function automatic longint signed sx(longint unsigned v, int bits);
    return longint'(v << (64 - bits)) >>> (64 - bits);
  endfunction

  function automatic longint unsigned sat(longint signed v, int bits);
    longint signed mx, mn;
    mx = (64'sd1 <<< (bits - 1)) - 1;
    mn = -mx - 1;
    if (v > mx) begin n_sat++; return longint'(mx) & ((64'd1 << bits) - 1); end
    if (v < mn) begin n_sat++; return longint'(mn) & ((64'd1 << bits) - 1); end
    return v & ((64'd1 << bits) - 1);
  endfunction

  // ------------------------------------------------------------ test
  localparam int unsigned A64 = 32'h1000, B64 = 32'h2000, C64 = 32'h3008;
  localparam int unsigned STR = 32'h10000, D64 = 32'h4000;
  localparam int unsigned IDX = 32'h5000, TAB = 32'h20000, G32 = 32'h6000;
  localparam int unsigned A16 = 32'h7000, B16 = 32'h7100, C16 = 32'h7200;
  localparam int unsigned X16 = 32'h8000, Y16 = 32'h8100, Z16 = 32'h8200, W16 = 32'h8300, S16 = 32'h8400;
  localparam int unsigned RED = 32'h9000, BFL = 32'h9100, DMI = 32'hA000;
  localparam int unsigned N16 = 32'hB000, N8 = 32'hB201;

  longint unsigned a64 [32], b64 [32];
  int unsigned     idx [64];
  logic [15:0]     a16 [128], b16 [128], x16 [128], y16 [128], z16 [128];
  logic [15:0]     thr;
  longint unsigned t0;

  initial begin
    vi_valid = 1'b0;
    vi_instr = '0;
    sc_req = '0;
    dma_start = 1'b0;
    dma_ch = 1'b0;
    dma_dir = 1'b0;
    dma_ext_addr = '0;
    dma_dram_addr = '0;
    dma_nwords = '0;
    for (int i = 0; i < 256; i++) ext_mem[i] = {8{$urandom()}};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---------------- data
    $display("[%0d] data", cycle);
    for (int i = 0; i < 32; i++) begin
      a64[i] = {$urandom(), $urandom()};
      b64[i] = {$urandom(), $urandom()};
      m_wr(A64 + 8*i, 8, a64[i]);
      m_wr(B64 + 8*i, 8, b64[i]);
    end
    for (int i = 0; i < 16; i++) m_wr(STR + 256*i, 8, {$urandom(), $urandom()});
    for (int i = 0; i < 1024; i++) m_wr(TAB + 4*i, 4, $urandom());
    for (int i = 0; i < 64; i++) begin
      idx[i] = 4 * $urandom_range(1023);
      m_wr(IDX + 4*i, 4, idx[i]);
    end
    for (int i = 0; i < 128; i++) begin
      a16[i] = 16'($urandom());
      b16[i] = 16'($urandom());
      x16[i] = 16'($urandom());
      y16[i] = 16'($urandom());
      z16[i] = (i % 3 == 0) ? 16'h7F00 : 16'($urandom());
      m_wr(A16 + 2*i, 2, a16[i]);
      m_wr(B16 + 2*i, 2, b16[i]);
      m_wr(X16 + 2*i, 2, x16[i]);
      m_wr(Y16 + 2*i, 2, y16[i]);
      m_wr(Z16 + 2*i, 2, z16[i]);
    end
    thr = 16'h2000;
    push_range(B64, 256);
    push_range(STR, 16*256);
    push_range(TAB, 4096);
    push_range(IDX, 256);
    push_range(A16, 512);
    push_range(X16, 768);
    // clear the result areas
    push_range(C64, 256);
    push_range(W16, 512);
    push_range(RED, 8);
    for (int i = 0; i < 8; i++) ext_mem[i] = shadow[(A64 >> 5) + i];

    // ---------------- DMA: A64 comes in over the system bus on channel 0
    $display("[%0d] DMA: A64 comes in over the system bus on channel 0", cycle);
    @(negedge clk);
    dma_start = 1'b1; dma_ch = 1'b0; dma_dir = 1'b0;
    dma_ext_addr = 0; dma_dram_addr = A64; dma_nwords = 8;
    @(negedge clk);
    dma_start = 1'b0;
    while (dma_busy != 0) @(posedge clk);

    // ---------------- P1: load, load, add, unaligned store (VPW 64)
    $display("[%0d] P1: load, load, add, unaligned store (VPW 64)", cycle);
    checks++;
    if (v_mvl != 8'd32) begin failures++; $display("MVL at VPW64 = %0d", v_mvl); end
    setvl(32);
    t0 = cycle;
    vld(1, A64);
    vld(2, B64);
    issue(mk(OP_ADD, 3, 1, 2));
    vst(3, C64);
    wait_idle();
    $display("load/load/add/store of 32 x 64-bit elements: %0d cycles", cycle - t0);
    for (int i = 0; i < 32; i++) m_wr(C64 + 8*i, 8, a64[i] + b64[i]);

    // ---------------- P2: strided load, all elements in one bank
    $display("[%0d] P2: strided load, all elements in one bank", cycle);
    setvl(16);
    vld(4, STR, AM_STRIDE, 256);
    vst(4, D64);
    wait_idle();
    for (int i = 0; i < 16; i++) m_wr(D64 + 8*i, 8, m_rd(STR + 256*i, 8));

    // ---------------- P3: indexed gather (VPW 32)
    $display("[%0d] P3: indexed gather (VPW 32)", cycle);
    setvpw(VPW32);
    setvl(64);
    checks++;
    if (v_mvl != 8'd64) begin failures++; $display("MVL at VPW32 = %0d", v_mvl); end
    vld(6, IDX);
    vld(7, TAB, AM_INDEX, 0, 6);
    vst(7, G32);
    wait_idle();
    for (int i = 0; i < 64; i++) m_wr(G32 + 4*i, 4, m_rd(TAB + idx[i], 4));

    // ---------------- P4: chroma key (VPW 16), masked stores
    $display("[%0d] P4: chroma key (VPW 16), masked stores", cycle);
    setvpw(VPW16);
    setvl(128);
    vld(8, A16);
    vld(9, B16);
    begin
      vinstr_t i;
      i = mk(OP_CMPLT, 0, 8, 0);
      i.vs = 1'b1; i.scalar = 64'(thr); i.fd = 4'd1;
      issue(i);
      i = mk(OP_FMOV); i.fd = 4'd2; i.fs1 = 4'd0;       // save vf0
      issue(i);
      i = mk(OP_FNOT); i.fd = 4'd0; i.fs1 = 4'd1;       // vf0 = not vf1
      issue(i);
    end
    vst(8, C16, 1'b1);
    vst(9, C16, 1'b0);
    begin
      vinstr_t i;
      i = mk(OP_FMOV); i.fd = 4'd0; i.fs1 = 4'd2;       // restore vf0
      issue(i);
    end
    wait_idle();
    for (int i = 0; i < 128; i++)
      m_wr(C16 + 2*i, 2, ($signed(a16[i]) < $signed(thr)) ? a16[i] : b16[i]);

    // ---------------- P5: fixed-point multiply-add and saturating add (VPW 16)
    $display("[%0d] P5: fixed-point multiply-add and saturating add (VPW 16)", cycle);
    setvl(100);
    vld(10, X16);
    vld(11, Y16);
    vld(12, Z16);
    begin
      vinstr_t i;
      i = mk(OP_MADD, 12, 10, 11);
      i.rnd = RND_HALFUP; i.shamt = 6'd4; i.hi = 1'b0;
      issue(i);
      issue(mk(OP_ADDS, 13, 10, 11));
    end
    vst(12, W16);
    vst(13, S16);
    wait_idle();
    for (int i = 0; i < 100; i++) begin
      longint signed p, q;
      p = sx(x16[i][7:0], 8) * sx(y16[i][7:0], 8);
      q = (p + 8) >>> 4;
      m_wr(W16 + 2*i, 2, sat(q + sx(z16[i], 16), 16));
      m_wr(S16 + 2*i, 2, sat(sx(x16[i], 16) + sx(y16[i], 16), 16));
    end

    // ---------------- P6: sum reduction with vhalf (VPW 64)
    $display("[%0d] P6: sum reduction with vhalf (VPW 64)", cycle);
    setvpw(VPW64);
    setvl(32);
    begin
      vinstr_t i;
      i = mk(OP_ADD, 14, 1); i.vs = 1'b1; i.scalar = 0;   // v14 = v1 + 0
      issue(i);
      for (int n = 32; n > 1; n /= 2) begin
        setvl(n);
        issue(mk(OP_HALF, 15, 14));
        setvl(n / 2);
        issue(mk(OP_ADD, 14, 14, 15));
      end
    end
    setvl(1);
    vst(14, RED);
    wait_idle();
    begin
      longint unsigned s;
      s = 0;
      for (int i = 0; i < 32; i++) s += a64[i];
      m_wr(RED, 8, s);
    end

    // ---------------- P7: left butterfly, radix 4 (VPW 64)
    $display("[%0d] P7: left butterfly, radix 4 (VPW 64)", cycle);
    setvl(32);
    begin
      vinstr_t i;
      i = mk(OP_ADD, 16, 2); i.vs = 1'b1; i.scalar = 0;   // v16 = v2
      issue(i);
      i = mk(OP_BFLYL, 16, 1); i.scalar = 64'd4;
      issue(i);
    end
    vst(16, BFL);
    wait_idle();
    for (int i = 0; i < 32; i++)
      m_wr(BFL + 8*i, 8, ((i % 8) < 4) ? a64[i + 4] : b64[i]);

    // ---------------- DMA: both channels at once
    $display("[%0d] DMA: both channels at once", cycle);
    for (int i = 0; i < 4; i++) begin
      ext_mem[16 + i] = {8{$urandom()}};
      shadow[(DMI >> 5) + i] = ext_mem[16 + i];
    end
    @(negedge clk);
    dma_start = 1'b1; dma_ch = 1'b0; dma_dir = 1'b0;
    dma_ext_addr = 16; dma_dram_addr = DMI; dma_nwords = 4;
    @(negedge clk);
    dma_ch = 1'b1; dma_dir = 1'b1;
    dma_ext_addr = 32; dma_dram_addr = B64; dma_nwords = 8;
    @(negedge clk);
    dma_start = 1'b0;
    while (dma_busy != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (ext_mem[32 + i] !== shadow[(B64 >> 5) + i]) begin
        failures++;
        $display("DMA out word %0d differs", i);
      end
    end

    // ---------------- P9: 8-bit memory data at VPW 16 (zero- and sign-extended)
    $display("[%0d] P9: 8-bit memory data at VPW 16", cycle);
    push_range(N16, 512);
    push_range(N8, 100);
    setvpw(VPW16);
    setvl(100);
    begin
      vinstr_t i;
      i = mk(OP_LD, 20); i.base = A64 + 3; i.mw = MW8; i.munsigned = 1'b1; issue(i);
      i = mk(OP_LD, 21); i.base = A64 + 3; i.mw = MW8; issue(i);
      i = mk(OP_ST, 20); i.base = N16; issue(i);
      i = mk(OP_ST, 21); i.base = N16 + 256; issue(i);
      i = mk(OP_ST, 21); i.base = N8; i.mw = MW8; issue(i);
    end
    wait_idle();
    for (int i = 0; i < 100; i++) begin
      longint unsigned b;
      b = m_rd(A64 + 3 + i, 1);
      m_wr(N16 + 2*i, 2, b);
      m_wr(N16 + 256 + 2*i, 2, b[7] ? (b | 64'hFF00) : b);
      m_wr(N8 + i, 1, b);
    end

    // ---------------- compare every touched word
    $display("[%0d] compare every touched word", cycle);
    check_range(A64, 256, "A");
    check_range(C64, 256, "vadd");
    check_range(D64, 128, "strided");
    check_range(G32, 256, "indexed");
    check_range(C16, 256, "chroma-key");
    check_range(W16, 200, "madd");
    check_range(S16, 200, "adds");
    check_range(RED, 8, "reduction");
    check_range(BFL, 256, "butterfly");
    check_range(DMI, 128, "dma in");
    check_range(N16, 512, "8-bit loads");
    check_range(N8, 100, "8-bit store");

    // ---------------- mechanisms
    $display("[%0d] mechanisms", cycle);
    $display("stall=%0d chain=%0d unaligned=%0d strided=%0d indexed=%0d vpw16/32/64=%0d/%0d/%0d",
             n_stall, n_chain, n_unal, n_strided, n_indexed, n_vpw[0], n_vpw[1], n_vpw[2]);
    $display("masked_st=%0d perm=%0d flag=%0d act=%0d rowhit=%0d dma_in=%0d dma_out=%0d sat=%0d narrow=%0d",
             n_masked_st, n_perm, n_flag, n_act, n_rowhit, n_dma_in, n_dma_out, n_sat, n_narrow);
    begin
      int m [16];
      m = '{n_stall, n_chain, n_unal, n_strided, n_indexed, n_vpw[0], n_vpw[1], n_vpw[2],
            n_masked_st, n_perm, n_flag, n_act, n_rowhit, n_dma_in, n_dma_out, n_narrow};
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
      checks++;
      if (n_sat == 0) begin failures++; $display("no saturation exercised"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
