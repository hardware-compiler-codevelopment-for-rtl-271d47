// tb_vmem_unit: checks the vector memory unit against a byte-level memory model.
//
// The unit is connected to the behavioural memory tb_vec_mem, which refuses
// about a third of all requests, so the unit must stall and retry. Random
// unit-stride (at any byte offset), strided and indexed loads and stores at
// all three VPW, with random vector length and mask, are issued, with
// memory data as wide as the elements or narrower (8, 16 or 32 bits,
// sign- or zero-extended on load). Loads read
// a preloaded region; stores write a separate region, and a byte-level shadow
// of that region is updated in program order. Checks: each load writes the
// register file exactly in the 15th unfrozen cycle after issue (stage 14)
// with the right element values and only the active elements enabled; after
// the run every byte of the store region equals the shadow (so masked and
// out-of-length elements were not written).
`timescale 1ns/1ps
module tb_vmem_unit;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic stall, stall_req, wr_en, busy;
  uop_t iss;
  vreg_t rd_reg [2], wr_reg;
  grp_t rd_grp [2], wr_grp;
  grp_data_t rd_data [2], wr_data;
  freg_t frd_reg;
  flag_t frd_data;
  grp_be_t wr_be;
  mreq_t lreq [4], sreq [4];
  logic lgnt [4], sgnt [4];
  mrsp_t lrsp [4];
  logic [255:0] rf [32][8];
  flag_t fr [2];
  logic [7:0] shadow [int];
  int checks = 0, failures = 0, adv = 0, n_stall = 0;
  int n_ld [3] = '{0, 0, 0}, n_st [3] = '{0, 0, 0}, n_unal = 0, n_narrow = 0;
  localparam int STBASE = 32'h0010_0000;

  typedef struct { int due; grp_data_t d; grp_be_t be; vreg_t vd; grp_t g; } exp_t;
  exp_t q [$];

  assign stall = stall_req;
  vmem_unit dut (.*);
  tb_vec_mem #(.LAT(5), .GRANT_PCT(70)) mem (.clk, .lreq, .lgnt, .lrsp, .sreq, .sgnt);

  for (genvar r = 0; r < 2; r++) assign rd_data[r] = rf[rd_reg[r]][rd_grp[r]];
  assign frd_data = fr[frd_reg[0]];
  always @(posedge clk) if (wr_en) rf[wr_reg][wr_grp] <= (rf[wr_reg][wr_grp] & ~be2bits(wr_be)) | (wr_data & be2bits(wr_be));

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic grp_data_t be2bits(grp_be_t be);
    grp_data_t m;
    for (int b = 0; b < 32; b++) m[b*8 +: 8] = {8{be[b]}};
    return m;
  endfunction

  function automatic logic [7:0] mbyte(int a);
    logic [255:0] w;
    w = mem.words.exists(longint'(a >> 5)) ? mem.words[longint'(a >> 5)] : '0;
    return w[(a & 31)*8 +: 8];
  endfunction

  // element e of register r (lane layout) at width w
  function automatic longint unsigned rel(int r, int e, int w);
    int k, g, p;
    k = 64 / w; g = e / (4*k); p = e % (4*k);
    return (rf[r][g] >> ((p % 4)*64 + (p / 4)*w)) & ((w == 64) ? '1 : ((64'd1 << w) - 1));
  endfunction

  // element numbers and addresses one micro-op touches
  function automatic void elems(uop_t u, output int n, output int e [16], output int a [16]);
    int w, k;
    w = 16 << int'(u.vpw); k = 64 / w;
    n = 0;
    if (u.amode == AM_SEQ)
      for (int p = 0; p < 4*k; p++) begin
        e[n] = int'(u.grp)*4*k + p; a[n] = int'(u.base) + (int'(u.grp)*4*k + p)*int'(mem_bytes(u.vpw, u.mw)); n++;
      end
    else
      for (int l = 0; l < 4; l++) begin
        e[n] = (int'(u.grp)*k + int'(u.sub))*4 + l;
        a[n] = (u.amode == AM_STRIDE) ? int'(u.base) + e[n]*int'(u.stride)
                                      : int'(u.base) + int'(rel(u.vs2, e[n], w));
        n++;
      end
  endfunction

  function automatic exp_t load_model(uop_t u, int due);
    exp_t x;
    int w, k, n, e [16], a [16];
    w = 16 << int'(u.vpw); k = 64 / w;
    elems(u, n, e, a);
    x.due = due; x.vd = u.vd; x.g = u.grp; x.d = '0; x.be = '0;
    for (int j = 0; j < n; j++)
      if (e[j] < int'(u.vl) && fr[u.msel][e[j]]) begin
        int p, bo;
        p  = e[j] % (4*k);
        bo = (p % 4)*8 + (p / 4)*(w/8);
        begin
          int mb;
          longint unsigned v;
          mb = int'(mem_bytes(u.vpw, u.mw));
          v = 0;
          for (int y = 0; y < mb; y++) v |= longint'(mbyte(a[j] + y)) << (8*y);
          if (!u.munsigned && mb < 8 && v[mb*8-1]) v |= ~((64'd1 << (mb*8)) - 1);
          for (int y = 0; y < w/8; y++) begin
            x.be[bo + y] = 1'b1;
            x.d[(bo + y)*8 +: 8] = 8'(v >> (8*y));
          end
        end
      end
    return x;
  endfunction

  function automatic void store_model(uop_t u);
    int w, n, e [16], a [16];
    longint unsigned v;
    w = 16 << int'(u.vpw);
    elems(u, n, e, a);
    for (int j = 0; j < n; j++)
      if (e[j] < int'(u.vl) && fr[u.msel][e[j]]) begin
        v = rel(u.vd, e[j], w);
        for (int y = 0; y < int'(mem_bytes(u.vpw, u.mw)); y++) shadow[a[j] + y] = 8'(v >> (8*y));
      end
  endfunction

  function automatic uop_t rnd_uop(logic st);
    uop_t u;
    int w, k;
    u = '0;
    u.valid = 1; u.op = st ? OP_ST : OP_LD;
    u.vpw = vpw_e'($urandom_range(2));
    w = 16 << int'(u.vpw); k = 64 / w;
    u.amode = amode_e'($urandom_range(2));
    u.mw = ($urandom_range(1) == 1) ? MW_VPW : mw_e'($urandom_range(1, 3));
    u.munsigned = $urandom_range(1);
    if (u.mw != MW_VPW && mem_bytes(u.vpw, u.mw) < w/8) n_narrow++;
    u.vd = st ? 5'($urandom_range(16, 23)) : 5'($urandom_range(0, 7));
    u.vs2 = 5'(10 + int'(u.vpw));
    u.grp = 3'($urandom);
    u.sub = 2'($urandom_range(k - 1));
    u.vl = vl_t'($urandom_range(2048 / w));
    u.msel = $urandom_range(1);
    u.stride = ($urandom_range(4) + 1) * (w/8) * (($urandom_range(1) == 1) ? 1 : 9);
    if (u.amode == AM_SEQ) u.base = 32'($urandom_range(4000)) + (st ? STBASE : 0);
    else u.base = ((st ? STBASE : 0) + 32'($urandom_range(100)) * 8);
    return u;
  endfunction

  initial begin
    for (int a = 0; a < 2048; a++) mem.words[longint'(a)] = {8{$urandom()}};
    for (int r = 0; r < 32; r++) for (int g = 0; g < 8; g++) rf[r][g] = {8{$urandom()}};
    // index registers: element e holds a distinct, size-aligned offset
    for (int v = 0; v < 3; v++) begin
      int w, k;
      w = 16 << v; k = 64 / w;
      for (int e = 0; e < 2048 / w; e++) begin
        int g, p;
        g = e / (4*k); p = e % (4*k);
        for (int b = 0; b < w; b++) rf[10 + v][g][(p % 4)*64 + (p / 4)*w + b] = 1'b0;
        rf[10 + v][g] |= grp_data_t'(((e * 37) % 128) * (w/8)) << ((p % 4)*64 + (p / 4)*w);
      end
    end
    fr[0] = {4{$urandom()}}; fr[1] = '1;
    iss = '0;
    #3 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      #0.1;
      if (n < 2950 && $urandom_range(1) == 1) iss = rnd_uop($urandom_range(1) == 1);
      else iss = '0;
      while (1) begin
        #0.7;
        if (!stall) break;
        n_stall++;
        checks++;
        if (wr_en) begin failures++; $display("load write while frozen"); end
        @(negedge clk);
        #0.1;
      end
      adv++;
      if (wr_en) begin
        exp_t e;
        checks++;
        if (q.size() == 0) begin failures++; $display("unexpected load write"); end
        else begin
          e = q.pop_front();
          if (e.due != adv || wr_reg != e.vd || wr_grp != e.g || wr_be != e.be ||
              ((wr_data ^ e.d) & be2bits(e.be)) != 0) begin
            failures++;
            if (failures < 6) $display("load write at %0d due %0d be %h/%h data ok %0b", adv, e.due, wr_be, e.be,
                                       ((wr_data ^ e.d) & be2bits(e.be)) == 0);
          end
        end
      end
      if (iss.valid) begin
        if (iss.op == OP_LD) begin q.push_back(load_model(iss, adv + 14)); n_ld[iss.amode]++; end
        else begin store_model(iss); n_st[iss.amode]++; end
        if (iss.amode == AM_SEQ && iss.base[4:0] != 0) n_unal++;
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("%0d loads not written", q.size()); end
    for (int wa = STBASE / 32; wa < STBASE / 32 + 400; wa++)
      for (int b = 0; b < 32; b++) begin
        logic [7:0] ex;
        ex = shadow.exists(wa*32 + b) ? shadow[wa*32 + b] : 8'h00;
        checks++;
        if (mbyte(wa*32 + b) !== ex) begin
          failures++;
          if (failures < 10) $display("store byte %h: %h exp %h", wa*32 + b, mbyte(wa*32 + b), ex);
        end
      end
    checks++;
    if (n_stall < 100 || n_unal < 100 || n_narrow < 200 || n_ld[2] < 50 || n_st[2] < 50 || n_ld[1] < 50 || n_st[1] < 50) begin
      failures++; $display("coverage: stall %0d unal %0d narrow %0d", n_stall, n_unal, n_narrow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
