// viram_pkg: sizes, types and helper functions shared by the VIRAM-1 vector
// coprocessor and its embedded-DRAM memory system.
//
// The numbers that come from the VIRAM-1 design are: 4 vector lanes with 64-bit
// datapaths, 32 vector registers of 32 x 64-bit elements (8 KB), 16 flag
// registers (256 B), virtual processor widths (VPW) of 64, 32 and 16 bits, a
// 15-stage delayed memory pipeline, 256 bits per cycle between the memory unit
// and memory, 8 DRAM banks of 1.75 MB with 256-bit interfaces, and a 25 ns row
// access at 200 MHz (5 cycles). The instruction record, the opcode list and
// the stage numbers of the arithmetic pipeline are this design's own choices:
// the vector ISA encoding is not part of the hardware description used here.
//
// Element layout. An element group is one 64-bit word in every lane, 256 bits
// in total. With k = 64/VPW sub-words per lane word, element i lives in
// group g = i/(4k), sub-word s = (i mod 4k)/4, lane l = i mod 4, so consecutive
// elements go round-robin over the lanes. A group therefore always holds 4k
// consecutive elements, which is exactly one 256-bit memory transfer for a
// unit-stride access at the same width.
package viram_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned LANES      = 4;     // vector lanes
  localparam int unsigned ELEM_W     = 64;    // datapath width per lane
  localparam int unsigned NVREG      = 32;    // vector registers
  localparam int unsigned MVL64      = 32;    // elements per register at VPW=64
  localparam int unsigned NGRP       = MVL64 / LANES;   // groups per register (8)
  localparam int unsigned GRP_W      = LANES * ELEM_W;  // 256 bits per group
  localparam int unsigned NFREG      = 16;    // flag registers
  localparam int unsigned MVL_MAX    = MVL64 * 4;       // 128 elements at VPW=16
  localparam int unsigned NBANK      = 8;     // DRAM banks
  localparam int unsigned MWORD_W    = 256;   // bank interface width
  localparam int unsigned BANK_WORDS = 57344; // 1.75 MB / 32 B
  localparam int unsigned ADDR_W     = 32;    // byte address width
  localparam int unsigned DRAM_LAT   = 5;     // 25 ns at 200 MHz

  // Delayed pipeline stage numbers, counted from issue (stage 0).
  localparam int unsigned MEM_STAGES = 15;    // load: G=0, T=1, ..., VW=14
  localparam int unsigned ST_VW_LD   = MEM_STAGES - 1;  // load write stage
  localparam int unsigned ST_VR      = MEM_STAGES - 1;  // operand read of add/store
  localparam int unsigned ST_VW_AR   = ST_VR + 2;       // arithmetic write stage

  localparam int unsigned TAG_W      = 8;

  typedef logic [4:0] vreg_t;
  typedef logic [3:0] freg_t;
  typedef logic [$clog2(NGRP)-1:0] grp_t;
  typedef logic [7:0] vl_t;                   // 0 .. 128
  typedef logic [GRP_W-1:0] grp_data_t;
  typedef logic [GRP_W/8-1:0] grp_be_t;
  typedef logic [MVL_MAX-1:0] flag_t;

  typedef enum logic [1:0] {VPW16 = 2'd0, VPW32 = 2'd1, VPW64 = 2'd2} vpw_e;

  typedef enum logic [5:0] {
    OP_NOP, OP_ADD, OP_SUB, OP_ADDS, OP_SUBS, OP_AND, OP_OR, OP_XOR,
    OP_SLL, OP_SRL, OP_SRA, OP_MIN, OP_MAX, OP_MUL, OP_MADD,
    OP_CMPLT, OP_CMPEQ,
    OP_LD, OP_ST,
    OP_HALF, OP_BFLYL, OP_BFLYR,
    OP_FAND, OP_FOR, OP_FXOR, OP_FNOT, OP_FMOV,
    OP_SETVL, OP_SETVPW
  } vop_e;

  typedef enum logic [1:0] {AM_SEQ = 2'd0, AM_STRIDE = 2'd1, AM_INDEX = 2'd2} amode_e;

  // Width of vector data in memory. MW_VPW: the element width itself.
  // Narrower memory data are sign- or zero-extended on load and truncated
  // on store; a width above VPW is treated as VPW.
  typedef enum logic [1:0] {MW_VPW = 2'd0, MW8 = 2'd1, MW16 = 2'd2, MW32 = 2'd3} mw_e;

  // Rounding modes of the fixed-point multiply-add (four, as in the design;
  // which four is this design's choice).
  typedef enum logic [1:0] {
    RND_TRUNC = 2'd0,   // drop shifted-out bits (toward minus infinity)
    RND_HALFUP = 2'd1,  // round to nearest, ties up
    RND_EVEN = 2'd2,    // round to nearest, ties to even
    RND_ODD = 2'd3      // round to odd (jamming)
  } rnd_e;

  // One vector instruction as handed over by the scalar core.
  typedef struct packed {
    vop_e            op;
    vreg_t           vd;
    vreg_t           vs1;
    vreg_t           vs2;     // second source, or index register
    freg_t           fd;
    freg_t           fs1;
    freg_t           fs2;
    logic            msel;    // mask: 0 selects vf0, 1 selects vf1
    logic            vs;      // 1: second operand is the scalar
    logic            hi;      // fixed-point multiply uses the upper halves
    rnd_e            rnd;
    logic [5:0]      shamt;   // fixed-point scaling shift
    amode_e          amode;
    mw_e             mw;      // memory data width
    logic            munsigned; // zero-extend narrow loads
    logic [ADDR_W-1:0] base;  // memory base address (bytes)
    logic [ADDR_W-1:0] stride;// stride in bytes
    logic [63:0]     scalar;  // scalar operand / VL / VPW / radix
  } vinstr_t;

  // One element-group operation ("micro-op") as it travels down a unit's
  // delayed pipeline. Vector length and VPW travel with it.
  typedef struct packed {
    logic            valid;
    vop_e            op;
    vreg_t           vd;
    vreg_t           vs1;
    vreg_t           vs2;
    freg_t           fd;
    logic            msel;
    logic            vs;
    logic            hi;
    rnd_e            rnd;
    logic [5:0]      shamt;
    logic [63:0]     scalar;
    grp_t            grp;
    logic [1:0]      sub;     // sub-word slot (strided/indexed memory access)
    vpw_e            vpw;
    vl_t             vl;
    amode_e          amode;
    mw_e             mw;
    logic            munsigned;
    logic [ADDR_W-1:0] base;
    logic [ADDR_W-1:0] stride;
  } uop_t;

  // Memory request and response on one crossbar port.
  typedef struct packed {
    logic                  valid;
    logic                  we;
    logic [ADDR_W-6:0]     waddr;  // 256-bit word address
    logic [MWORD_W-1:0]    wdata;
    logic [MWORD_W/8-1:0]  be;
    logic [TAG_W-1:0]      tag;
  } mreq_t;

  typedef struct packed {
    logic               valid;
    logic [MWORD_W-1:0] rdata;
    logic [TAG_W-1:0]   tag;
  } mrsp_t;

  // ------------------------------------------------------------ helpers
  function automatic int unsigned vpw_bits(vpw_e w);
    case (w)
      VPW16:   return 16;
      VPW32:   return 32;
      default: return 64;
    endcase
  endfunction

  // sub-words per lane word
  function automatic int unsigned vpw_k(vpw_e w);
    return 64 / vpw_bits(w);
  endfunction

  // Per-element enable of group g in lane order, expanded to byte enables:
  // element enabled when its index is below vl and its mask bit is set.
  function automatic grp_be_t elem_be(grp_t g, vpw_e w, vl_t vl, flag_t mask);
    grp_be_t be;
    int unsigned bw, k, i;
    bw = vpw_bits(w);
    k  = vpw_k(w);
    be = '0;
    for (int unsigned s = 0; s < 4; s++)
      for (int unsigned l = 0; l < LANES; l++)
        if (s < k) begin
          i = (int'(g) * k + s) * LANES + l;
          if (i < int'(vl) && mask[i])
            for (int unsigned b = 0; b < 8; b++)
              if (b < bw/8) be[l*8 + s*(bw/8) + b] = 1'b1;
        end
    return be;
  endfunction

  // Bytes per element in memory for element width w and memory width m.
  function automatic int unsigned mem_bytes(vpw_e w, mw_e m);
    int unsigned eb;
    eb = vpw_bits(w) / 8;
    case (m)
      MW8:     return 1;
      MW16:    return (eb < 2) ? eb : 2;
      MW32:    return (eb < 4) ? eb : 4;
      default: return eb;
    endcase
  endfunction

  // Number of groups an instruction of length vl covers.
  function automatic int unsigned n_groups(vl_t vl, vpw_e w);
    int unsigned per;
    per = LANES * vpw_k(w);
    return (int'(vl) + per - 1) / per;
  endfunction

endpackage
