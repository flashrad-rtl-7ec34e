// flash_pkg: types and constants shared by the flash cube controller.
//
// Geometry follows the cube: 24 dies of 32 Gbit, each with its own 8-bit
// NAND channel, and a logical block table whose entries cover 16 sectors
// (8 KiB). The 3-bit operation code is the one the command port of the
// NAND controller takes; 3'b001 for "program page" and 3'b111 for "idle"
// follow the controller's recorded waveform, the other codes are this
// design's choice. ONFI command bytes are the standard values used by
// Micron parts. BCH parameters (GF(2^13), t = 2, 512-byte sectors) are this
// design's choice: the cube only specifies that a BCH code protects data in
// the spare area of each die.
package flash_pkg;

  // ---------------- cube geometry ----------------
  localparam int unsigned NUM_DIES          = 24;
  localparam int unsigned DIE_IO_W          = 8;
  localparam int unsigned SECTOR_BYTES      = 512;
  localparam int unsigned SECTORS_PER_BLOCK = 16;   // 8 KiB mapping unit
  // 32 Gbit per die / 8 KiB per mapping unit = 2^19 units per die
  localparam int unsigned DIE_BLOCK_W       = 19;
  localparam int unsigned DIE_SEL_W         = 5;
  // physical block number held in one 4-byte table entry: {die, block}
  localparam int unsigned PBN_W             = 32;
  localparam logic [PBN_W-1:0] PBN_FREE     = '1;  // unmapped entry marker
  // logical sector address: 768 Gbit / 512 B = 3 * 2^26 sectors
  localparam int unsigned LSA_W             = 28;

  // ---------------- BCH code ----------------
  localparam int unsigned GF_M          = 13;
  localparam logic [GF_M:0] GF_POLY     = 14'h201B;  // x^13+x^4+x^3+x+1
  localparam int unsigned BCH_PAR_BITS  = 26;        // 2 * GF_M, t = 2
  // g(x) = m1(x) * m3(x), m1 = 0x201B, m3 = 0x26B1
  localparam logic [BCH_PAR_BITS:0] BCH_GEN = 27'h4D5154B;
  localparam int unsigned BCH_PAR_BYTES = 4;         // 26 bits, zero padded
  localparam int unsigned CW_BYTES      = SECTOR_BYTES + BCH_PAR_BYTES;
  // each sector slot in a page: codeword, then the 24-bit logical block
  // index it was written for (metadata, checked on every read)
  localparam int unsigned META_BYTES    = 3;
  localparam int unsigned SLOT_BYTES    = CW_BYTES + META_BYTES;

  typedef logic [GF_M-1:0] gf_t;

  // ---------------- NAND operations ----------------
  typedef enum logic [2:0] {
    OP_READ    = 3'b000,
    OP_PROGRAM = 3'b001,
    OP_ERASE   = 3'b010,
    OP_RESET   = 3'b011,
    OP_IDLE    = 3'b111
  } nand_op_e;

  // ONFI command bytes
  localparam logic [7:0] NC_READ1    = 8'h00;
  localparam logic [7:0] NC_READ2    = 8'h30;
  localparam logic [7:0] NC_PROG1    = 8'h80;
  localparam logic [7:0] NC_PROG2    = 8'h10;
  localparam logic [7:0] NC_ERASE1   = 8'h60;
  localparam logic [7:0] NC_ERASE2   = 8'hD0;
  localparam logic [7:0] NC_STATUS   = 8'h70;
  localparam logic [7:0] NC_RESET    = 8'hFF;

  // cause marker stored with a suspect block in the bad-block FIFO
  typedef enum logic [1:0] {
    BB_NONE        = 2'd0,
    BB_WRITE_FAIL  = 2'd1,
    BB_READ_ERRORS = 2'd2,
    BB_ERASE_FAIL  = 2'd3
  } bb_cause_e;

  typedef enum logic [1:0] {
    SCRUB_NONE     = 2'd0,
    SCRUB_REWRITE  = 2'd1,
    SCRUB_RELOCATE = 2'd2
  } scrub_act_e;

  // ---------------- GF(2^13) helpers ----------------
  function automatic gf_t gf_mul_a(input gf_t v);       // v * alpha
    logic [GF_M:0] t;
    t = {v, 1'b0};
    if (t[GF_M]) t = t ^ GF_POLY;
    return t[GF_M-1:0];
  endfunction

  function automatic gf_t gf_mul_ainv(input gf_t v);    // v * alpha^-1
    logic [GF_M:0] t;
    t = {1'b0, v};
    if (t[0]) t = t ^ GF_POLY;
    return t[GF_M:1];
  endfunction

  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t r, s;
    r = '0;
    s = a;
    for (int i = 0; i < int'(GF_M); i++) begin
      if (b[i]) r = r ^ s;
      s = gf_mul_a(s);
    end
    return r;
  endfunction

  function automatic gf_t gf_mul_an(input gf_t v, input int n);  // v * alpha^n
    gf_t r;
    r = v;
    for (int i = 0; i < n; i++) r = gf_mul_a(r);
    return r;
  endfunction

  function automatic gf_t gf_mul_ainvn(input gf_t v, input int n); // v * alpha^-n
    gf_t r;
    r = v;
    for (int i = 0; i < n; i++) r = gf_mul_ainv(r);
    return r;
  endfunction

endpackage
