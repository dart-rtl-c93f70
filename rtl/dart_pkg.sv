// dart_pkg: types and constants shared by the DART field-test blocks.
//
// DART measures, in the field, the shortest release-to-capture interval at
// which each clock domain still passes its logic BIST, and logs it so that a
// slow growth of path delay (aging) is seen before it causes a failure.
// This package holds the TAP instruction codes, the layouts of the LBIST and
// MBIST data registers, the controller modes and the map of the DART memory
// (test specification and log). The instruction codes, register layouts and
// memory map are this design's own choices; the document names the
// registers' contents (seeds, signatures, options, timing, clock domain) but
// gives no encodings.
// Some constants (the DART memory size, for one) are used only by the
// modules that import this package, so a linter that checks the package
// alone reports them as unused.
`timescale 1ps/1ps
package dart_pkg;

  // ---------------------------------------------------------------- TAP
  localparam int IR_W = 4;

  typedef enum logic [IR_W-1:0] {
    IR_EXTEST  = 4'h0,
    IR_LB_CFG  = 4'h2,   // LBIST configuration register
    IR_LB_SEED = 4'h3,   // capture signature / shift in next seed
    IR_LB_RUN  = 4'h4,   // LBIST runs while selected; DR = status
    IR_MB_CFG  = 4'h5,   // MBIST configuration register
    IR_MB_RUN  = 4'h6,   // MBIST runs while selected; DR = status
    IR_BYPASS  = 4'hF
  } tap_instr_e;

  typedef enum logic [3:0] {
    TS_RESET      = 4'h0,
    TS_IDLE       = 4'h1,
    TS_SEL_DR     = 4'h2,
    TS_CAP_DR     = 4'h3,
    TS_SHIFT_DR   = 4'h4,
    TS_EXIT1_DR   = 4'h5,
    TS_PAUSE_DR   = 4'h6,
    TS_EXIT2_DR   = 4'h7,
    TS_UPD_DR     = 4'h8,
    TS_SEL_IR     = 4'h9,
    TS_CAP_IR     = 4'hA,
    TS_SHIFT_IR   = 4'hB,
    TS_EXIT1_IR   = 4'hC,
    TS_PAUSE_IR   = 4'hD,
    TS_EXIT2_IR   = 4'hE,
    TS_UPD_IR     = 4'hF
  } tap_state_e;

  // ---------------------------------------------------------------- LBIST
  localparam int SEED_W      = 32;  // TPG and RA register width
  localparam int SHRINK_W    = 6;   // delay-line tap code width
  localparam int CHAINLEN_W  = 10;
  localparam int PATCNT_W    = 16;
  localparam int DOM_W       = 4;
  localparam int DIV_W       = 4;

  // LBIST configuration data register (LSB is shifted first).
  typedef struct packed {
    logic [CHAINLEN_W-1:0] chain_len;  // scan shift cycles per pattern
    logic [PATCNT_W-1:0]   patterns;   // patterns per seed
    logic [SHRINK_W-1:0]   shrink;     // release-capture shortening, buffer units
    logic [DIV_W-1:0]      div;        // PLL cycles per test-clock cycle of the domain
    logic [DOM_W-1:0]      dom;        // clock domain under test
  } lbist_cfg_t;
  localparam int LB_CFG_W = $bits(lbist_cfg_t);

  // ---------------------------------------------------------------- MBIST
  localparam int MB_ADDR_W = 16;
  typedef enum logic [1:0] {
    ALG_MATS_PLUS = 2'd0,   // {b(w0); up(r0,w1); down(r1,w0)}
    ALG_MARCH_CM  = 2'd1    // {b(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); b(r0)}
  } mbist_alg_e;

  typedef struct packed {
    mbist_alg_e           alg;
    logic [MB_ADDR_W-1:0] last;
    logic [MB_ADDR_W-1:0] first;
  } mbist_cfg_t;
  localparam int MB_CFG_W = $bits(mbist_cfg_t);

  // ---------------------------------------------------------------- modes
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,   // user mode, DART controller idle
    MODE_LBIST = 2'd1,
    MODE_MBIST = 2'd2
  } dart_mode_e;

  // DRTSTART menu selection
  typedef enum logic { MENU_LBIST = 1'b0, MENU_MBIST = 1'b1 } dart_menu_e;

  // ---------------------------------------------------------------- DART memory map
  // 32-bit words.  The test specification starts at word 0:
  //   LBIST session:  word0 = number of domain entries
  //     entry header: [3:0] domain, [7:4] divider, [17:8] chain length, [25:18] menus
  //     menu header:  [15:0] patterns per seed, [23:16] number of seeds
  //     then (seed, signature) word pairs
  //   MBIST session:  word0 = number of test groups
  //     group: word A [1:0] algorithm, word B [15:0] first, [31:16] last address
  // The log occupies words LOG_BASE .. LOG_BASE+127.
  localparam int DMEM_WORDS   = 2048;             // 8 kB of 32-bit words
  localparam int DMEM_AW      = 11;
  localparam int LOG_BASE     = 1792;
  localparam int LOG_TIMING   = LOG_BASE + 0;     // +d : last minimum passing shrink of domain d (bit 31 = valid)
  localparam int LOG_F0       = LOG_BASE + 16;    // +3t+r : initial RO count (characterisation)
  localparam int LOG_F        = LOG_BASE + 32;    // +3t+r : latest RO count
  localparam int LOG_TV       = LOG_BASE + 48;    // +3t : dT, +3t+1 : dV (signed, 1/256 units), +3t+2 : {T range, V range}
  localparam int LOG_DRES     = LOG_BASE + 64;    // +d : [31] pass seen, [30] fail seen, [23:16] runs, [5:0] min passing shrink
  localparam int LOG_MRES     = LOG_BASE + 96;    // +g : {done, fail}
  localparam int LOG_STATUS   = LOG_BASE + 127;   // session status

endpackage
