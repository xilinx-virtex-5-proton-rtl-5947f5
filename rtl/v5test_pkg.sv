// v5test_pkg: constants and types shared by the Virtex-5 radiation-test
// design, both the device-under-test (DUT) logic and the high speed digital
// tester (HSDT) that drives and observes it.
//
// The command opcodes, the 4-byte command word, the 300-bit string length,
// the 4-bit window, the 6 chains per TMR domain, the 20-bit configuration
// byte address and the default error-injection range x800..x70000 are taken
// from the test plan. The D_SR pattern codes and the error-report layout are
// this design's own choices. Some constants (N_DOMAINS, CFG_BYTES and the
// injection-range defaults) document the plan's numbers and are repeated as
// module parameter defaults, so lint reports them as unused.
package v5test_pkg;

  // ---------------- DUT geometry ----------------
  localparam int unsigned SR_LEN      = 300;  // bits per windowed shift register string
  localparam int unsigned WIN_BITS    = 4;    // window width (last 4 DFFs)
  localparam int unsigned N_CHAINS    = 6;    // WSR chains per TMR domain
  localparam int unsigned N_DOMAINS   = 3;    // TMR domains
  localparam int unsigned SCAN_W      = N_CHAINS * WIN_BITS; // 24-bit SCAN_DATA per domain

  // ---------------- tester geometry ----------------
  localparam int unsigned CFG_ADDR_W  = 20;       // bin-file byte address width
  localparam int unsigned CFG_BYTES   = 977488;   // length of the .bin file
  localparam logic [CFG_ADDR_W-1:0] INJ_LOW_DEFAULT  = 20'h00800;
  localparam logic [CFG_ADDR_W-1:0] INJ_HIGH_DEFAULT = 20'h70000;

  // ---------------- command opcodes (first byte of the 4-byte word) ----------
  typedef enum logic [7:0] {
    CMD_RESET_DUT    = 8'h01,
    CMD_START_TEST   = 8'h02,
    CMD_START_CONFIG = 8'h04,
    CMD_START_RDBK   = 8'h05,
    CMD_START_SCRUB  = 8'h06,
    CMD_INJECT_ON    = 8'h0E,
    CMD_INJ_LOW      = 8'h79,
    CMD_INJ_HIGH     = 8'h7A,
    CMD_END_CONFIG   = 8'h7B,
    CMD_WRITE_CONFIG = 8'h81,
    CMD_SET_CTL      = 8'h89,
    CMD_SET_MASK     = 8'h8A,
    CMD_CLOCK_FREQ   = 8'hA0
  } cmd_e;

  // 4-byte command/data word: opcode, D0, D1, D2 (received in that order)
  typedef struct packed {
    logic [7:0] op;
    logic [7:0] d0;
    logic [7:0] d1;
    logic [7:0] d2;
  } cmd_word_t;

  // D_SR data patterns (0, 1 and checkerboard)
  typedef enum logic [1:0] {
    PAT_ZERO  = 2'd0,
    PAT_ONE   = 2'd1,
    PAT_CHECK = 2'd2
  } pattern_e;

  // One error report: domain, per-chain error flags and the captured window.
  typedef struct packed {
    logic [1:0]          domain;
    logic [N_CHAINS-1:0] chain_err;
    logic [SCAN_W-1:0]   window;
  } err_report_t;   // 32 bits

  // 20-bit address carried as MSB(3:0) NN(7:0) LSB(7:0) in D0, D1, D2
  function automatic logic [CFG_ADDR_W-1:0] cmd_addr(input cmd_word_t w);
    return {w.d0[3:0], w.d1, w.d2};
  endfunction

endpackage
