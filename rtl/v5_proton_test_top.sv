// v5_proton_test_top: the complete radiation test set-up - the high speed
// digital tester (hsdt_tester) wired to the logic inside the Virtex-5 device
// under test (v5_dut).
//
// The tester sends three copies of CLK_SR_A, CLR and D_SR to the DUT and
// receives three copies of SCAN_DATA (24 bits) and SHIFT_CLK back. Parts of
// the set-up that are not logic designed here stay outside as ports: the
// DUT's own configuration port (SelectMap pins, INIT_B, DONE, BUSY), the
// external SRAM chip, the RS232 link to the host PC, the USB front end that
// can load configuration bytes, and the self-scrubber status lines
// (SCAN_ACTIVE, SCAN_ERROR, SEU_DETECT) that the DUT's readback logic
// drives.
//
// GLOBAL_TMR picks the DUT build: 1 = GTMR/XTMR (clocks and resets
// triplicated, used for the SEFI tests), 0 = DTMR (shared clock and reset,
// used for the clock-sensitivity tests). The other parameters pass through
// to the tester; their defaults are the full-size values (300-bit strings,
// 977488-byte configuration file, 115200 baud, 30 MHz CCLK from 150 MHz).
module v5_proton_test_top
  import v5test_pkg::*;
#(
  parameter bit          GLOBAL_TMR   = 1'b1,
  parameter int unsigned SR_BITS      = SR_LEN,
  parameter int unsigned CLKS_PER_BIT = 1302,
  parameter int unsigned CFG_LEN      = CFG_BYTES,
  parameter int unsigned ARM_WINDOWS  = 80,
  parameter int unsigned CCLK_DIV     = 5,
  parameter int unsigned INJ_STRIDE   = 1
) (
  input  logic                  clk,          // tester clock, 150 MHz
  input  logic                  rst_n,        // tester reset, active low
  input  logic                  rx232,
  output logic                  tx232,
  // DUT SelectMap configuration port
  output logic                  sm_cclk,
  output logic                  sm_csi_b,
  output logic                  sm_rdwr_b,
  output logic                  sm_prog_b,
  output logic [7:0]            sm_d,
  input  logic                  sm_init_b,
  input  logic                  sm_done,
  input  logic                  sm_busy,
  // tester SRAM
  output logic [19:0]           sram_a,
  output logic [15:0]           sram_d_o,
  input  logic [15:0]           sram_d_i,
  output logic                  sram_d_oe,
  output logic                  sram_we_n,
  output logic                  sram_oe_n,
  output logic                  sram_ce_n,
  output logic                  sram_blen_n,
  output logic                  sram_blhn_n,
  // USB configuration loader
  input  logic                  usb_cfg_valid,
  input  logic [CFG_ADDR_W-1:0] usb_cfg_addr,
  input  logic [7:0]            usb_cfg_data,
  output logic                  usb_cfg_ready,
  // self-scrubber lines
  output logic                  run_scan,
  output logic                  scan_mode,
  output logic                  error_inject,
  input  logic                  scan_active,
  input  logic                  scan_error,
  input  logic                  seu_detect,
  // operator status
  output logic [2:0][15:0]      error_cnt,
  output logic [2:0][15:0]      burst,
  output logic [2:0]            timeout,
  output logic                  running,
  output logic                  config_done,
  output logic                  cfg_error,
  output logic [31:0]           scrub_passes,
  output logic [31:0]           injections,
  output logic [2:0][7:0]       rise_cnt,
  output logic [2:0][7:0]       fall_cnt,
  output logic [15:0]           fifo_dropped
);
  logic [2:0]             clk_sr_a, clr_n, d_sr, shift_clk;
  logic [2:0][SCAN_W-1:0] scan_data;

  hsdt_tester #(
    .CLKS_PER_BIT(CLKS_PER_BIT), .CFG_LEN(CFG_LEN), .ARM_WINDOWS(ARM_WINDOWS),
    .CCLK_DIV(CCLK_DIV), .INJ_STRIDE(INJ_STRIDE)
  ) u_tester (
    .clk, .rst_n, .rx232, .tx232,
    .clk_sr_a, .clr_n, .d_sr, .scan_data, .shift_clk,
    .sm_cclk, .sm_csi_b, .sm_rdwr_b, .sm_prog_b, .sm_d, .sm_init_b, .sm_done, .sm_busy,
    .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n, .sram_ce_n,
    .sram_blen_n, .sram_blhn_n,
    .usb_cfg_valid, .usb_cfg_addr, .usb_cfg_data, .usb_cfg_ready,
    .run_scan, .scan_mode, .error_inject, .scan_active, .scan_error, .seu_detect,
    .error_cnt, .burst, .timeout, .running, .config_done, .cfg_error,
    .scrub_passes, .injections, .rise_cnt, .fall_cnt, .fifo_dropped);

  v5_dut #(.GLOBAL_TMR(GLOBAL_TMR), .LEN(SR_BITS)) u_dut (
    .clk_sr_a, .clr_n, .d_sr, .scan_data, .shift_clk);
endmodule
