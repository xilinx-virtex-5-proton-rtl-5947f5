// v5_dut: the logic placed in the Virtex-5 device under test.
//
// Six windowed shift register strings (wsr_tmr_chain), each triplicated, so
// each TMR domain brings out 24 bits of SCAN_DATA (4 window bits per string)
// and a SHIFT_CLK. String k has INV_LEVELS[k] inverters between DFF stages;
// the test plan builds strings with 0, 4 and 8 inverter levels, and this
// design gives each of those to two of the six strings (0,4,8,0,4,8).
//
// GLOBAL_TMR selects the mitigation:
//   0 = DTMR: data paths and I/O triplicated, one clock (CLK_SR_A_TMR0) and
//       one reset (CLR_TMR0) shared by all three domains;
//   1 = GTMR (XTMR): clocks and resets are triplicated too; domain d runs on
//       CLK_SR_A_TMRd and CLR_TMRd.
// Each used reset passes through a reset_sync (asynchronous assert,
// synchronous de-assert) in its clock domain. The string for domain d takes
// D_SR_TMRd. SHIFT_CLK_TMRd is 1/4 of the clock; SCAN_DATA_TMRd[4k+3:4k] is
// the window of string k. All six strings of a domain run in lock step, so
// SHIFT_CLK_TMRd is taken from string 0; the other strings' SHIFT_CLK
// outputs are left unconnected (lint reports them as unused bits).
module v5_dut
  import v5test_pkg::*;
#(
  parameter bit          GLOBAL_TMR = 1'b1,
  parameter int unsigned LEN        = SR_LEN
) (
  input  logic [2:0]             clk_sr_a,   // CLK_SR_A_TMR0..2
  input  logic [2:0]             clr_n,      // CLR_TMR0..2, active low
  input  logic [2:0]             d_sr,       // D_SR_TMR0..2
  output logic [2:0][SCAN_W-1:0] scan_data,  // SCAN_DATA_TMR0..2
  output logic [2:0]             shift_clk   // SHIFT_CLK_TMR0..2
);
  localparam int unsigned INV_LEVELS [N_CHAINS] = '{0, 4, 8, 0, 4, 8};

  logic [2:0] dom_clk, dom_rst_n;
  logic [N_CHAINS-1:0][2:0] chain_sclk;

  if (GLOBAL_TMR) begin : g_gtmr
    assign dom_clk    = clk_sr_a;
    for (genvar d = 0; d < 3; d++) begin : g_rs
      reset_sync u_rs (.clk(dom_clk[d]), .rst_n_i(clr_n[d]), .rst_n_o(dom_rst_n[d]));
    end
  end else begin : g_dtmr
    logic rst_shared;
    assign dom_clk    = {3{clk_sr_a[0]}};
    reset_sync u_rs (.clk(clk_sr_a[0]), .rst_n_i(clr_n[0]), .rst_n_o(rst_shared));
    assign dom_rst_n = {3{rst_shared}};
  end

  for (genvar k = 0; k < N_CHAINS; k++) begin : g_chain
    logic [2:0][WIN_BITS-1:0] win;
    wsr_tmr_chain #(.LEN(LEN), .N_INV(INV_LEVELS[k])) u_chain (
      .clk(dom_clk), .rst_n(dom_rst_n), .din(d_sr),
      .window(win), .shift_clk(chain_sclk[k]));
    for (genvar d = 0; d < 3; d++) begin : g_out
      assign scan_data[d][WIN_BITS*k +: WIN_BITS] = win[d];
    end
  end

  // all strings share the same clocks and reset, so their counters agree;
  // string 0 provides SHIFT_CLK for the domain
  assign shift_clk = chain_sclk[0];
endmodule
