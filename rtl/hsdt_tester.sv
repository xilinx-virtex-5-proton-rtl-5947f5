// hsdt_tester: the high speed digital tester (HSDT) FPGA that drives and
// observes the Virtex-5 DUT.
//
// Command path: RS232 bytes from the host (uart_rx) are decoded by
// cmd_decoder into pulses and settings. Write Configuration Data bytes, or
// bytes offered by a USB front end on the usb_cfg_* port, are written into
// the external SRAM (sram_ctrl) through a one-byte holding register.
// DUT controls: dut_controls makes the three copies of CLK_SR_A, CLR and
// D_SR. Data processing: one scan_capture and one data_checker per TMR
// domain; error reports from the three checkers go, lowest domain first,
// into the error FIFO (sync_fifo) and from there to the host (report_tx,
// uart_tx). Configuration and external scrubbing: selectmap_master reads
// the SRAM and drives the SelectMap pins.
// Self-scrubber handshake: RUN_SCAN follows Start Readback, SCAN_MODE
// follows Start Scrub, ERROR_INJECT follows Inject Error On; SCAN_ACTIVE,
// SCAN_ERROR and SEU_DETECT from the DUT are synchronised and their rising
// and falling edges counted for the operator. While readback is on, a
// rising SCAN_ERROR (the DUT's readback CRC found an upset) makes the
// tester take over and write one full scrub pass over SelectMap.
// Everything runs on the 150 MHz tester clock clk; rst_n is the active-low
// tester reset (RESET).
module hsdt_tester
  import v5test_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 1302,
  parameter int unsigned CFG_LEN      = CFG_BYTES,
  parameter int unsigned ARM_WINDOWS  = 80,
  parameter int unsigned FIFO_DEPTH   = 256,
  parameter int unsigned CCLK_DIV     = 5,
  parameter int unsigned INJ_STRIDE   = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rx232,
  output logic                  tx232,
  // DUT stimulus and observation
  output logic [2:0]            clk_sr_a,
  output logic [2:0]            clr_n,
  output logic [2:0]            d_sr,
  input  logic [2:0][SCAN_W-1:0] scan_data,
  input  logic [2:0]            shift_clk,
  // SelectMap
  output logic                  sm_cclk,
  output logic                  sm_csi_b,
  output logic                  sm_rdwr_b,
  output logic                  sm_prog_b,
  output logic [7:0]            sm_d,
  input  logic                  sm_init_b,
  input  logic                  sm_done,
  input  logic                  sm_busy,
  // SRAM
  output logic [19:0]           sram_a,
  output logic [15:0]           sram_d_o,
  input  logic [15:0]           sram_d_i,
  output logic                  sram_d_oe,
  output logic                  sram_we_n,
  output logic                  sram_oe_n,
  output logic                  sram_ce_n,
  output logic                  sram_blen_n,
  output logic                  sram_blhn_n,
  // configuration bytes from a USB front end
  input  logic                  usb_cfg_valid,
  input  logic [CFG_ADDR_W-1:0] usb_cfg_addr,
  input  logic [7:0]            usb_cfg_data,
  output logic                  usb_cfg_ready,
  // self-scrubber handshake
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
  output logic [2:0][7:0]       rise_cnt,     // scan_active, scan_error, seu_detect
  output logic [2:0][7:0]       fall_cnt,
  output logic [15:0]           fifo_dropped
);
  // ---------------- command path ----------------
  logic [7:0] rx_byte;  logic rx_valid;
  cmd_word_t  cmd;      logic cmd_valid;
  logic reset_dut, start_test, start_config;
  pattern_e   pattern;
  logic [7:0] clk_div;
  logic       scrub_on, inject_on, rdbk_on;
  logic       crc_scrub;     // one scrub pass after a readback CRC error
  logic [CFG_ADDR_W-1:0] inj_low, inj_high, end_addr;
  logic [31:0] ctl_reg, mask_reg;
  logic        cfg_wr_valid, cfg_loading;
  logic [CFG_ADDR_W-1:0] cfg_wr_addr;
  logic [7:0]  cfg_wr_data;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(rx232), .data(rx_byte), .valid(rx_valid));

  cmd_decoder #(.CFG_LEN(CFG_LEN)) u_dec (
    .clk, .rst_n, .rx_data(rx_byte), .rx_valid,
    .cmd, .cmd_valid, .reset_dut, .start_test, .start_config,
    .pattern, .clk_div, .scrub_on, .inject_on, .rdbk_on,
    .inj_low, .inj_high, .end_addr, .ctl_reg, .mask_reg,
    .cfg_wr_valid, .cfg_wr_addr, .cfg_wr_data, .cfg_loading);

  assign run_scan     = rdbk_on;
  assign scan_mode    = scrub_on;
  assign error_inject = inject_on;

  // ---------------- SRAM write holding register ----------------
  logic                  wr_req, wr_ack;
  logic [CFG_ADDR_W-1:0] wr_addr;
  logic [7:0]            wr_data;
  logic                  rd_req, rd_ack;
  logic [CFG_ADDR_W-1:0] rd_addr;
  logic [7:0]            rd_data;

  // RS232 bytes arrive thousands of clocks apart and always find the
  // register free; USB bytes are flow-controlled with usb_cfg_ready.
  assign usb_cfg_ready = !wr_req && !cfg_wr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_req  <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else if (wr_req) begin
      if (wr_ack) wr_req <= 1'b0;
    end else if (cfg_wr_valid) begin
      wr_req  <= 1'b1;
      wr_addr <= cfg_wr_addr;
      wr_data <= cfg_wr_data;
    end else if (usb_cfg_valid) begin
      wr_req  <= 1'b1;
      wr_addr <= usb_cfg_addr;
      wr_data <= usb_cfg_data;
    end
  end

  sram_ctrl u_sram (
    .clk, .rst_n,
    .wr_req, .wr_addr, .wr_data, .wr_ack,
    .rd_req, .rd_addr, .rd_data, .rd_ack,
    .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n,
    .sram_ce_n, .sram_blen_n, .sram_blhn_n);

  // ---------------- configuration / scrubbing ----------------
  logic scrubbing;

  selectmap_master #(.CFG_LEN(CFG_LEN), .CCLK_DIV(CCLK_DIV), .INJ_STRIDE(INJ_STRIDE)) u_sm (
    .clk, .rst_n, .dut_reset(reset_dut), .start_config,
    .scrub_on, .scrub_req(crc_scrub), .inject_on, .inj_low, .inj_high, .end_addr, .ctl_reg, .mask_reg,
    .rd_req, .rd_addr, .rd_data, .rd_ack,
    .sm_cclk, .sm_csi_b, .sm_rdwr_b, .sm_prog_b, .sm_d,
    .sm_init_b, .sm_done, .sm_busy,
    .config_done, .cfg_error, .scrubbing, .scrub_passes, .injections);

  // ---------------- DUT controls ----------------
  dut_controls u_ctl (
    .clk, .rst_n, .reset_dut, .start_test, .clk_div, .pattern,
    .clk_sr(clk_sr_a), .d_sr, .clr_n, .running);

  // ---------------- data processing ----------------
  err_report_t [2:0] rep;
  logic [2:0]        rep_valid, rep_ready;
  logic [2:0][15:0]  dropped_d;
  logic              fifo_full, fifo_empty, fifo_rd;
  logic [31:0]       fifo_q;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  err_report_t       push_data;
  logic              push;

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [SCAN_W-1:0] win;
    logic              win_valid;
    logic [31:0]       seen;
    scan_capture u_cap (
      .clk, .rst_n, .shift_clk(shift_clk[d]), .scan_data(scan_data[d]),
      .window(win), .win_valid);
    data_checker #(.DOMAIN(2'(d)), .ARM_WINDOWS(ARM_WINDOWS)) u_chk (
      .clk, .rst_n, .run(running), .pattern, .window(win), .win_valid,
      .err_report(rep[d]), .err_valid(rep_valid[d]), .err_ready(rep_ready[d]),
      .error_cnt(error_cnt[d]), .burst(burst[d]), .dropped(dropped_d[d]),
      .windows_seen(seen), .timeout(timeout[d]));
  end

  // fixed-priority merge of the three report streams into the FIFO
  always_comb begin
    rep_ready = '0;
    push      = 1'b0;
    push_data = rep[0];
    for (int d = 2; d >= 0; d--) begin
      if (rep_valid[d]) begin
        push_data = rep[d];
        rep_ready = '0;
        rep_ready[d] = !fifo_full;
        push      = !fifo_full;
      end
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(push), .wr_data(push_data), .rd_en(fifo_rd),
    .rd_data(fifo_q), .full(fifo_full), .empty(fifo_empty), .count(fifo_count));

  // reports that could not enter the FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_dropped <= '0;
    else        fifo_dropped <= dropped_d[0] + dropped_d[1] + dropped_d[2];
  end

  logic [7:0] tx_byte; logic tx_valid, tx_ready;
  report_tx u_rep (
    .clk, .rst_n, .fifo_data(fifo_q), .fifo_empty, .fifo_rd,
    .tx_data(tx_byte), .tx_valid, .tx_ready);
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_byte), .valid(tx_valid), .ready(tx_ready), .tx(tx232));

  // ---------------- self-scrubber status monitor ----------------
  logic [2:0] mon_in;
  logic [2:0][2:0] mon_s;
  // a SCAN_ERROR rise while readback runs requests one full scrub pass
  assign crc_scrub = rdbk_on && mon_s[1][1] && !mon_s[1][2];
  assign mon_in = {seu_detect, scan_error, scan_active};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_s    <= '0;
      rise_cnt <= '0;
      fall_cnt <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        mon_s[i] <= {mon_s[i][1:0], mon_in[i]};
        if (mon_s[i][1] && !mon_s[i][2]) rise_cnt[i] <= rise_cnt[i] + 1'b1;
        if (!mon_s[i][1] && mon_s[i][2]) fall_cnt[i] <= fall_cnt[i] + 1'b1;
      end
    end
  end
endmodule
