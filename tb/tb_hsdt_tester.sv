// tb_hsdt_tester: the tester alone, against a simple behavioural DUT written
// here (per domain: a 300-bit shift register on CLK_SR_A, a window of the
// last 4 bits every 4 clocks, SHIFT_CLK = clock/4), so that faults can be
// placed exactly. Commands go in over RS232 (16 clocks per bit).
// Checks: Start Test with checkerboard at divider 4 runs clean; one window
// bit of domain 1, string 3 is flipped for one window, which must give
// ErrorCnt 1 on domain 1 only and one 4-byte report on TX232 with the exact
// domain, string flag and window; a configuration over SelectMap from a
// file placed in SRAM; the RUN_SCAN, SCAN_MODE and ERROR_INJECT lines.
module tb_hsdt_tester;
  import v5test_pkg::*;
  localparam int CPB = 16, N = 32, LEN = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx232 = 1, tx232;
  logic [2:0] clk_sr_a, clr_n, d_sr, shift_clk;
  logic [2:0][SCAN_W-1:0] scan_data, win_x;
  logic sm_cclk, sm_csi_b, sm_rdwr_b, sm_prog_b, sm_init_b, sm_done, sm_busy; logic [7:0] sm_d;
  logic [19:0] sram_a; logic [15:0] sram_d_o, sram_d_i;
  logic sram_d_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_blen_n, sram_blhn_n;
  logic usb_cfg_ready, run_scan, scan_mode, error_inject;
  logic [2:0][15:0] error_cnt, burst; logic [2:0] timeout; logic running, config_done, cfg_error;
  logic [31:0] scrub_passes, injections; logic [2:0][7:0] rise_cnt, fall_cnt; logic [15:0] fifo_dropped;
  byte unsigned txq [$];
  logic [SCAN_W-1:0] flip = '0;
  logic [7:0] file [N];

  hsdt_tester #(.CLKS_PER_BIT(CPB), .CFG_LEN(N)) dut (
    .clk, .rst_n, .rx232, .tx232, .clk_sr_a, .clr_n, .d_sr, .scan_data, .shift_clk,
    .sm_cclk, .sm_csi_b, .sm_rdwr_b, .sm_prog_b, .sm_d, .sm_init_b, .sm_done, .sm_busy,
    .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n, .sram_ce_n,
    .sram_blen_n, .sram_blhn_n,
    .usb_cfg_valid(1'b0), .usb_cfg_addr(20'h0), .usb_cfg_data(8'h0), .usb_cfg_ready,
    .run_scan, .scan_mode, .error_inject, .scan_active(1'b0), .scan_error(1'b0), .seu_detect(1'b0),
    .error_cnt, .burst, .timeout, .running, .config_done, .cfg_error,
    .scrub_passes, .injections, .rise_cnt, .fall_cnt, .fifo_dropped);

  sram_model u_mem (.a(sram_a), .d_in(sram_d_o), .d_oe(sram_d_oe), .d_out(sram_d_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .blen_n(sram_blen_n), .blhn_n(sram_blhn_n));
  selectmap_slave_model #(.DONE_AFTER(N)) u_slave (
    .cclk(sm_cclk), .csi_b(sm_csi_b), .rdwr_b(sm_rdwr_b), .prog_b(sm_prog_b), .d(sm_d),
    .init_b(sm_init_b), .done(sm_done), .busy(sm_busy));

  // behavioural DUT, one per domain
  for (genvar d = 0; d < 3; d++) begin : g_dut
    logic [LEN-1:0] sr; logic [1:0] cnt; logic [SCAN_W-1:0] win;
    always @(posedge clk_sr_a[d] or negedge clr_n[d]) begin
      if (!clr_n[d]) begin sr <= '0; cnt <= '0; win <= '0; end
      else begin
        sr  <= {sr[LEN-2:0], d_sr[d]};
        cnt <= cnt + 1'b1;
        if (cnt == 2'd3) win <= {6{sr[LEN-1], sr[LEN-2], sr[LEN-3], sr[LEN-4]}} ^ ((d == 1) ? flip : '0);
      end
    end
    assign scan_data[d] = win;
    assign shift_clk[d] = cnt[1];
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx232);
      if (rst_n) begin
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx232; end
        repeat (CPB) @(posedge clk);
        txq.push_back(b);
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic send_byte(input logic [7:0] b);
    rx232 = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx232 = b[i]; repeat (CPB) @(posedge clk); end
    rx232 = 1; repeat (CPB + 2) @(posedge clk);
  endtask
  task automatic cmd(input logic [7:0] op, input logic [7:0] d0 = 0, d1 = 0, d2 = 0);
    send_byte(op); send_byte(d0); send_byte(d1); send_byte(d2);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [SCAN_W-1:0] bad_win;
    for (int i = 0; i < N; i++) begin file[i] = 8'($urandom); u_mem.write_byte(20'(i), file[i]); end
    repeat (5) @(posedge clk); rst_n = 1;
    cmd(8'h01);
    cmd(8'h04);
    wait (config_done || cfg_error);
    chk(config_done, "configured");
    begin
      automatic int bad = 0;
      for (int i = 0; i < N; i++) if (u_slave.bytes[i] != file[i]) bad++;
      chk(bad == 0 && u_slave.bytes.size() == N, "configuration bytes from SRAM");
    end
    cmd(8'hA0, 8'd4);
    cmd(8'h02, 8'd2);
    repeat (4 * 4 * 100) @(posedge clk);
    chk(running && error_cnt == '0 && txq.size() == 0, "clean checkerboard run");
    // flip one bit of domain 1, string 3, for exactly one window
    @(posedge shift_clk[1]);
    @(negedge shift_clk[1]); flip = 24'h001000;  // bit 12: string 3, bit 0
    @(negedge shift_clk[1]);                     // next window is loaded with the flip
    @(posedge clk_sr_a[1]); flip = '0;
    bad_win = g_dut[1].win;
    repeat (4 * 4 * 20 + CPB * 10 * 5) @(posedge clk);
    chk(error_cnt[0] == 0 && error_cnt[1] == 1 && error_cnt[2] == 0, "one error, domain 1");
    chk(txq.size() == 4, $sformatf("one report on TX232 (%0d bytes)", txq.size()));
    if (txq.size() == 4) begin
      chk(txq[0] == {2'd1, 6'b001000}, $sformatf("report header %h", txq[0]));
      chk({txq[1], txq[2], txq[3]} == bad_win, "report window");
      chk((bad_win[15:12] != 4'b0101) && (bad_win[15:12] != 4'b1010), "window was wrong");
    end
    cmd(8'h05); cmd(8'h06); cmd(8'h0E);
    chk(run_scan && scan_mode && error_inject, "self-scrubber control lines");
    chk(timeout == '0 && fifo_dropped == 0, "no timeout, nothing dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
