// tb_v5_proton_test_top: end-to-end test of the whole set-up, run on a GTMR
// build and a DTMR build side by side that share the host's command line.
// Reduced sizes: 16 clocks per RS232 bit and a 128-byte configuration file;
// the shift register strings keep their full 300 bits.
//
// Sequence (commands sent as 4-byte words over RS232):
//   Reset DUT; Write Configuration Data with 128 bytes over RS232; a second
//   file loaded through the USB byte port; Start Configuration (SelectMap
//   with random BUSY); Clock Frequency 4 and Start Test with the
//   checkerboard; an upset forced onto D_SR, which must be reported over
//   TX232 as error reports that match ErrorCnt; a longer upset for a burst;
//   SHIFT_CLK of domain 2 held low until the tester flags a timeout; Reset
//   DUT and new runs with the ones pattern at divider 2 and the zeros pattern
//   at divider 6, which must be error free; reconfiguration, then scrubbing
//   with error injection and an end address, whose passes are checked byte
//   by byte; Start Readback and self-scrubber line edges; after a new
//   configuration with scrubbing off, a SCAN_ERROR rise during readback that
//   must trigger exactly one scrub pass.
// Each mechanism is counted, and a mechanism that never happened counts as
// a failure.
module tb_v5_proton_test_top;
  import v5test_pkg::*;
  localparam int CPB = 16;
  localparam int N   = 128;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx232 = 1;
  logic scan_active = 0, scan_error = 0, seu_detect = 0;
  logic usb_valid = 0; logic [19:0] usb_addr = 0; logic [7:0] usb_data = 0;
  logic [7:0] file1 [N], file2 [N];

  typedef enum int {M_RS232_LOAD, M_USB_LOAD, M_CONFIGURE, M_BUSY_HOLD, M_START_TEST,
                    M_PAT_ZERO, M_PAT_ONE, M_PAT_CHECK, M_DIV_CHANGE, M_ERROR_DETECT,
                    M_ERROR_REPORT, M_BURST, M_TIMEOUT, M_RESET_DUT, M_SCRUB_PASS,
                    M_INJECTION, M_READBACK, M_SCAN_EDGES, M_CRC_SCRUB, M_NUM} mech_e;
  int mech [M_NUM];

  always #5 clk = ~clk;

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_inst
    logic tx232, sm_cclk, sm_csi_b, sm_rdwr_b, sm_prog_b, sm_init_b, sm_done, sm_busy;
    logic [7:0] sm_d;
    logic [19:0] sram_a; logic [15:0] sram_d_o, sram_d_i;
    logic sram_d_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_blen_n, sram_blhn_n;
    logic usb_ready, run_scan, scan_mode, error_inject;
    logic [2:0][15:0] error_cnt, burst; logic [2:0] timeout; logic running;
    logic config_done, cfg_error; logic [31:0] scrub_passes, injections;
    logic [2:0][7:0] rise_cnt, fall_cnt; logic [15:0] fifo_dropped;
    byte unsigned txq [$];

    v5_proton_test_top #(.GLOBAL_TMR(g == 0), .CLKS_PER_BIT(CPB), .CFG_LEN(N)) u_top (
      .clk, .rst_n, .rx232, .tx232,
      .sm_cclk, .sm_csi_b, .sm_rdwr_b, .sm_prog_b, .sm_d, .sm_init_b, .sm_done, .sm_busy,
      .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n, .sram_ce_n,
      .sram_blen_n, .sram_blhn_n,
      .usb_cfg_valid(usb_valid), .usb_cfg_addr(usb_addr), .usb_cfg_data(usb_data),
      .usb_cfg_ready(usb_ready),
      .run_scan, .scan_mode, .error_inject, .scan_active, .scan_error, .seu_detect,
      .error_cnt, .burst, .timeout, .running, .config_done, .cfg_error,
      .scrub_passes, .injections, .rise_cnt, .fall_cnt, .fifo_dropped);

    sram_model u_mem (.a(sram_a), .d_in(sram_d_o), .d_oe(sram_d_oe), .d_out(sram_d_i),
      .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .blen_n(sram_blen_n), .blhn_n(sram_blhn_n));

    selectmap_slave_model #(.DONE_AFTER(N), .BUSY_EN(1'b1)) u_slave (
      .cclk(sm_cclk), .csi_b(sm_csi_b), .rdwr_b(sm_rdwr_b), .prog_b(sm_prog_b), .d(sm_d),
      .init_b(sm_init_b), .done(sm_done), .busy(sm_busy));

    // host side of TX232
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


  // force D_SR of both builds low for n DUT clocks, starting at a falling CLK_SR edge
  task automatic upset_dsr(input int n);
    @(negedge g_inst[0].u_top.clk_sr_a[0]);
    force g_inst[0].u_top.d_sr = 3'b000;
    force g_inst[1].u_top.d_sr = 3'b000;
    repeat (n) @(negedge g_inst[0].u_top.clk_sr_a[0]);
    release g_inst[0].u_top.d_sr;
    release g_inst[1].u_top.d_sr;
  endtask

  task automatic wait_clks(input int n); repeat (n) @(posedge clk); endtask

  // decode queued reports of one build: returns number per domain, checks layout
  task automatic drain_reports(input int g, output int per_dom [3]);
    per_dom = '{0, 0, 0};
    if (g == 0) begin
      while (g_inst[0].txq.size() >= 4) begin
        automatic logic [7:0] h = g_inst[0].txq.pop_front();
        repeat (3) void'(g_inst[0].txq.pop_front());
        if (h[7:6] < 3) per_dom[h[7:6]]++;
        chk(h[5:0] != 0, "report names a string");
      end
    end else begin
      while (g_inst[1].txq.size() >= 4) begin
        automatic logic [7:0] h = g_inst[1].txq.pop_front();
        repeat (3) void'(g_inst[1].txq.pop_front());
        if (h[7:6] < 3) per_dom[h[7:6]]++;
        chk(h[5:0] != 0, "report names a string");
      end
    end
  endtask

  initial begin
    int per_dom [3];
    int e_before;
    for (int i = 0; i < N; i++) begin file1[i] = 8'($urandom); file2[i] = 8'($urandom); end
    repeat (5) @(posedge clk); rst_n = 1;
    wait_clks(10);

    // ---- load the configuration file over RS232 ----
    cmd(8'h01); mech[M_RESET_DUT]++;
    cmd(8'h81);
    for (int i = 0; i < N; i++) send_byte(file1[i]);
    wait_clks(20);
    begin
      automatic int bad = 0;
      for (int i = 0; i < N; i++)
        if (g_inst[0].u_mem.read_byte(20'(i)) != file1[i] || g_inst[1].u_mem.read_byte(20'(i)) != file1[i]) bad++;
      chk(bad == 0, "RS232 file in SRAM");
      if (bad == 0) mech[M_RS232_LOAD]++;
    end

    // ---- load a second file through the USB byte port ----
    for (int i = 0; i < N; i++) begin
      @(negedge clk); usb_valid = 1; usb_addr = 20'(i); usb_data = file2[i];
      @(posedge clk); while (!(g_inst[0].usb_ready && g_inst[1].usb_ready)) @(posedge clk);
      @(negedge clk); usb_valid = 0;
      wait_clks(1);
    end
    wait_clks(10);
    begin
      automatic int bad = 0;
      for (int i = 0; i < N; i++)
        if (g_inst[0].u_mem.read_byte(20'(i)) != file2[i] || g_inst[1].u_mem.read_byte(20'(i)) != file2[i]) bad++;
      chk(bad == 0, "USB file in SRAM");
      if (bad == 0) mech[M_USB_LOAD]++;
    end

    // ---- configure ----
    cmd(8'h04);
    wait (g_inst[0].config_done && g_inst[1].config_done);
    begin
      automatic int bad = 0;
      for (int i = 0; i < N; i++)
        if (g_inst[0].u_slave.bytes[i] != file2[i] || g_inst[1].u_slave.bytes[i] != file2[i]) bad++;
      chk(bad == 0 && g_inst[0].u_slave.bytes.size() == N, "configuration bytes");
      if (bad == 0) mech[M_CONFIGURE]++;
      if (g_inst[0].u_slave.busy_hits > 0) mech[M_BUSY_HOLD]++;
    end

    // ---- checkerboard run at divider 4 ----
    cmd(8'hA0, 8'd4);
    cmd(8'h02, 8'd2); mech[M_START_TEST]++; mech[M_PAT_CHECK]++;
    wait_clks(4 * 4 * 120);
    chk(g_inst[0].running, {"running", " (GTMR)"});
    chk(g_inst[1].running, {"running", " (DTMR)"});
    chk(g_inst[0].error_cnt == '0, {"checkerboard error free", " (GTMR)"});
    chk(g_inst[1].error_cnt == '0, {"checkerboard error free", " (DTMR)"});
    // single upset on D_SR
    upset_dsr(2);
    wait_clks(4 * 4 * 90);
    for (int d = 0; d < 3; d++) begin
      chk(g_inst[0].error_cnt[d] inside {[1:2]}, {$sformatf("upset seen in domain %0d", d), " (GTMR)"});
      chk(g_inst[1].error_cnt[d] inside {[1:2]}, {$sformatf("upset seen in domain %0d", d), " (DTMR)"});
    end
    if (g_inst[0].error_cnt[0] != 0) mech[M_ERROR_DETECT]++;
    wait_clks(CPB * 10 * 4 * 7);   // let the reports go out
    for (int g = 0; g < 2; g++) begin
      drain_reports(g, per_dom);
      for (int d = 0; d < 3; d++)
        chk(per_dom[d] == ((g == 0) ? int'(g_inst[0].error_cnt[d]) : int'(g_inst[1].error_cnt[d])),
            $sformatf("reports on TX232 match ErrorCnt, build %0d domain %0d", g, d));
      if (per_dom[0] > 0) mech[M_ERROR_REPORT]++;
    end
    // longer upset: a burst of consecutive erroneous windows
    e_before = g_inst[0].error_cnt[0];
    fork
      upset_dsr(14);
      begin
        int maxb = 0;
        repeat (4 * 4 * 120) begin @(posedge clk); if (g_inst[0].burst[0] > maxb) maxb = g_inst[0].burst[0]; end
        chk(maxb >= 3, $sformatf("burst reached %0d", maxb));
        if (maxb >= 2) mech[M_BURST]++;
      end
    join
    chk(g_inst[0].burst == '0, {"burst cleared by clean windows", " (GTMR)"});
    chk(g_inst[1].burst == '0, {"burst cleared by clean windows", " (DTMR)"});
    chk(g_inst[0].error_cnt[0] >= e_before + 3, "burst counted in ErrorCnt");
    // SHIFT_CLK of domain 2 stuck: timeout
    force g_inst[0].u_top.shift_clk[2] = 1'b0;
    force g_inst[1].u_top.shift_clk[2] = 1'b0;
    wait_clks(5000);
    chk(g_inst[0].timeout == 3'b100, {"timeout only on domain 2", " (GTMR)"});
    chk(g_inst[1].timeout == 3'b100, {"timeout only on domain 2", " (DTMR)"});
    if (g_inst[0].timeout[2]) mech[M_TIMEOUT]++;
    release g_inst[0].u_top.shift_clk[2];
    release g_inst[1].u_top.shift_clk[2];
    wait_clks(CPB * 10 * 4 * 8);
    for (int g = 0; g < 2; g++) drain_reports(g, per_dom);

    // ---- Reset DUT, ones at divider 2, zeros at divider 6 ----
    cmd(8'h01); mech[M_RESET_DUT]++;
    chk(g_inst[0].running == 0 && g_inst[0].config_done == 0, {"Reset DUT stops the run and clears configuration", " (GTMR)"});
    chk(g_inst[1].running == 0 && g_inst[1].config_done == 0, {"Reset DUT stops the run and clears configuration", " (DTMR)"});
    chk(g_inst[0].u_top.clr_n == 3'b000 && g_inst[0].u_top.clk_sr_a == 3'b000 && g_inst[0].u_top.d_sr == 3'b000, {"DUT inputs low", " (GTMR)"});
    chk(g_inst[1].u_top.clr_n == 3'b000 && g_inst[1].u_top.clk_sr_a == 3'b000 && g_inst[1].u_top.d_sr == 3'b000, {"DUT inputs low", " (DTMR)"});
    cmd(8'hA0, 8'd2);
    cmd(8'h02, 8'd1); mech[M_START_TEST]++; mech[M_PAT_ONE]++; mech[M_DIV_CHANGE]++;
    wait_clks(2 * 4 * 150);
    chk(g_inst[0].running && g_inst[0].error_cnt == '0 && g_inst[0].timeout == '0, {"ones pattern error free", " (GTMR)"});
    chk(g_inst[1].running && g_inst[1].error_cnt == '0 && g_inst[1].timeout == '0, {"ones pattern error free", " (DTMR)"});
    chk(g_inst[0].u_top.scan_data == {3{24'hFFFFFF}}, {"ones in every window", " (GTMR)"});
    chk(g_inst[1].u_top.scan_data == {3{24'hFFFFFF}}, {"ones in every window", " (DTMR)"});
    cmd(8'h01); mech[M_RESET_DUT]++;
    cmd(8'hA0, 8'd6);
    cmd(8'h02, 8'd0); mech[M_START_TEST]++; mech[M_PAT_ZERO]++; mech[M_DIV_CHANGE]++;
    wait_clks(6 * 4 * 120);
    chk(g_inst[0].running && g_inst[0].error_cnt == '0, {"zeros pattern error free", " (GTMR)"});
    chk(g_inst[1].running && g_inst[1].error_cnt == '0, {"zeros pattern error free", " (DTMR)"});
    chk(g_inst[0].u_top.u_tester.u_ctl.div_q == 8'd6, {"divider 6 in use", " (GTMR)"});
    chk(g_inst[1].u_top.u_tester.u_ctl.div_q == 8'd6, {"divider 6 in use", " (DTMR)"});
    // ---- reconfigure, then scrub with injection ----
    cmd(8'h04);
    wait (g_inst[0].config_done && g_inst[1].config_done);
    g_inst[0].u_slave.bytes.delete(); g_inst[1].u_slave.bytes.delete();
    cmd(8'h7B, 8'h00, 8'h00, 8'd59);        // last scrubbed byte: 59
    cmd(8'h79, 8'h00, 8'h00, 8'd20);        // injection range 20..23
    cmd(8'h7A, 8'h00, 8'h00, 8'd23);
    cmd(8'h89, 8'h11, 8'h22, 8'h33);        // CTL0 bytes 1..3
    cmd(8'h8A, 8'h44, 8'h55, 8'h66);        // MASK bytes 1..3
    cmd(8'h0E);
    // the scrub starts with the next command; remember where the stream starts
    g_inst[0].u_slave.bytes.delete(); g_inst[1].u_slave.bytes.delete();
    cmd(8'h06);
    chk(g_inst[0].scan_mode && g_inst[0].error_inject, {"scrub and injection lines", " (GTMR)"});
    chk(g_inst[1].scan_mode && g_inst[1].error_inject, {"scrub and injection lines", " (DTMR)"});
    wait (g_inst[0].scrub_passes >= 4 && g_inst[1].scrub_passes >= 4);
    cmd(8'h05);
    chk(g_inst[0].run_scan, {"RUN_SCAN after Start Readback", " (GTMR)"});
    chk(g_inst[1].run_scan, {"RUN_SCAN after Start Readback", " (DTMR)"});
    if (g_inst[0].run_scan) mech[M_READBACK]++;
    begin
      automatic logic [7:0] pre [24] = '{8'hFF,8'hFF,8'hFF,8'hFF, 8'hAA,8'h99,8'h55,8'h66,
                                         8'h30,8'h00,8'hC0,8'h01, 8'h66,8'h55,8'h44,8'h00,
                                         8'h30,8'h00,8'hA0,8'h01, 8'h33,8'h22,8'h11,8'h00};
      automatic int bad = 0;
      for (int p = 0; p < 4; p++) begin
        automatic int inj = 20 + p;
        for (int i = 0; i < 24; i++) if (g_inst[0].u_slave.bytes[p*84 + i] != pre[i]) bad++;
        for (int i = 0; i < 60; i++)
          if (g_inst[0].u_slave.bytes[p*84 + 24 + i] != (file2[i] ^ ((i == inj) ? 8'h01 : 8'h00))) bad++;
      end
      chk(bad == 0, $sformatf("scrub passes byte by byte (%0d wrong)", bad));
      if (bad == 0) begin mech[M_SCRUB_PASS]++; mech[M_INJECTION]++; end
    end
    chk(g_inst[0].injections >= 4, {"injections counted", " (GTMR)"});
    chk(g_inst[1].injections >= 4, {"injections counted", " (DTMR)"});
    // self-scrubber status lines
    for (int k = 0; k < 3; k++) begin
      scan_active = 1; wait_clks(10); scan_error = 1; wait_clks(10); seu_detect = 1; wait_clks(10);
      scan_active = 0; scan_error = 0; seu_detect = 0; wait_clks(10);
    end
    chk(g_inst[0].rise_cnt == {3{8'd3}} && g_inst[0].fall_cnt == {3{8'd3}}, {"self-scrubber edges counted", " (GTMR)"});
    chk(g_inst[1].rise_cnt == {3{8'd3}} && g_inst[1].fall_cnt == {3{8'd3}}, {"self-scrubber edges counted", " (DTMR)"});
    if (g_inst[0].rise_cnt[1] == 3) mech[M_SCAN_EDGES]++;
    // readback CRC error: with scrubbing off, a SCAN_ERROR rise while
    // readback runs must start exactly one scrub pass
    cmd(8'h01); mech[M_RESET_DUT]++;
    cmd(8'h04);
    wait (g_inst[0].config_done && g_inst[1].config_done);
    cmd(8'h05);
    begin
      automatic int p0 = int'(g_inst[0].scrub_passes), p1 = int'(g_inst[1].scrub_passes);
      wait_clks(2000);
      chk(int'(g_inst[0].scrub_passes) == p0, "no scrub pass before the CRC error");
      scan_error = 1; wait_clks(10); scan_error = 0;
      wait_clks(5000);
      chk(int'(g_inst[0].scrub_passes) == p0 + 1, {"one scrub pass after SCAN_ERROR", " (GTMR)"});
      chk(int'(g_inst[1].scrub_passes) == p1 + 1, {"one scrub pass after SCAN_ERROR", " (DTMR)"});
      if (int'(g_inst[0].scrub_passes) == p0 + 1) mech[M_CRC_SCRUB]++;
    end
    chk(g_inst[0].fifo_dropped == 0 && g_inst[0].cfg_error == 0, {"nothing dropped, no configuration error", " (GTMR)"});
    chk(g_inst[1].fifo_dropped == 0 && g_inst[1].cfg_error == 0, {"nothing dropped, no configuration error", " (DTMR)"});
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
