// tb_v5_proton_test_top_full: one complete test operation on the set-up at
// its full default size (GTMR build, 300-bit strings, 977488-byte
// configuration file, 115200-baud commands at 150 MHz, 30 MHz CCLK).
//   1. Reset DUT over RS232.
//   2. The whole 977488-byte file (byte i = (i * 131 + (i >> 9)) mod 256)
//      is loaded into SRAM through the USB byte port.
//   3. Start Configuration: all 977488 bytes must reach the SelectMap port
//      in order, and DONE must follow.
//   4. Clock Frequency 2 (75 MHz DUT clock) and Start Test with the
//      checkerboard: 200 windows per domain must arrive error free.
//   5. End of Configuration x3FFFF and Start Scrub: one scrub pass of the
//      24-byte preamble plus bytes 0..x3FFFF is checked byte by byte.
// Steps 3 and 5 also check the SelectMap byte rate: one byte per CCLK
// (5 tester clocks, 30 MHz), which gives about 30 full-file scrub passes
// per second against the 25 the test plan asks for.
module tb_v5_proton_test_top_full;
  import v5test_pkg::*;
  localparam int CPB = 1302;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx232 = 1;
  logic usb_valid = 0; logic [19:0] usb_addr = 0; logic [7:0] usb_data = 0;
  logic tx232, sm_cclk, sm_csi_b, sm_rdwr_b, sm_prog_b, sm_init_b, sm_done, sm_busy;
  logic [7:0] sm_d;
  logic [19:0] sram_a; logic [15:0] sram_d_o, sram_d_i;
  logic sram_d_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_blen_n, sram_blhn_n;
  logic usb_ready, run_scan, scan_mode, error_inject;
  logic [2:0][15:0] error_cnt, burst; logic [2:0] timeout; logic running;
  logic config_done, cfg_error; logic [31:0] scrub_passes, injections;
  logic [2:0][7:0] rise_cnt, fall_cnt; logic [15:0] fifo_dropped;

  v5_proton_test_top u_top (
    .clk, .rst_n, .rx232, .tx232,
    .sm_cclk, .sm_csi_b, .sm_rdwr_b, .sm_prog_b, .sm_d, .sm_init_b, .sm_done, .sm_busy,
    .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n, .sram_ce_n,
    .sram_blen_n, .sram_blhn_n,
    .usb_cfg_valid(usb_valid), .usb_cfg_addr(usb_addr), .usb_cfg_data(usb_data),
    .usb_cfg_ready(usb_ready),
    .run_scan, .scan_mode, .error_inject, .scan_active(1'b0), .scan_error(1'b0), .seu_detect(1'b0),
    .error_cnt, .burst, .timeout, .running, .config_done, .cfg_error,
    .scrub_passes, .injections, .rise_cnt, .fall_cnt, .fifo_dropped);

  sram_model u_mem (.a(sram_a), .d_in(sram_d_o), .d_oe(sram_d_oe), .d_out(sram_d_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .blen_n(sram_blen_n), .blhn_n(sram_blhn_n));
  selectmap_slave_model #(.DONE_AFTER(CFG_BYTES)) u_slave (
    .cclk(sm_cclk), .csi_b(sm_csi_b), .rdwr_b(sm_rdwr_b), .prog_b(sm_prog_b), .d(sm_d),
    .init_b(sm_init_b), .done(sm_done), .busy(sm_busy));

  always #3.333 clk = ~clk;   // 150 MHz

  // SelectMap byte-rate monitor: tester-clock time of the first and last
  // byte written since nb was cleared
  longint cyc = 0, tfirst = 0, tlast = 0;
  int nb = 0;
  always @(posedge clk) cyc++;
  always @(posedge sm_cclk) if (!sm_csi_b && sm_prog_b) begin
    if (nb == 0) tfirst = cyc;
    tlast = cyc;
    nb++;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] fbyte(int i);
    return 8'(i * 131 + (i >> 9));
  endfunction

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
    repeat (5) @(posedge clk); rst_n = 1;
    cmd(8'h01);
    // 2. load through the USB byte port
    for (int i = 0; i < int'(CFG_BYTES); i++) begin
      @(negedge clk); usb_valid = 1; usb_addr = 20'(i); usb_data = fbyte(i);
      @(posedge clk); while (!usb_ready) @(posedge clk);
      @(negedge clk); usb_valid = 0;
      @(posedge clk);
    end
    repeat (10) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < int'(CFG_BYTES); i++) if (u_mem.read_byte(20'(i)) != fbyte(i)) bad++;
      chk(bad == 0, $sformatf("file in SRAM (%0d wrong)", bad));
    end
    // 3. configure
    nb = 0;
    cmd(8'h04);
    wait (config_done || cfg_error);
    chk(config_done && !cfg_error, "configuration done");
    chk(u_slave.bytes.size() == int'(CFG_BYTES), $sformatf("%0d bytes configured", u_slave.bytes.size()));
    begin
      automatic int bad = 0;
      for (int i = 0; i < u_slave.bytes.size(); i++) if (u_slave.bytes[i] != fbyte(i)) bad++;
      chk(bad == 0, $sformatf("configuration bytes in order (%0d wrong)", bad));
    end
    // one byte per 5-clock CCLK: 30 MB/s, 32.6 ms for the whole file
    chk(nb == int'(CFG_BYTES) && tlast - tfirst == longint'(CFG_BYTES - 1) * 5,
        $sformatf("configuration at one byte per CCLK (%0d bytes in %0d clocks)", nb, tlast - tfirst));
    // 4. run the shift registers
    cmd(8'hA0, 8'd2);
    cmd(8'h02, 8'd2);
    wait (u_top.u_tester.g_dom[0].u_chk.windows_seen >= 280);
    chk(running && error_cnt == '0 && timeout == '0, "checkerboard run error free");
    // 5. one scrub pass up to x3FFFF
    cmd(8'h7B, 8'h03, 8'hFF, 8'hFF);
    u_slave.bytes.delete();
    nb = 0;
    cmd(8'h06);
    wait (scrub_passes >= 1);
    // a pass (preamble + 262144 bytes) streams at one byte per CCLK
    chk(tlast - tfirst >= longint'(24 + 262144 - 1) * 5,
        $sformatf("scrub pass at one byte per CCLK (%0d clocks)", tlast - tfirst));
    $display("full-file scrub: %0d clocks per pass, %0d passes per second",
             (CFG_BYTES + 24) * 5, 150_000_000 / ((CFG_BYTES + 24) * 5));
    begin
      automatic int bad = 0;
      automatic logic [7:0] pre [8] = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hAA, 8'h99, 8'h55, 8'h66};
      chk(u_slave.bytes.size() >= 24 + 262144, $sformatf("scrub pass length %0d", u_slave.bytes.size()));
      for (int i = 0; i < 8; i++) if (u_slave.bytes[i] != pre[i]) bad++;
      for (int i = 0; i < 262144; i++) if (u_slave.bytes[24 + i] != fbyte(i)) bad++;
      chk(bad == 0, $sformatf("scrub pass bytes (%0d wrong)", bad));
    end
    chk(error_cnt == '0 && fifo_dropped == 0, "still error free while scrubbing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
