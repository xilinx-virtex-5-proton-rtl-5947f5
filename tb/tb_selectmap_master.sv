// tb_selectmap_master: with a 64-byte configuration file in the SRAM model
// and a SelectMap slave model that raises BUSY at random:
//  - Start Config: PROG_B pulse, then exactly the 64 file bytes in order,
//    then config_done once DONE rises; CCLK period = CCLK_DIV clocks.
//  - Scrub with end address 39 and injection range 10..13: each pass must be
//    the 24-byte preamble (dummy, sync, MASK write, CTL0 write with the
//    register values) then bytes 0..39, with bit 0 of the byte at the
//    injection address inverted, that address walking 10,11,12,13,10,...
//  - A scrub_req pulse with scrub_on low gives exactly one clean pass.
//  - Reset DUT stops scrubbing and clears config_done.
//  - A configuration whose DONE never rises ends in cfg_error.
module tb_selectmap_master;
  import v5test_pkg::*;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic dut_reset = 0, start_config = 0, scrub_on = 0, scrub_req = 0, inject_on = 0;
  logic [19:0] inj_low = 20'd10, inj_high = 20'd13, end_addr = 20'd39;
  logic [31:0] ctl_reg = 32'h1234_5600, mask_reg = 32'h0040_0000;
  logic rd_req, rd_ack; logic [19:0] rd_addr; logic [7:0] rd_data;
  logic sm_cclk, sm_csi_b, sm_rdwr_b, sm_prog_b, sm_init_b, sm_done, sm_busy;
  logic [7:0] sm_d;
  logic config_done, cfg_error, scrubbing; logic [31:0] scrub_passes, injections;
  // SRAM side
  logic [19:0] sram_a; logic [15:0] sram_d_o, sram_d_i; logic sram_d_oe;
  logic sram_we_n, sram_oe_n, sram_ce_n, sram_blen_n, sram_blhn_n, wr_ack;
  logic [7:0] file [N];

  selectmap_master #(.CFG_LEN(N), .CCLK_DIV(5), .PROG_CLKS(16), .DONE_TIMEOUT(2000)) dut (.*);
  sram_ctrl u_sc (.clk, .rst_n, .wr_req(1'b0), .wr_addr(20'h0), .wr_data(8'h0), .wr_ack,
    .rd_req, .rd_addr, .rd_data, .rd_ack,
    .sram_a, .sram_d_o, .sram_d_i, .sram_d_oe, .sram_we_n, .sram_oe_n, .sram_ce_n,
    .sram_blen_n, .sram_blhn_n);
  sram_model u_mem (.a(sram_a), .d_in(sram_d_o), .d_oe(sram_d_oe), .d_out(sram_d_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .blen_n(sram_blen_n), .blhn_n(sram_blhn_n));
  selectmap_slave_model #(.DONE_AFTER(N), .BUSY_EN(1'b1)) u_slave (
    .cclk(sm_cclk), .csi_b(sm_csi_b), .rdwr_b(sm_rdwr_b), .prog_b(sm_prog_b), .d(sm_d),
    .init_b(sm_init_b), .done(sm_done), .busy(sm_busy));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] pre(int i);
    logic [31:0] w [6];
    w = '{32'hFFFFFFFF, 32'hAA995566, 32'h3000C001, mask_reg, 32'h3000A001, ctl_reg};
    return w[i / 4][8 * (3 - i % 4) +: 8];
  endfunction

  initial begin
    int t0, t1, prog_lo;
    for (int i = 0; i < N; i++) begin file[i] = 8'($urandom); u_mem.write_byte(20'(i), file[i]); end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    // ---- configuration ----
    @(negedge clk) start_config = 1; @(negedge clk) start_config = 0;
    prog_lo = 0;
    while (sm_prog_b) @(posedge clk);
    while (!sm_prog_b) begin @(posedge clk); prog_lo++; end
    chk(prog_lo >= 15, "PROG_B pulse");
    @(posedge sm_cclk) t0 = int'($time); @(posedge sm_cclk) t1 = int'($time);
    chk(t1 - t0 == 50, "CCLK period 5 clocks");
    wait (config_done || cfg_error);
    chk(config_done && !cfg_error, "configuration done");
    chk(u_slave.bytes.size() == N, $sformatf("%0d config bytes", u_slave.bytes.size()));
    for (int i = 0; i < N && i < u_slave.bytes.size(); i++)
      chk(u_slave.bytes[i] == file[i], $sformatf("config byte %0d", i));
    chk(u_slave.busy_hits > 0, "BUSY exercised");
    // ---- scrubbing with injection ----
    u_slave.bytes.delete();
    @(negedge clk) scrub_on = 1; inject_on = 1;
    wait (scrub_passes == 6);
    @(negedge clk) scrub_on = 0;
    repeat (200) @(posedge clk);
    chk(u_slave.bytes.size() >= 6 * (24 + 40), "scrub bytes");
    for (int p = 0; p < 6; p++) begin
      automatic int inj = 10 + p % 4;
      for (int i = 0; i < 24; i++)
        chk(u_slave.bytes[p * 64 + i] == pre(i), $sformatf("pass %0d preamble %0d", p, i));
      for (int i = 0; i < 40; i++)
        chk(u_slave.bytes[p * 64 + 24 + i] == (file[i] ^ ((i == inj) ? 8'h01 : 8'h00)),
            $sformatf("pass %0d byte %0d", p, i));
    end
    chk(injections >= 6, "injection count");
    // ---- single requested pass (readback CRC error) ----
    @(negedge clk) inject_on = 0;
    repeat (200) @(posedge clk);
    u_slave.bytes.delete();
    t0 = int'(scrub_passes);
    @(negedge clk) scrub_req = 1; @(negedge clk) scrub_req = 0;
    wait (scrub_passes == t0 + 1);
    repeat (2000) @(posedge clk);
    chk(scrub_passes == t0 + 1, "scrub_req gives exactly one pass");
    chk(u_slave.bytes.size() == 64, $sformatf("requested pass bytes %0d", u_slave.bytes.size()));
    for (int i = 0; i < 40 && 24 + i < u_slave.bytes.size(); i++)
      chk(u_slave.bytes[24 + i] == file[i], $sformatf("requested pass byte %0d", i));
    // ---- reset DUT ----
    @(negedge clk) scrub_on = 1;
    repeat (300) @(posedge clk);
    @(negedge clk) dut_reset = 1; @(negedge clk) dut_reset = 0; scrub_on = 0;
    repeat (5) @(posedge clk);
    chk(!config_done && !scrubbing && sm_csi_b, "reset DUT stops engine");
    // ---- DONE never rises ----
    u_slave.no_done = 1;
    @(negedge clk) start_config = 1; @(negedge clk) start_config = 0;
    wait (config_done || cfg_error);
    chk(cfg_error && !config_done, "missing DONE gives cfg_error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
