// tb_cmd_decoder: feeds 4-byte command words and checks each decoded
// setting and pulse: defaults after reset, address commands
// ({D0[3:0],D1,D2}), control/mask registers ({D2,D1,D0,byte 0}), the clock
// divider's even/>=2 rule, Start Test pattern, level commands and their
// clearing by Reset DUT, and the Write Configuration Data byte stream
// (CFG_LEN = 10 here) including return to command decoding afterwards.
module tb_cmd_decoder;
  import v5test_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0; logic rx_valid = 0;
  cmd_word_t cmd; logic cmd_valid;
  logic reset_dut, start_test, start_config;
  pattern_e pattern; logic [7:0] clk_div;
  logic scrub_on, inject_on, rdbk_on;
  logic [19:0] inj_low, inj_high, end_addr;
  logic [31:0] ctl_reg, mask_reg;
  logic cfg_wr_valid, cfg_loading; logic [19:0] cfg_wr_addr; logic [7:0] cfg_wr_data;
  int n_reset = 0, n_start = 0, n_cfg = 0, n_wr = 0;
  byte unsigned wrq [$];

  cmd_decoder #(.CFG_LEN(10), .CTL_BYTE0(8'h5A), .MASK_BYTE0(8'hC3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (reset_dut) n_reset++;
    if (start_test) n_start++;
    if (start_config) n_cfg++;
    if (cfg_wr_valid) begin
      checks++;
      if (wrq.size() == 0 || cfg_wr_data !== wrq[0] || cfg_wr_addr !== 20'(n_wr)) begin
        failures++; $display("FAIL cfg byte %0d addr %0d data %h", n_wr, cfg_wr_addr, cfg_wr_data);
      end
      if (wrq.size() != 0) void'(wrq.pop_front());
      n_wr++;
    end
  end

  task automatic byte_in(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(posedge clk);
  endtask
  task automatic word(input logic [7:0] op, d0, d1, d2);
    byte_in(op); byte_in(d0); byte_in(d1); byte_in(d2);
    repeat (2) @(posedge clk);
  endtask
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    chk(inj_low == 20'h00800 && inj_high == 20'h70000, "default injection range");
    chk(end_addr == 20'd9 && clk_div == 8'd2, "default end address / divider");
    chk(ctl_reg == 32'h0000005A && mask_reg == 32'h000000C3, "default ctl/mask byte 0");
    word(8'h79, 8'hF1, 8'h23, 8'h45); chk(inj_low  == 20'h12345, "scrub error low");
    word(8'h7A, 8'h0A, 8'hBC, 8'hDE); chk(inj_high == 20'hABCDE, "scrub error high");
    word(8'h7B, 8'h0E, 8'hEE, 8'h00); chk(end_addr == 20'hEEE00, "end of configuration");
    word(8'h89, 8'h11, 8'h22, 8'h33); chk(ctl_reg  == 32'h3322115A, "control register");
    word(8'h8A, 8'h44, 8'h55, 8'h66); chk(mask_reg == 32'h665544C3, "mask register");
    word(8'hA0, 8'd6, 0, 0);  chk(clk_div == 8'd6, "divider 6");
    word(8'hA0, 8'd7, 0, 0);  chk(clk_div == 8'd6, "odd divider ignored");
    word(8'hA0, 8'd0, 0, 0);  chk(clk_div == 8'd6, "divider 0 ignored");
    word(8'h06, 0, 0, 0);     chk(scrub_on, "start scrub");
    word(8'h0E, 0, 0, 0);     chk(inject_on, "inject on");
    word(8'h05, 0, 0, 0);     chk(rdbk_on, "start readback");
    word(8'h02, 8'd2, 0, 0);  chk(n_start == 1 && pattern == PAT_CHECK, "start test, checkerboard");
    word(8'h04, 0, 0, 0);     chk(n_cfg == 1, "start configuration");
    word(8'h01, 0, 0, 0);     chk(n_reset == 1 && !scrub_on && !inject_on && !rdbk_on, "reset DUT");
    word(8'h55, 0, 0, 0);     chk(cmd.op == 8'h55 && n_reset == 1 && n_start == 1, "unknown opcode ignored");
    // write configuration data: 10 data bytes follow the command
    word(8'h81, 0, 0, 0);     chk(cfg_loading, "write config enters data phase");
    for (int i = 0; i < 10; i++) begin
      automatic logic [7:0] b = (i == 3) ? 8'h01 : 8'($urandom);  // an opcode-like byte
      wrq.push_back(b); byte_in(b);
    end
    repeat (2) @(posedge clk);
    chk(!cfg_loading && n_wr == 10 && n_reset == 1, "10 config bytes stored, not decoded");
    word(8'h02, 8'd1, 0, 0);  chk(n_start == 2 && pattern == PAT_ONE, "commands again after data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
