// tb_scan_capture: plays the DUT side at the fastest rate (DUT clock = 1/2
// tester clock, so SHIFT_CLK has a period of 8 tester clocks) and at a
// slower, non-integer rate with phase drift. The window changes two DUT
// clocks before each SHIFT_CLK rise and again two after. Checks that every
// window is captured exactly once, in order, and with the right value.
module tb_scan_capture;
  import v5test_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic shift_clk = 0; logic [SCAN_W-1:0] scan_data = '0;
  logic [SCAN_W-1:0] window; logic win_valid;
  logic [SCAN_W-1:0] sent [$];
  int got = 0;

  scan_capture dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && win_valid) begin
    checks++;
    if (sent.size() == 0) begin failures++; $display("FAIL extra window %h", window); end
    else begin
      automatic logic [SCAN_W-1:0] e = sent.pop_front();
      if (window !== e) begin failures++; $display("FAIL window %h exp %h", window, e); end
    end
    got++;
  end

  // DUT model: counter 0..3 on a DUT clock of period dut_per
  task automatic dut_run(input real dut_per, input int n_windows);
    for (int w = 0; w < n_windows; w++) begin
      // cnt 3 -> 0: new window
      scan_data = SCAN_W'($urandom);
      sent.push_back(scan_data);
      shift_clk = 0;
      #(dut_per);          // cnt 1
      #(dut_per);          // cnt 2: SHIFT_CLK rises
      shift_clk = 1;
      #(dut_per);          // cnt 3
      #(dut_per);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk);
    #1;
    dut_run(20.0, 300);      // DUT clock = tester clock / 2
    dut_run(13.7, 300);      // asynchronous, drifting phase
    shift_clk = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got != 600 || sent.size() != 0) begin failures++; $display("FAIL got %0d windows", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
