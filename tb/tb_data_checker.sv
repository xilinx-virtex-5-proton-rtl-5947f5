// tb_data_checker: feeds windows for each pattern and checks arming after
// ARM_WINDOWS windows, detection of wrong strings (per-string flags), the
// error report contents, ErrorCnt, Burst (consecutive errors, cleared by a
// clean window), acceptance of both checkerboard phases, the dropped count
// when reports are not taken, the timeout when windows stop, and the
// clearing of all counters when run goes low.
module tb_data_checker;
  import v5test_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  pattern_e pattern = PAT_ZERO;
  logic [SCAN_W-1:0] window = '0; logic win_valid = 0;
  err_report_t err_report; logic err_valid, err_ready = 1;
  logic [15:0] error_cnt, burst, dropped; logic [31:0] windows_seen; logic timeout;
  err_report_t reps [$];

  data_checker #(.DOMAIN(2'd2), .ARM_WINDOWS(10), .TIMEOUT_CLKS(200)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && err_valid && err_ready) reps.push_back(err_report);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic win(input logic [SCAN_W-1:0] w);
    @(negedge clk); window = w; win_valid = 1;
    @(negedge clk); win_valid = 0;
    repeat (6) @(posedge clk);
  endtask

  function automatic logic [SCAN_W-1:0] good(pattern_e p, logic phase);
    case (p)
      PAT_ONE:   return '1;
      PAT_CHECK: return phase ? {6{4'b1010}} : {6{4'b0101}};
      default:   return '0;
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int pi = 0; pi < 3; pi++) begin
      automatic pattern_e p = pattern_e'(pi);
      @(negedge clk) run = 0; pattern = p;
      @(negedge clk) run = 1;
      reps.delete();
      // 10 windows of garbage before arming: ignored
      for (int i = 0; i < 10; i++) win(~good(p, 0));
      chk(error_cnt == 0 && reps.size() == 0, "not armed during fill");
      for (int i = 0; i < 5; i++) win(good(p, i[0]));
      chk(error_cnt == 0, "clean windows");
      // a burst of 3 errors in strings 1 and 4
      for (int i = 0; i < 3; i++) begin
        automatic logic [SCAN_W-1:0] w = good(p, 0);
        w[4*1] ^= 1'b1; w[4*4+3] ^= 1'b1;
        win(w);
        chk(burst == 16'(i + 1), $sformatf("burst %0d", burst));
      end
      chk(error_cnt == 3 && reps.size() == 3, "three errors reported");
      if (reps.size() > 0)
        chk(reps[0].domain == 2'd2 && reps[0].chain_err == 6'b010010 &&
            reps[0].window == (good(p, 0) ^ SCAN_W'(24'h080010)), "report contents");
      win(good(p, 1));
      chk(burst == 0 && error_cnt == 3, "burst cleared by clean window");
      // reports not taken: second one is dropped
      err_ready = 0;
      win('0 ^ {SCAN_W{p == PAT_ZERO}}); win(24'h123456);
      chk(dropped == 1 && error_cnt == 5, "dropped report counted");
      err_ready = 1;
      @(posedge clk);
      // windows stop: timeout
      chk(!timeout, "no timeout while windows arrive");
      repeat (220) @(posedge clk);
      chk(timeout, "timeout after silence");
      chk(windows_seen == 21, $sformatf("windows seen %0d", windows_seen));
    end
    @(negedge clk) run = 0;
    @(negedge clk);
    chk(error_cnt == 0 && burst == 0 && !timeout && windows_seen == 0, "cleared when not running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
