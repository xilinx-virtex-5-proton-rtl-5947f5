// tb_dut_controls: for dividers 2, 4 and 6 and each pattern, checks that
// CLK_SR_A has period clk_div tester clocks with equal halves, that CLR and
// D_SR stay low before Start Test, that CLR is released only after at least
// 3 rising CLK_SR_A edges, that D_SR changes only at falling CLK_SR_A edges,
// that it carries the selected pattern, that the three copies agree, and
// that Reset DUT returns everything low.
module tb_dut_controls;
  import v5test_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, reset_dut = 0, start_test = 0;
  logic [7:0] clk_div = 2; pattern_e pattern = PAT_ZERO;
  logic [2:0] clk_sr, d_sr, clr_n; logic running;

  dut_controls dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // continuous monitors
  logic [2:0] clk_q = 0, d_q = 0;
  int hi = 0, lo = 0, rises_in_reset = 0, phase_err = 0, copy_err = 0, dchange_err = 0;
  always @(posedge clk) begin
    #1;
    if (!(clk_sr == 3'b000 || clk_sr == 3'b111) || !(d_sr == 3'b000 || d_sr == 3'b111) ||
        !(clr_n == 3'b000 || clr_n == 3'b111)) copy_err++;
    if (clr_n[0] && d_sr[0] != d_q[0] && !(clk_q[0] && !clk_sr[0])) dchange_err++;
    if (clk_sr[0] && !clk_q[0] && !clr_n[0]) rises_in_reset++;
    clk_q = clk_sr; d_q = d_sr;
  end

  task automatic run(input int div, input pattern_e p);
    int t_rise [$];
    logic [15:0] bits;
    clk_div = 8'(div); pattern = p;
    @(negedge clk) reset_dut = 1; @(negedge clk) reset_dut = 0;
    repeat (20) @(posedge clk);
    chk(clk_sr == 0 && d_sr == 0 && clr_n == 0, "all low while held");
    rises_in_reset = 0;
    @(negedge clk) start_test = 1; @(negedge clk) start_test = 0;
    wait (clr_n[0]);
    chk(rises_in_reset >= 3, $sformatf("CLR low for %0d rising edges", rises_in_reset));
    // measure the clock and sample D_SR at rising edges
    for (int i = 0; i < 17; i++) begin
      @(posedge clk_sr[0]);
      t_rise.push_back(int'($time));
      if (i > 0) bits[i-1] = d_sr[0];
    end
    for (int i = 1; i < t_rise.size(); i++)
      chk(t_rise[i] - t_rise[i-1] == 10 * div, $sformatf("period div %0d", div));
    @(posedge clk_sr[0]); @(negedge clk);
    hi = 0; lo = 0;
    while (clk_sr[0]) begin hi++; @(negedge clk); end
    while (!clk_sr[0]) begin lo++; @(negedge clk); end
    chk(hi == div / 2 && lo == div / 2, $sformatf("duty %0d/%0d", hi, lo));
    case (p)
      PAT_ZERO:  chk(bits == 16'h0000, "zero pattern");
      PAT_ONE:   chk(bits == 16'hFFFF, "ones pattern");
      default:   chk(bits == 16'h5555 || bits == 16'hAAAA, $sformatf("checkerboard %h", bits));
    endcase
    chk(running, "running");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    for (int di = 1; di <= 3; di++)
      for (int pi = 0; pi < 3; pi++)
        run(2 * di, pattern_e'(pi));
    @(negedge clk) reset_dut = 1; @(negedge clk) reset_dut = 0;
    repeat (3) @(posedge clk);
    chk(clk_sr == 0 && d_sr == 0 && clr_n == 0 && !running, "reset DUT");
    chk(copy_err == 0, "three copies agree");
    chk(dchange_err == 0, "D_SR changes only at falling CLK_SR_A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
