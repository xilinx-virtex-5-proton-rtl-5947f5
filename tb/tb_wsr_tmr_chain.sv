// tb_wsr_tmr_chain: drives random data into a 300-bit TMR string and checks
// every window against a reference built from the input history: the window
// loaded at clock edge t holds the inputs of edges t-300 .. t-297 (oldest in
// bit 3), windows load every 4th edge, and SHIFT_CLK rises 2 edges after a
// load. Domain 1's input is corrupted with random bits most of the time, a
// single-domain upset that the voters must mask in all three domains. Runs
// with N_INV = 4 and one clock for all domains.
module tb_wsr_tmr_chain;
  import v5test_pkg::*;
  localparam int LEN = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic din_good;
  logic [2:0] din;
  logic [2:0][WIN_BITS-1:0] window;
  logic [2:0] shift_clk;
  logic hist [int];
  int edge_n = 0, loads = 0, rises = 0;
  logic [2:0] sclk_q = '0;

  wsr_tmr_chain #(.LEN(LEN), .N_INV(4)) dut (
    .clk({3{clk}}), .rst_n({3{rst_n}}), .din, .window, .shift_clk);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic h(int t);
    return (t >= 1 && hist.exists(t)) ? hist[t] : 1'b0;
  endfunction

  // inputs change after the edge, as the tester changes D_SR on the falling edge
  always @(negedge clk) begin
    din_good = 1'($urandom);
    din = {din_good, ($urandom_range(0, 9) < 8) ? 1'($urandom) : din_good, din_good};
  end

  always @(posedge clk) if (rst_n) begin
    edge_n++;
    hist[edge_n] = din_good;
  end

  // check on each SHIFT_CLK rise: the load happened 2 edges ago
  always @(posedge clk) begin
    #1;
    for (int d = 0; d < 3; d++) begin
      if (shift_clk[d] && !sclk_q[d]) begin
        automatic int t = edge_n - 2;
        automatic logic [3:0] exp = {h(t-LEN), h(t-LEN+1), h(t-LEN+2), h(t-LEN+3)};
        checks++;
        if (d == 0) rises++;
        if (window[d] !== exp) begin
          failures++;
          $display("FAIL dom %0d load edge %0d window=%b exp=%b", d, t, window[d], exp);
        end
        if (t % 4 != 0) begin failures++; $display("FAIL load at edge %0d not a multiple of 4", t); end
      end
    end
    sclk_q = shift_clk;
  end

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2000) @(posedge clk);
    checks++;
    if (rises < 490) begin failures++; $display("FAIL only %0d SHIFT_CLK rises", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
