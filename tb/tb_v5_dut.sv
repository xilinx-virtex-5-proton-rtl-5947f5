// tb_v5_dut: checks both DUT builds (DTMR and GTMR) side by side.
// Random data goes to D_SR of all domains; every SCAN_DATA window of every
// string and domain is compared with the input delayed by the 300-bit
// string (reference built from the input history, counting the two clocks
// the reset synchroniser needs). Halfway through, the clock of domain 2 is
// stopped: in the GTMR build domains 0 and 1 must keep producing correct
// windows (their voters outvote the stalled copy), and in the DTMR build
// all three domains run on clock 0 and must not notice at all.
module tb_v5_dut;
  import v5test_pkg::*;
  localparam int LEN = 300;
  int checks = 0, failures = 0;
  logic clk = 0, stop2 = 0;
  logic [2:0] clr_n = '0, d_sr = '0;
  logic [2:0] clks;
  logic [2:0][SCAN_W-1:0] sd_d, sd_g;
  logic [2:0] sc_d, sc_g, scq_d = '0, scq_g = '0;
  logic hist [int];
  int e = 0, rises_g = 0, rises_d = 0;

  assign clks = {clk & !stop2, clk, clk};

  v5_dut #(.GLOBAL_TMR(1'b0), .LEN(LEN)) dut_d (.clk_sr_a(clks), .clr_n, .d_sr, .scan_data(sd_d), .shift_clk(sc_d));
  v5_dut #(.GLOBAL_TMR(1'b1), .LEN(LEN)) dut_g (.clk_sr_a(clks), .clr_n, .d_sr, .scan_data(sd_g), .shift_clk(sc_g));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic h(int t);
    return hist.exists(t) ? hist[t] : 1'b0;
  endfunction

  function automatic logic [3:0] expw(int t);
    return {h(t-LEN), h(t-LEN+1), h(t-LEN+2), h(t-LEN+3)};
  endfunction

  always @(negedge clk) if (clr_n[0]) d_sr = {3{1'($urandom)}};

  always @(posedge clk) if (clr_n[0]) begin
    e++;
    if (e > 2) hist[e-2] = d_sr[0];   // chain edge number = e - 2
  end

  always @(posedge clk) begin
    #1;
    for (int d = 0; d < 3; d++) begin
      // DTMR: every domain, timed by domain 0's SHIFT_CLK (all share clock 0)
      if (sc_d[0] && !scq_d[0]) begin
        if (d == 0) rises_d++;
        for (int k = 0; k < N_CHAINS; k++) begin
          checks++;
          if (sd_d[d][4*k +: 4] !== expw(e - 4)) begin
            failures++; $display("FAIL DTMR dom %0d chain %0d win=%b exp=%b", d, k, sd_d[d][4*k +: 4], expw(e-4));
          end
        end
      end
      // GTMR: domains 0 and 1 (domain 2 is stopped in the second half)
      if (d < 2 && sc_g[d] && !scq_g[d]) begin
        if (d == 0) rises_g++;
        for (int k = 0; k < N_CHAINS; k++) begin
          checks++;
          if (sd_g[d][4*k +: 4] !== expw(e - 4)) begin
            failures++; $display("FAIL GTMR dom %0d chain %0d win=%b exp=%b", d, k, sd_g[d][4*k +: 4], expw(e-4));
          end
        end
      end
    end
    scq_d = sc_d; scq_g = sc_g;
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) clr_n = '1;
    repeat (1200) @(posedge clk);
    // domain 2 of GTMR must still be in step before the stop
    checks++;
    if (sd_g[2] !== sd_g[0]) begin failures++; $display("FAIL GTMR domain 2 differs before stop"); end
    @(negedge clk) stop2 = 1;
    repeat (1200) @(posedge clk);
    checks++;
    if (rises_g < 590 || rises_d < 590) begin
      failures++; $display("FAIL too few SHIFT_CLK rises: %0d %0d", rises_g, rises_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
