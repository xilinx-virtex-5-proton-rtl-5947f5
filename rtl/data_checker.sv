// data_checker: compares one TMR domain's captured windows with the value
// expected from the D_SR pattern and reports every error.
//
// Expected window per string (4 bits): 0000 for the zero pattern, 1111 for
// the ones pattern, and 0101 or 1010 for the checkerboard (the window phase
// relative to the pattern is not known to the tester, so either alternating
// value is accepted). Checking starts ARM_WINDOWS windows after the DUT
// leaves reset: a 300-bit string needs 75 windows before the first pattern
// bit reaches its end, so the default of 80 leaves margin.
//
// For every window with at least one wrong string, an err_report_t (domain,
// per-string error flags, the 24-bit window) is offered on err_valid /
// err_ready. error_cnt counts erroneous windows and burst the current run of
// consecutive erroneous windows (0 after a clean one), the two values the
// operator uses to tell a temporary upset from an unrecoverable one. A report
// that finds the previous one still waiting increments dropped and replaces
// it. timeout is set if, while running, no window arrives for TIMEOUT_CLKS
// tester clocks. Counters clear when run goes low.
module data_checker
  import v5test_pkg::*;
#(
  parameter logic [1:0]  DOMAIN       = 2'd0,
  parameter int unsigned ARM_WINDOWS  = 80,
  parameter int unsigned TIMEOUT_CLKS = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,        // DUT out of reset and clocked
  input  pattern_e          pattern,
  input  logic [SCAN_W-1:0] window,
  input  logic              win_valid,
  output err_report_t       err_report,
  output logic              err_valid,
  input  logic              err_ready,
  output logic [15:0]       error_cnt,
  output logic [15:0]       burst,
  output logic [15:0]       dropped,
  output logic [31:0]       windows_seen,
  output logic              timeout
);
  logic [N_CHAINS-1:0] chain_err;
  logic                armed;
  logic [$clog2(TIMEOUT_CLKS+1)-1:0] idle;

  // per-string compare
  always_comb begin
    for (int k = 0; k < N_CHAINS; k++) begin
      logic [WIN_BITS-1:0] w;
      w = window[WIN_BITS*k +: WIN_BITS];
      unique case (pattern)
        PAT_ONE:   chain_err[k] = (w != 4'b1111);
        PAT_CHECK: chain_err[k] = (w != 4'b0101) && (w != 4'b1010);
        default:   chain_err[k] = (w != 4'b0000);
      endcase
    end
  end

  assign armed = (windows_seen >= 32'(ARM_WINDOWS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_report   <= '0;
      err_valid    <= 1'b0;
      error_cnt    <= '0;
      burst        <= '0;
      dropped      <= '0;
      windows_seen <= '0;
      timeout      <= 1'b0;
      idle         <= '0;
    end else if (!run) begin
      err_valid    <= 1'b0;
      error_cnt    <= '0;
      burst        <= '0;
      dropped      <= '0;
      windows_seen <= '0;
      timeout      <= 1'b0;
      idle         <= '0;
    end else begin
      if (err_valid && err_ready) err_valid <= 1'b0;
      if (win_valid) begin
        idle         <= '0;
        windows_seen <= windows_seen + 1'b1;
        if (armed && (chain_err != '0)) begin
          error_cnt  <= error_cnt + 1'b1;
          burst      <= burst + 1'b1;
          err_report <= '{domain: DOMAIN, chain_err: chain_err, window: window};
          err_valid  <= 1'b1;
          if (err_valid && !err_ready) dropped <= dropped + 1'b1;
        end else if (armed) begin
          burst <= '0;
        end
      end else if (idle == ($bits(idle))'(TIMEOUT_CLKS)) begin
        timeout <= 1'b1;
      end else begin
        idle <= idle + 1'b1;
      end
    end
  end
endmodule
