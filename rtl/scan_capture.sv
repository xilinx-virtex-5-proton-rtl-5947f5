// scan_capture: receives one TMR domain's SCAN_DATA window from the DUT.
//
// SHIFT_CLK is asynchronous to the tester clock, so it passes through a
// two-flop metastability filter and a third flop for rising-edge detection.
// SCAN_DATA is registered at the input pins every tester clock, so a
// radiation-induced I/O transient is caught in a flop before any compare.
// On each detected rising edge of SHIFT_CLK the registered data is copied to
// window and win_valid pulses for one clock.
//
// Timing: the edge is seen 2-3 tester clocks after SHIFT_CLK rises, and the
// data copied was sampled one clock earlier. The DUT changes its window two
// DUT clocks after SHIFT_CLK rises, which is at least 4 tester clocks at the
// fastest divider (2), so the copy always sees a stable window.
module scan_capture
  import v5test_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_clk,   // asynchronous
  input  logic [SCAN_W-1:0] scan_data,   // asynchronous
  output logic [SCAN_W-1:0] window,
  output logic              win_valid
);
  logic [2:0]        sc;
  logic [SCAN_W-1:0] din_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc        <= '0;
      din_q     <= '0;
      window    <= '0;
      win_valid <= 1'b0;
    end else begin
      sc        <= {sc[1:0], shift_clk};
      din_q     <= scan_data;
      win_valid <= 1'b0;
      if (sc[1] && !sc[2]) begin
        window    <= din_q;
        win_valid <= 1'b1;
      end
    end
  end
endmodule
