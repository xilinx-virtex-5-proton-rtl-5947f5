// wsr_tmr_chain: one windowed shift register (WSR) string of the DUT,
// triplicated for TMR.
//
// Function: every clock all SR_LEN bits shift by one. A 2-bit counter
// divides the clock by 4; when it reaches 3 the last 4 DFFs of the string
// are copied into a 4-bit window register (SCAN_DATA) and the counter wraps.
// SHIFT_CLK is counter bit 1, so it runs at 1/4 of the clock and rises two
// clocks after the window changes, giving the tester half a SHIFT_CLK period
// of stable data on each side of its capture edge. Every bit that passes the
// end of the string therefore appears in exactly one window.
//
// TMR: there are three copies (domains) of every DFF. As in distributed TMR,
// each DFF input is taken from a majority voter over the three copies of the
// previous stage, so an upset in one copy is corrected at the next stage; the
// counter and window registers, which feed back on themselves, vote their own
// state. Each domain has its own clock and reset input: tie the three
// together for DTMR (shared clock tree) or drive them separately for GTMR /
// XTMR (triplicated clocks and resets). Inputs, window and SHIFT_CLK are
// triplicated I/O.
//
// N_INV inverters sit between consecutive DFF stages (the test plan builds
// strings with 0, 4 and 8). N_INV is kept even so the data is not inverted;
// they add delay in silicon and are logically transparent here.
//
// Timing: window[d] bit 3 is the oldest bit (the one in the last DFF).
// A bit applied on din[d] at a clock edge reaches the last DFF SR_LEN-1
// edges later. Reset (active low, per domain, already synchronised) clears
// everything.
module wsr_tmr_chain
  import v5test_pkg::*;
#(
  parameter int unsigned LEN   = SR_LEN,  // DFFs per string
  parameter int unsigned N_INV = 0        // inverters between stages (even)
) (
  input  logic [2:0]          clk,        // per-domain clock
  input  logic [2:0]          rst_n,      // per-domain synchronised reset
  input  logic [2:0]          din,        // D_SR, one per domain
  output logic [2:0][WIN_BITS-1:0] window, // SCAN_DATA window per domain
  output logic [2:0]          shift_clk   // SHIFT_CLK per domain
);
  // synthesis-time sanity
  initial begin
    assert (N_INV % 2 == 0) else $error("N_INV must be even");
    assert (LEN >= WIN_BITS) else $error("LEN must be at least WIN_BITS");
  end

  logic [2:0][LEN-1:0]      q;       // string DFFs per domain
  logic [LEN-1:0]           qv;      // voted string
  logic [2:0][1:0]          cnt;     // divide-by-4 counters
  logic [1:0]               cntv;
  logic [WIN_BITS-1:0]      winv;
  logic [2:0][LEN-1:0]      dnext;   // DFF inputs after the inverter chains

  tmr_voter #(.WIDTH(LEN))      u_vq   (.a(q[0]),      .b(q[1]),      .c(q[2]),      .y(qv));
  tmr_voter #(.WIDTH(2))        u_vcnt (.a(cnt[0]),    .b(cnt[1]),    .c(cnt[2]),    .y(cntv));
  tmr_voter #(.WIDTH(WIN_BITS)) u_vwin (.a(window[0]), .b(window[1]), .c(window[2]), .y(winv));

  // inverter strings between stages
  for (genvar d = 0; d < 3; d++) begin : g_dom
    for (genvar s = 0; s < LEN; s++) begin : g_stage
      logic [N_INV:0] inv;
      if (s == 0) begin : g_first
        assign inv[0] = din[d];
      end else begin : g_rest
        assign inv[0] = qv[s-1];
      end
      for (genvar k = 0; k < N_INV; k++) begin : g_inv
        assign inv[k+1] = ~inv[k];
      end
      assign dnext[d][s] = inv[N_INV];
    end

    // this domain's flip-flops, clocked and reset by the domain's own pins
    logic [LEN-1:0]      q_r;
    logic [1:0]          cnt_r;
    logic [WIN_BITS-1:0] win_r;
    logic                dclk, drst_n;

    assign dclk   = clk[d];
    assign drst_n = rst_n[d];

    always_ff @(posedge dclk or negedge drst_n) begin
      if (!drst_n) begin
        q_r   <= '0;
        cnt_r <= '0;
        win_r <= '0;
      end else begin
        q_r   <= dnext[d];
        cnt_r <= cntv + 2'd1;
        if (cntv == 2'd3) win_r <= {qv[LEN-1], qv[LEN-2], qv[LEN-3], qv[LEN-4]};
        else              win_r <= winv;
      end
    end

    assign q[d]      = q_r;
    assign cnt[d]    = cnt_r;
    assign window[d] = win_r;
    assign shift_clk[d] = cnt[d][1];
  end
endmodule
