// dut_controls: generates the DUT's clock (CLK_SR_A), reset (CLR) and data
// input (D_SR), each as three copies for the three TMR domains.
//
// CLK_SR_A is the tester clock divided by clk_div (an even number >= 2, from
// the Clock Frequency command): high for clk_div/2 tester clocks, then low
// for clk_div/2. D_SR changes only on the falling edge of CLK_SR_A, so it is
// stable for half a period around each rising edge where the DUT samples it.
// Patterns: all zeros, all ones, or a checkerboard that toggles every DUT
// clock.
//
// Sequence: after tester reset or a Reset DUT pulse, CLR (active low),
// CLK_SR_A and D_SR are all held low. start_test latches the divider and
// pattern and starts the clock with CLR still low; CLR is released on the
// falling edge that follows RST_CLKS rising edges (at least 3, as the test
// plan requires), and from then on D_SR carries the pattern. The divider and
// pattern are therefore set before Start Test, as the test plan asks.
// The three output copies come from separate flip-flops.
module dut_controls
  import v5test_pkg::*;
#(
  parameter int unsigned RST_CLKS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       reset_dut,
  input  logic       start_test,
  input  logic [7:0] clk_div,
  input  pattern_e   pattern,
  output logic [2:0] clk_sr,
  output logic [2:0] d_sr,
  output logic [2:0] clr_n,
  output logic       running     // CLR released, pattern on D_SR
);
  typedef enum logic [1:0] {C_HOLD, C_RESET, C_RUN} cstate_e;
  cstate_e     state;
  logic [7:0]  div_q;
  logic [6:0]  half;
  logic [7:0]  ph;
  pattern_e    pat_q;
  logic [3:0]  rcnt;
  logic        dbit;
  logic        rise, fall;

  initial assert (RST_CLKS >= 3 && RST_CLKS < 16) else $error("RST_CLKS out of range");

  assign half = div_q[7:1];
  assign rise = (state != C_HOLD) && (ph == 8'd0);
  assign fall = (state != C_HOLD) && (ph == {1'b0, half});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_HOLD;
      div_q   <= 8'd2;
      pat_q   <= PAT_ZERO;
      ph      <= '0;
      rcnt    <= '0;
      dbit    <= 1'b0;
      clk_sr  <= '0;
      d_sr    <= '0;
      clr_n   <= '0;
      running <= 1'b0;
    end else if (reset_dut) begin
      state   <= C_HOLD;
      ph      <= '0;
      rcnt    <= '0;
      dbit    <= 1'b0;
      clk_sr  <= '0;
      d_sr    <= '0;
      clr_n   <= '0;
      running <= 1'b0;
    end else begin
      case (state)
        C_HOLD: if (start_test) begin
          state <= C_RESET;
          div_q <= (clk_div < 8'd2) ? 8'd2 : {clk_div[7:1], 1'b0};
          pat_q <= pattern;
          ph    <= '0;
          rcnt  <= '0;
        end
        default: begin
          ph <= (ph == div_q - 8'd1) ? 8'd0 : ph + 8'd1;
          if (rise) begin
            clk_sr <= '1;
            if (state == C_RESET) rcnt <= rcnt + 1'b1;
          end
          if (fall) begin
            clk_sr <= '0;
            if (state == C_RESET && rcnt >= 4'(RST_CLKS)) begin
              state   <= C_RUN;
              clr_n   <= '1;
              running <= 1'b1;
            end
            if (state == C_RUN || rcnt >= 4'(RST_CLKS)) begin
              // next data bit, placed on the falling edge
              unique case (pat_q)
                PAT_ONE:   dbit <= 1'b1;
                PAT_CHECK: dbit <= ~dbit;
                default:   dbit <= 1'b0;
              endcase
              unique case (pat_q)
                PAT_ONE:   d_sr <= '1;
                PAT_CHECK: d_sr <= {3{~dbit}};
                default:   d_sr <= '0;
              endcase
            end
          end
        end
      endcase
    end
  end
endmodule
