// reset_sync: reset conditioner supplied to every DFF of the DUT.
// The active-low reset input clears both flip-flops asynchronously; on
// release, a constant 1 ripples through the two-stage metastability filter so
// the output rst_n_o de-asserts synchronously, two clock edges after rst_n_i
// goes high. This is the asynchronous-assert / synchronous-de-assert circuit
// of the test plan; the output buffer of that circuit is just the net here.
module reset_sync (
  input  logic clk,
  input  logic rst_n_i,   // asynchronous, active low
  output logic rst_n_o    // asserts asynchronously, releases on a clk edge
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) begin
      meta    <= 1'b0;
      rst_n_o <= 1'b0;
    end else begin
      meta    <= 1'b1;
      rst_n_o <= meta;
    end
  end
endmodule
