// report_tx: sends the error reports queued in the error FIFO to the host
// PC over the RS232 transmitter.
// Each 32-bit err_report_t is sent as four bytes, most significant byte
// first: {domain, string flags[5:0]}, then the 24-bit window high to low.
// The FIFO word is popped (rd_en pulse) once its last byte has been handed
// to the transmitter. The byte layout is this design's own; the test plan
// only requires that every error be reported.
module report_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready
);
  logic [1:0] idx;

  assign tx_valid = !fifo_empty;
  assign tx_data  = fifo_data[{~idx, 3'b000} +: 8];
  assign fifo_rd  = tx_valid && tx_ready && (idx == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   idx <= '0;
    else if (tx_valid && tx_ready) idx <= idx + 1'b1;
  end
endmodule
