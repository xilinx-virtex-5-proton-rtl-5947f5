// uart_tx: RS232 transmitter (8N1, LSB first) for reports to the host PC.
// A byte is accepted when valid and ready are both high; ready is low while
// a frame (start bit, 8 data bits, stop bit, each CLKS_PER_BIT clocks) is
// being sent. The line idles high. Default rate: 115200 baud at 150 MHz.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  logic [9:0] frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0] bits_left;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] tick;

  assign ready = (bits_left == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      tick      <= '0;
      tx        <= 1'b1;
    end else if (ready) begin
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        tick      <= '0;
        tx        <= 1'b0;
      end
    end else if (tick == ($bits(tick))'(CLKS_PER_BIT - 1)) begin
      tick      <= '0;
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      tx        <= (bits_left == 4'd1) ? 1'b1 : frame[1];
    end else begin
      tick <= tick + 1'b1;
    end
  end
endmodule
