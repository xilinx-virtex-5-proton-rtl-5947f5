// uart_rx: RS232 receiver (8 data bits, no parity, 1 stop bit, LSB first)
// for the command link from the host PC.
//
// The asynchronous RX line passes through a two-flop synchroniser. A falling
// edge starts a frame; the line is sampled in the middle of each bit, timed
// by a counter of CLKS_PER_BIT system clocks. A byte is presented on data
// with a one-cycle valid pulse in the middle of the stop bit; a frame whose
// stop bit is 0 is dropped and the receiver waits for the line to return
// high before looking for the next start bit. The default of 1302 clocks per bit is
// 115200 baud from the 150 MHz tester clock, a rate this design infers from
// the 85 s the test plan quotes for sending the 977488-byte file over RS232.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1302
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_BREAK} state_e;
  state_e state;
  logic [1:0]  sync;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] tick;
  logic [2:0]  bitn;
  logic [7:0]  shreg;
  logic        rxs;

  assign rxs = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= S_IDLE;
      tick  <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      case (state)
        S_IDLE: if (!rxs) begin
          state <= S_START;
          tick  <= '0;
        end
        S_START: begin
          if (tick == ($bits(tick))'(CLKS_PER_BIT/2 - 1)) begin
            tick  <= '0;
            // glitch shorter than half a bit: back to idle
            state <= rxs ? S_IDLE : S_DATA;
            bitn  <= '0;
          end else tick <= tick + 1'b1;
        end
        S_DATA: begin
          if (tick == ($bits(tick))'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            shreg <= {rxs, shreg[7:1]};
            if (bitn == 3'd7) state <= S_STOP;
            bitn  <= bitn + 1'b1;
          end else tick <= tick + 1'b1;
        end
        S_STOP: begin
          if (tick == ($bits(tick))'(CLKS_PER_BIT - 1)) begin
            tick  <= '0;
            if (rxs) begin
              state <= S_IDLE;
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              state <= S_BREAK;
            end
          end else tick <= tick + 1'b1;
        end
        S_BREAK: if (rxs) state <= S_IDLE;   // framing error: wait for idle line
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
