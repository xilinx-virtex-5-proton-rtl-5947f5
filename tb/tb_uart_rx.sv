// tb_uart_rx: sends random 8N1 frames at 16 clocks per bit, with random
// idle gaps, and checks every received byte in order. Also sends frames
// with a broken stop bit, which must be dropped, and a short glitch, which
// must not start a frame.
module tb_uart_rx;
  localparam int CPB = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data; logic valid;
  byte unsigned expq [$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1;
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected byte %h at %0t", data, $time); end
    else begin
      automatic byte unsigned e = expq.pop_front();
      if (data !== e) begin failures++; $display("FAIL got %h exp %h", data, e); end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      if (n % 25 == 7) begin
        send(b, 1'b0);                      // framing error: dropped
        repeat (2 * CPB) @(posedge clk);
      end else if (n % 25 == 13) begin
        rx = 0; repeat (CPB / 4) @(posedge clk); rx = 1;   // glitch
        repeat (2 * CPB) @(posedge clk);
      end else begin
        expq.push_back(b);
        send(b, 1'b1);
      end
      repeat ($urandom_range(0, 3 * CPB)) @(posedge clk);
    end
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bytes not received", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
