// tb_uart_tx: offers random bytes and decodes the TX line independently,
// sampling the middle of each bit: checks start bit, data bits (LSB first),
// stop bit and the exact 10-bit frame length of 10 x CLKS_PER_BIT clocks.
module tb_uart_tx;
  localparam int CPB = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] data; logic valid = 0, ready, tx;
  byte unsigned expq [$];
  int frames = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      data = 8'($urandom); valid = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      expq.push_back(data);
      @(negedge clk) valid = 0;
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
  end

  // line decoder
  initial begin
    @(posedge rst_n);
    forever begin
      automatic logic [7:0] b;
      automatic int len = 0;
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (tx !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (expq.size() == 0 || b !== expq[0]) begin failures++; $display("FAIL byte %h", b); end
      else void'(expq.pop_front());
      // the line must stay high until the end of the stop bit
      while (!ready) begin @(posedge clk); len++; if (!tx) begin failures++; break; end end
      checks++;
      if (len > CPB / 2 + 2) begin failures++; $display("FAIL frame too long (%0d)", len); end
      frames++;
      if (frames == 100) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
