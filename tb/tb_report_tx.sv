// tb_report_tx: a queue of 32-bit reports stands in for the FIFO and a
// transmitter model accepts bytes with random back-pressure. Checks that
// each report leaves as four bytes, most significant first, and that a
// report is popped exactly once, after its last byte.
module tb_report_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] fifo_data; logic fifo_empty, fifo_rd;
  logic [7:0] tx_data; logic tx_valid, tx_ready = 0;
  logic [31:0] q [$];
  byte unsigned expb [$];
  int pops = 0;

  report_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : q[0];

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      checks++;
      if (expb.size() == 0 || tx_data !== expb[0]) begin failures++; $display("FAIL byte %h", tx_data); end
      if (expb.size() != 0) void'(expb.pop_front());
    end
    if (fifo_rd) begin
      checks++;
      if (fifo_empty) begin failures++; $display("FAIL pop of empty"); end
      else begin void'(q.pop_front()); pops++; end
      if (expb.size() % 4 != 0) begin failures++; $display("FAIL pop before last byte"); end
    end
  end

  always @(negedge clk) tx_ready = ($urandom_range(0, 3) == 0);

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic logic [31:0] r = $urandom;
      @(negedge clk);
      q.push_back(r);
      for (int i = 3; i >= 0; i--) expb.push_back(r[8*i +: 8]);
      repeat ($urandom_range(0, 10)) @(posedge clk);
    end
    wait (q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (pops != 200 || expb.size() != 0) begin failures++; $display("FAIL pops %0d", pops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
