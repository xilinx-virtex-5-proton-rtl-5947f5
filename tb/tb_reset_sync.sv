// tb_reset_sync: checks that the reset output asserts immediately (between
// clock edges) when the input asserts, and releases exactly on the second
// rising clock edge after the input is released.
module tb_reset_sync;
  int checks = 0, failures = 0;
  logic clk = 0, rst_in = 0, rst_out;

  reset_sync dut (.clk, .rst_n_i(rst_in), .rst_n_o(rst_out));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (rst_out !== exp) begin failures++; $display("FAIL %s: rst_out=%b at %0t", what, rst_out, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(1'b0, "held in reset");
    for (int n = 0; n < 20; n++) begin
      // release away from the clock edge
      @(negedge clk); rst_in = 1;
      @(posedge clk); #1 check(1'b0, "one edge after release");
      @(posedge clk); #1 check(1'b1, "two edges after release");
      repeat ($urandom_range(1, 5)) @(posedge clk);
      #1 check(1'b1, "stays released");
      // asynchronous assertion in the middle of a clock phase
      #2 rst_in = 0;
      #1 check(1'b0, "asynchronous assert");
      @(posedge clk); #1 check(1'b0, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
