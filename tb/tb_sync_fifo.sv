// tb_sync_fifo: random pushes and pops (DEPTH 16) against a queue model;
// checks data order, full/empty/count, and that a push into a full FIFO
// is refused.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic full, empty; logic [4:0] count;
  logic [31:0] model [$];
  int fulls = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (count != 5'(model.size()) || empty != (model.size() == 0) || full != (model.size() == 16)) begin
        failures++; $display("FAIL count %0d model %0d", count, model.size());
      end
      if (!empty) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("FAIL data %h exp %h", rd_data, model[0]); end
      end
      // bias toward filling in the first half, draining in the second
      wr_en = ($urandom_range(0, 99) < ((n / 500) % 2 ? 35 : 70));
      rd_en = !empty && ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 35));
      wr_data = $urandom;
      @(posedge clk);
      if (full) fulls++;
      if (rd_en) void'(model.pop_front());
      if (wr_en && model.size() < 16 + (rd_en ? 1 : 0) && !full) model.push_back(wr_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
