// tb_sram_ctrl: writes random bytes through the write port and reads them
// back through the read port (also with both ports requesting at once),
// checking the data, the byte-lane packing (byte A in word A>>1, low byte
// for even A) against the SRAM model, the request-to-ack time (3 clocks), and that WE/OE
// are never low together.
module tb_sram_ctrl;
  import v5test_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_req = 0, rd_req = 0, wr_ack, rd_ack;
  logic [19:0] wr_addr = 0, rd_addr = 0; logic [7:0] wr_data = 0, rd_data;
  logic [19:0] sram_a; logic [15:0] sram_d_o, sram_d_i; logic sram_d_oe;
  logic sram_we_n, sram_oe_n, sram_ce_n, sram_blen_n, sram_blhn_n;
  logic [7:0] ref_mem [logic [19:0]];
  logic [19:0] addrs [$];
  int both_low = 0;

  sram_ctrl #(.ACC_CLKS(2)) dut (.*);
  sram_model u_mem (.a(sram_a), .d_in(sram_d_o), .d_oe(sram_d_oe), .d_out(sram_d_i),
                    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n),
                    .blen_n(sram_blen_n), .blhn_n(sram_blhn_n));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && !sram_we_n && !sram_oe_n) both_low++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [19:0] a, input logic [7:0] d);
    @(negedge clk); wr_req = 1; wr_addr = a; wr_data = d;
    @(posedge clk); while (!wr_ack) @(posedge clk);
    @(negedge clk); wr_req = 0;
    ref_mem[a] = d;
  endtask

  task automatic rd(input logic [19:0] a);
    int cyc = 0;
    @(negedge clk); rd_req = 1; rd_addr = a;
    @(posedge clk); while (!rd_ack) begin @(posedge clk); cyc++; end
    #1;
    checks++;
    if (rd_data !== ref_mem[a]) begin failures++; $display("FAIL read %h = %h exp %h", a, rd_data, ref_mem[a]); end
    checks++;
    if (cyc != 3) begin failures++; $display("FAIL access took %0d", cyc); end
    @(negedge clk); rd_req = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic logic [19:0] a = (i < 100) ? 20'(i) : 20'($urandom_range(0, 977487));
      if (!ref_mem.exists(a)) addrs.push_back(a);
      wr(a, 8'($urandom));
    end
    foreach (addrs[i]) begin
      rd(addrs[i]);
      checks++;
      if (u_mem.read_byte(addrs[i]) !== ref_mem[addrs[i]]) begin
        failures++; $display("FAIL lane packing at %h", addrs[i]);
      end
    end
    // simultaneous requests: write wins, read follows
    @(negedge clk); wr_req = 1; wr_addr = 20'h00003; wr_data = 8'hA5; rd_req = 1; rd_addr = 20'h00003;
    @(posedge clk); while (!wr_ack) @(posedge clk);
    @(negedge clk); wr_req = 0; ref_mem[20'h3] = 8'hA5;
    @(posedge clk); while (!rd_ack) @(posedge clk);
    #1 checks++;
    if (rd_data !== 8'hA5) begin failures++; $display("FAIL write priority"); end
    @(negedge clk); rd_req = 0;
    checks++;
    if (both_low != 0) begin failures++; $display("FAIL bus conflicts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
