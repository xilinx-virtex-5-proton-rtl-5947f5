// tb_tmr_voter: exhaustive check of the 2-of-3 majority voter on one bit
// position, then random 8-bit words compared with a per-bit majority count.
module tb_tmr_voter;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c, y;

  tmr_voter #(.WIDTH(8)) dut (.a, .b, .c, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a = {8{i[0]}}; b = {8{i[1]}}; c = {8{i[2]}};
      #1;
      checks++;
      if (y !== {8{(i[0] + i[1] + i[2]) >= 2}}) begin
        failures++; $display("FAIL exhaustive %0d y=%h", i, y);
      end
    end
    for (int n = 0; n < 500; n++) begin
      logic [7:0] exp;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      // single-copy upset: two copies equal must win
      if (n % 2 == 0) b = a ^ 8'($urandom);
      #1;
      for (int k = 0; k < 8; k++) exp[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) > 1;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
