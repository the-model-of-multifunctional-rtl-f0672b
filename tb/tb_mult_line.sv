// tb_mult_line: random operands, including the extremes 0 and 255; checks
// every product one edge after en, and that the register holds with en low.
module tb_mult_line;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [23:0][7:0] x, w;
  logic [23:0][15:0] p, exp_p;

  mult_line dut (.clk, .rst_n, .en, .x, .w, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      en = 1;
      for (int i = 0; i < 24; i++) begin
        x[i] = (t == 0) ? 8'hFF : 8'($urandom);
        w[i] = (t == 0) ? 8'hFF : (t == 1 ? 8'h00 : 8'($urandom));
        exp_p[i] = 16'(int'(x[i]) * int'(w[i]));
      end
      @(negedge clk);
      en = 0;
      x = '1; w = '1;
      for (int i = 0; i < 24; i++) begin
        checks++;
        if (p[i] != exp_p[i]) begin failures++; $display("FAIL i=%0d p=%0d exp %0d", i, p[i], exp_p[i]); end
      end
      @(negedge clk);
      checks++;
      if (p != exp_p) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
