// tb_dc_cell: loads a value into one cell and steps it with random legal
// minima (never above the held value, sometimes exactly equal), checking the
// held value, the sign bit, the zeroing flag and the restored value after
// every edge, and that a zero cell ignores further steps.
module tb_dc_cell;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] a_in = 0, q = 0, a, restored;
  logic f, zeroing;

  dc_cell dut (.clk, .rst_n, .load, .a_in, .step, .q, .a, .f, .zeroing, .restored);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned ea, input int unsigned er, input int unsigned eq);
    checks++;
    if (a != 16'(ea) || restored != 16'(er) || f != (ea != 0) || zeroing != (ea != 0 && ea == eq)) begin
      failures++;
      $display("FAIL a=%0d exp %0d restored=%0d exp %0d f=%b zeroing=%b", a, ea, restored, er, f, zeroing);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int unsigned v, cur, rest;
      v = (t % 10 == 0) ? 0 : $urandom_range(1, 65535);
      @(negedge clk); load = 1; a_in = 16'(v); step = 1; q = 16'($urandom);
      @(negedge clk); load = 0; step = 0;
      cur = v; rest = 0;
      check(cur, rest, 32'(q));
      for (int s = 0; s < 8; s++) begin
        int unsigned qq;
        if (cur == 0) qq = $urandom_range(1, 100);
        else if (s == 7 || $urandom_range(0, 3) == 0) qq = cur;
        else qq = $urandom_range(1, cur);
        q = 16'(qq); step = ($urandom_range(0, 4) != 0);
        #1 check(cur, rest, qq);
        @(negedge clk);
        if (step && cur != 0) begin cur -= qq; rest += qq; end
        step = 0;
        check(cur, rest, 32'(q));
      end
      checks++;
      if (cur == 0 && restored != 16'(v)) begin
        failures++;
        $display("FAIL restore %0d exp %0d", restored, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
