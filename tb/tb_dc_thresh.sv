// tb_dc_thresh: drives random sequences of (q_j, b_j) into the partial-sum
// and threshold stage and checks S, the firing flag against
// Delta_{j-1} - q_j*b_j <= 0, and 'reached', including theta = 0, idle
// cycles with valid low and re-initialisation.
module tb_dc_thresh;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, valid = 0;
  logic [20:0] theta = 0, sum;
  logic [15:0] q = 0;
  logic [4:0]  b = 0;
  logic signed [21:0] delta;
  logic fire, reached;
  int fires = 0;

  dc_thresh dut (.clk, .rst_n, .init, .theta, .valid, .q, .b, .sum, .delta, .fire, .reached);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint s, th, sj;
      th = (t % 7 == 0) ? 0 : $urandom_range(0, 40000);
      @(negedge clk); init = 1; theta = 21'(th);
      @(negedge clk); init = 0;
      s = 0;
      checks++;
      if (sum != 0 || delta != 22'(th) || reached != (th == 0)) begin
        failures++; $display("FAIL init sum=%0d delta=%0d", sum, delta);
      end
      for (int k = 0; k < 10; k++) begin
        valid = ($urandom_range(0, 3) != 0);
        q = 16'($urandom_range(0, 3000));
        b = 5'($urandom_range(0, 24));
        // Now and then hit the boundary Delta_{j-1} - S_j == 0 exactly.
        if (k % 3 == 2 && th - s > 0 && th - s <= 65535) begin
          q = 16'(th - s);
          b = 5'd1;
          valid = 1'b1;
        end
        sj = longint'(q) * longint'(b);
        #1;
        checks++;
        if (fire != (valid && (th - s - sj <= 0))) begin
          failures++; $display("FAIL fire=%b th=%0d s=%0d sj=%0d", fire, th, s, sj);
        end
        if (fire) fires++;
        @(negedge clk);
        if (valid) s += sj;
        valid = 0;
        checks++;
        if (longint'(sum) != s || longint'(delta) != th - s || reached != (th - s <= 0)) begin
          failures++; $display("FAIL sum=%0d exp %0d delta=%0d", sum, s, delta);
        end
      end
    end
    checks++;
    if (fires == 0) begin failures++; $display("FAIL never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
