// tb_dc_min: checks the minimum tree against a linear search over the
// enabled elements, at the default size (24, not a power of two) and at 5,
// with random values, forced ties, a single enabled element and none.
module tb_dc_min;
  int checks = 0, failures = 0;

  logic [23:0][15:0] a;
  logic [23:0]       en;
  logic [15:0]       q;
  logic              any;
  logic [4:0][7:0]   a5;
  logic [4:0]        en5;
  logic [7:0]        q5;
  logic              any5;

  dc_min dut (.a(a), .en(en), .q(q), .any(any));
  dc_min #(.N(5), .AW(8)) dut5 (.a(a5), .en(en5), .q(q5), .any(any5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int unsigned exp_q, exp_q5;
      bit exp_any, exp_any5;
      for (int i = 0; i < 24; i++) a[i] = (t % 3 == 0) ? 16'(100 + $urandom_range(0, 5)) : 16'($urandom);
      for (int i = 0; i < 5; i++) a5[i] = 8'($urandom);
      case (t % 4)
        0: en = '0;
        1: en = 24'(1) << $urandom_range(0, 23);
        default: en = 24'($urandom);
      endcase
      en5 = (t % 5 == 0) ? '0 : 5'($urandom);
      exp_q = 32'hFFFF_FFFF; exp_any = 0;
      for (int i = 0; i < 24; i++) if (en[i] && a[i] < exp_q) begin exp_q = a[i]; exp_any = 1; end
      if (!exp_any) exp_q = 0;
      exp_q5 = 32'hFFFF_FFFF; exp_any5 = 0;
      for (int i = 0; i < 5; i++) if (en5[i] && a5[i] < exp_q5) begin exp_q5 = a5[i]; exp_any5 = 1; end
      if (!exp_any5) exp_q5 = 0;
      #1;
      checks += 2;
      if (q != 16'(exp_q) || any != exp_any) begin
        failures++;
        $display("FAIL N=24 t=%0d q=%0d exp=%0d any=%b", t, q, exp_q, any);
      end
      if (q5 != 8'(exp_q5) || any5 != exp_any5) begin
        failures++;
        $display("FAIL N=5 t=%0d q=%0d exp=%0d any=%b", t, q5, exp_q5, any5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
