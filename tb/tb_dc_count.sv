// tb_dc_count: checks the ones counter against a bit-by-bit count, for the
// default width (24) and an odd width (7), on all-zero, all-one and random
// vectors.
module tb_dc_count;
  int checks = 0, failures = 0;

  logic [23:0] v24;
  logic [4:0]  c24;
  logic [6:0]  v7;
  logic [2:0]  c7;

  dc_count #(.N(24)) dut24 (.v(v24), .cnt(c24));
  dc_count #(.N(7))  dut7  (.v(v7),  .cnt(c7));

  function automatic int popc(input logic [31:0] x, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += int'(x[i]);
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      case (t)
        0: begin v24 = '0; v7 = '0; end
        1: begin v24 = '1; v7 = '1; end
        default: begin v24 = 24'($urandom); v7 = 7'($urandom); end
      endcase
      #1;
      checks += 2;
      if (int'(c24) != popc(32'(v24), 24)) begin
        failures++;
        $display("FAIL N=24 v=%h cnt=%0d", v24, c24);
      end
      if (int'(c7) != popc(32'(v7), 7)) begin
        failures++;
        $display("FAIL N=7 v=%h cnt=%0d", v7, c7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
