// tb_neural_element: drives one neuron (24 inputs, 8-bit x and w) with
// random inputs and weights in both modes and checks y, the number of cuts,
// the sum of products, the sorted and restored products and the latency
// (done exactly n_cycles+2 edges after the start edge) against the
// reference model applied to the products.
module tb_neural_element;
  import dc_ref_pkg::*;
  localparam int N = 24;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][7:0] x, w;
  logic [20:0] theta;
  dc_pkg::dc_mode_e mode;
  logic busy, done, valid, y;
  logic [20:0] sum;
  logic [4:0] n_cycles;
  logic [N-1:0][15:0] sorted, restored;

  neural_element dut (.clk, .rst_n, .start, .x, .w, .theta, .mode, .busy, .done, .valid, .y,
                      .sum, .n_cycles, .sorted, .restored);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    mode = dc_pkg::MODE_THRESHOLD;
    x = '0; w = '0; theta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      u64_t a[$];
      u64_t total;
      ref_res_t r;
      int lat;
      bit full;
      a.delete();
      total = 0;
      full = t[0];
      for (int i = 0; i < N; i++) begin
        x[i] = (t % 3 == 0) ? 8'($urandom_range(0, 3)) : 8'($urandom);
        w[i] = 8'($urandom_range(0, 20));
        a.push_back(u64_t'(x[i]) * u64_t'(w[i]));
        total += a[i];
      end
      theta = (t % 6 == 1) ? 21'(total + 5) : 21'($urandom_range(0, int'(total)));
      mode = full ? dc_pkg::MODE_FULL : dc_pkg::MODE_THRESHOLD;
      r = dc_ref(a, u64_t'(theta), full);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; x = '1; w = '1; theta = '1; mode = dc_pkg::MODE_THRESHOLD;
      lat = 0;
      checks++;
      if (!busy || valid) fail("busy/valid right after start");
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks += 4;
      if (y != r.y) fail($sformatf("t=%0d y=%b exp %b", t, y, r.y));
      if (int'(n_cycles) != r.n_cycles) fail($sformatf("t=%0d n_cycles=%0d exp %0d", t, n_cycles, r.n_cycles));
      if (lat != r.n_cycles + 2) fail($sformatf("t=%0d latency=%0d exp %0d", t, lat, r.n_cycles + 2));
      if (u64_t'(sum) != r.sum) fail($sformatf("t=%0d sum=%0d exp %0d", t, sum, r.sum));
      if (full) begin
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (u64_t'(sorted[i]) != r.sorted[i]) fail($sformatf("t=%0d sorted[%0d]", t, i));
          if (u64_t'(restored[i]) != a[i]) fail($sformatf("t=%0d restored[%0d]", t, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
