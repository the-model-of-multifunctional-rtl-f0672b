// tb_dc_processor: runs the difference-cut processor (24 elements, 16 bits)
// on random arrays in both modes and compares y, the number of cuts, the
// sum, the sorted array and the restored array with the reference model.
// Arrays mix fully random values, values drawn from a few levels (many equal
// elements, which reach zero in the same cut) and zeros; thresholds range
// from 0 to above the sum. It also checks the latency (done exactly
// n_cycles+1 edges after the start edge), that done is a single pulse, that a
// threshold run stops early, the all-zero array, and a start given while an
// earlier run is still in progress (the new run must replace it).
module tb_dc_processor;
  import dc_ref_pkg::*;
  localparam int N = 24;
  int checks = 0, failures = 0;
  int early = 0, ties = 0, no_fire = 0, restarts = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][15:0] a0;
  logic [20:0] theta;
  dc_pkg::dc_mode_e mode;
  logic busy, done, valid, y;
  logic [20:0] sum;
  logic [4:0] n_cycles;
  logic [N-1:0][15:0] sorted, restored;

  dc_processor dut (.clk, .rst_n, .start, .a0, .theta, .mode, .busy, .done, .valid, .y,
                    .sum, .n_cycles, .sorted, .restored);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(input int t, input bit full);
    u64_t a[$];
    u64_t total;
    ref_res_t r;
    int lat;
    total = 0;
    for (int i = 0; i < N; i++) begin
      case (t % 4)
        0: a0[i] = 16'($urandom);
        1: a0[i] = 16'(100 * $urandom_range(0, 4));
        2: a0[i] = 16'($urandom_range(300, 700));
        default: a0[i] = (t % 16 == 3) ? 16'h0 : 16'($urandom_range(0, 9));
      endcase
      a.push_back(u64_t'(a0[i]));
      total += u64_t'(a0[i]);
    end
    case (t % 5)
      0: theta = 0;
      1: theta = 21'(total + 1);
      default: theta = 21'($urandom_range(0, int'(total) + 1));
    endcase
    mode = full ? dc_pkg::MODE_FULL : dc_pkg::MODE_THRESHOLD;
    r = dc_ref(a, u64_t'(theta), full);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
      if (lat > 100) break;
    end
    checks++;
    if (y != r.y) fail($sformatf("t=%0d full=%0b y=%b exp %b", t, full, y, r.y));
    checks++;
    if (int'(n_cycles) != r.n_cycles) fail($sformatf("t=%0d n_cycles=%0d exp %0d", t, n_cycles, r.n_cycles));
    checks++;
    if (lat != r.n_cycles + 1) fail($sformatf("t=%0d latency %0d exp %0d", t, lat, r.n_cycles + 1));
    checks++;
    if (!valid || busy) fail("valid/busy at done");
    checks++;
    if (u64_t'(sum) != r.sum) fail($sformatf("t=%0d sum=%0d exp %0d", t, sum, r.sum));
    if (!full && r.n_cycles < distinct_nonzero(a)) early++;
    if (!r.y) no_fire++;
    if (distinct_nonzero(a) < N) ties++;
    if (full || r.n_cycles == distinct_nonzero(a)) begin
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (u64_t'(sorted[i]) != r.sorted[i]) fail($sformatf("t=%0d sorted[%0d]=%0d exp %0d", t, i, sorted[i], r.sorted[i]));
        if (restored[i] != a0[i]) fail($sformatf("t=%0d restored[%0d]=%0d exp %0d", t, i, restored[i], a0[i]));
      end
    end
    @(negedge clk);
    checks++;
    if (done || !valid) fail("done not a single pulse / valid not held");
  endtask

  initial begin
    mode = dc_pkg::MODE_THRESHOLD;
    a0 = '0; theta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      // Every eighth run is preceded by an aborted run on other data,
      // restarted after a few cycles.
      if (t % 8 == 5) begin
        for (int i = 0; i < N; i++) a0[i] = 16'($urandom);
        theta = '1;
        mode = dc_pkg::MODE_FULL;
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        restarts++;
      end
      run(t, t[0]);
    end
    checks += 4;
    if (restarts == 0) fail("no restart seen");
    if (early == 0) fail("no early stop seen");
    if (ties == 0) fail("no equal elements seen");
    if (no_fire == 0) fail("no non-firing run seen");
    $display("early stops %0d, runs with ties %0d, non-firing %0d", early, ties, no_fire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
