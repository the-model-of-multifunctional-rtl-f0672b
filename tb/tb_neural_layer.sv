// tb_neural_layer: end-to-end test of the layer at its default size
// (4 neurons, 24 inputs, 8-bit inputs and weights). Each operation applies a
// random input vector, random weight rows, a threshold and a mode, then
// follows every neuron on its own: done[i] must pulse exactly
// n_cycles[i]+2 edges after the start edge, and y, n_cycles, the sum and (in
// full mode, or when the threshold run went to the end) the sorted and
// restored products must match the reference model. It counts how often each
// mechanism of the design occurred and fails if one never did:
//   early stop     a threshold run that stopped before all cuts were done
//   full run       a full-mode run (sum, sorted and restored arrays)
//   no fire        a neuron that ended with y = 0
//   fire           a neuron that ended with y = 1
//   ties           equal products reaching zero in the same cut
//   zero products  products that are zero from the start
//   spread         neurons of one operation finishing at different times
//   mode switch    an operation whose mode differs from the previous one
module tb_neural_layer;
  import dc_ref_pkg::*;
  localparam int M = 4;
  localparam int N = 24;
  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0, n_nofire = 0, n_fire = 0, n_ties = 0;
  int n_zero = 0, n_spread = 0, n_switch = 0;

  logic clk = 0, rst_n = 0, start = 0;
  dc_pkg::dc_mode_e mode;
  logic [N-1:0][7:0] x;
  logic [M-1:0][N-1:0][7:0] w;
  logic [20:0] theta;
  logic [M-1:0] busy, done, valid, y;
  logic all_done;
  logic [M-1:0][20:0] sum;
  logic [M-1:0][4:0] n_cycles;
  logic [M-1:0][N-1:0][15:0] sorted, restored;

  neural_layer dut (.clk, .rst_n, .start, .mode, .x, .w, .theta, .busy, .done, .valid, .y,
                    .all_done, .sum, .n_cycles, .sorted, .restored);

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

  task automatic operation(input int t, input bit full);
    u64_t a[M][$];
    ref_res_t r[M];
    int done_at[M];
    int lat;
    u64_t avg;
    bit seen_spread;
    avg = 0;
    for (int j = 0; j < N; j++) x[j] = (t % 5 == 2 && j % 4 == 0) ? 8'h0 : 8'($urandom_range(0, 60));
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        w[i][j] = (t % 3 == 0) ? 8'(4 * $urandom_range(1, 3)) : 8'($urandom_range(0, 40));
        a[i].push_back(u64_t'(x[j]) * u64_t'(w[i][j]));
        avg += a[i][j];
      end
    end
    avg = avg / u64_t'(M);
    case (t % 4)
      0: theta = 21'(avg / 4);
      1: theta = 21'(avg * 2 + 1);
      default: theta = 21'(avg / 2 + u64_t'($urandom_range(0, int'(avg))));
    endcase
    mode = full ? dc_pkg::MODE_FULL : dc_pkg::MODE_THRESHOLD;
    for (int i = 0; i < M; i++) begin
      r[i] = dc_ref(a[i], u64_t'(theta), full);
      done_at[i] = -1;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!all_done && lat < 100) begin
      @(negedge clk);
      lat++;
      for (int i = 0; i < M; i++) if (done[i]) done_at[i] = lat;
    end
    seen_spread = 0;
    for (int i = 0; i < M; i++) begin
      int dn = distinct_nonzero(a[i]);
      checks += 4;
      if (y[i] != r[i].y) fail($sformatf("t=%0d n%0d y=%b exp %b", t, i, y[i], r[i].y));
      if (int'(n_cycles[i]) != r[i].n_cycles) fail($sformatf("t=%0d n%0d cuts=%0d exp %0d", t, i, n_cycles[i], r[i].n_cycles));
      if (done_at[i] != r[i].n_cycles + 2) fail($sformatf("t=%0d n%0d done at %0d exp %0d", t, i, done_at[i], r[i].n_cycles + 2));
      if (u64_t'(sum[i]) != r[i].sum) fail($sformatf("t=%0d n%0d sum=%0d exp %0d", t, i, sum[i], r[i].sum));
      if (full || r[i].n_cycles == dn) begin
        for (int j = 0; j < N; j++) begin
          checks += 2;
          if (u64_t'(sorted[i][j]) != r[i].sorted[j]) fail($sformatf("t=%0d n%0d sorted[%0d]", t, i, j));
          if (u64_t'(restored[i][j]) != a[i][j]) fail($sformatf("t=%0d n%0d restored[%0d]", t, i, j));
        end
      end
      if (!full && r[i].n_cycles < dn) n_early++;
      if (r[i].y) n_fire++; else n_nofire++;
      if (r[i].sorted[0] == 0) n_zero++;
      for (int j = 1; j < N; j++) if (r[i].sorted[j] != 0 && r[i].sorted[j] == r[i].sorted[j-1]) begin n_ties++; break; end
      if (i > 0 && done_at[i] != done_at[0]) seen_spread = 1;
    end
    if (full) n_full++;
    if (seen_spread) n_spread++;
  endtask

  initial begin
    dc_pkg::dc_mode_e prev;
    mode = dc_pkg::MODE_THRESHOLD;
    prev = dc_pkg::MODE_THRESHOLD;
    x = '0; w = '0; theta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      operation(t, (t % 3 == 1) || ($urandom_range(0, 3) == 0));
      if (t > 0 && mode != prev) n_switch++;
      prev = mode;
      @(negedge clk);
    end
    $display("early stop %0d, full run %0d, no fire %0d, fire %0d, ties %0d, zero products %0d, spread %0d, mode switch %0d",
             n_early, n_full, n_nofire, n_fire, n_ties, n_zero, n_spread, n_switch);
    checks += 8;
    if (n_early == 0)  fail("no early stop");
    if (n_full == 0)   fail("no full run");
    if (n_nofire == 0) fail("no non-firing neuron");
    if (n_fire == 0)   fail("no firing neuron");
    if (n_ties == 0)   fail("no equal products");
    if (n_zero == 0)   fail("no zero products");
    if (n_spread == 0) fail("no neurons finishing at different times");
    if (n_switch == 0) fail("no mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
