// tb_dc_workload: the threshold-processing study of the method. For array
// sizes n = 6, 8, ..., 24 and standard deviations sigma = 30, 50, ..., 150 of
// the elements (mean mu = 500, threshold theta = mu*n), it runs TRIALS random
// arrays through the default 24-element processor in threshold mode (the
// unused elements are zero), checks every result against the reference
// model and the bound of at most n cuts, and prints the average number of
// cuts N_avg for each (n, sigma). Elements are approximately normal: the
// sum of 12 uniform numbers, centred and scaled.
// A second part looks at equal operands at n = 24, sigma = 90: full runs
// must take exactly n - sum_r (m_r - 1) cuts (m_r being the multiplicity of
// each repeated value), and threshold runs on the same arrays rounded to
// multiples of STEP (which creates many equal elements) must need fewer cuts
// on average than on the unrounded arrays; the saving is printed.
module tb_dc_workload;
  import dc_ref_pkg::*;
  localparam int N = 24;
  localparam int TRIALS = 40;
  localparam int MU = 500;
  localparam int STEP = 20;
  int checks = 0, failures = 0;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gauss(input int mu, input int sigma);
    int s = 0;
    int v;
    for (int k = 0; k < 12; k++) s += $urandom_range(0, 9999);
    // s - 60000 has standard deviation about 10000
    v = mu + ((s - 60000) * sigma) / 10000;
    return (v < 1) ? 1 : v;
  endfunction

  initial begin
    mode = dc_pkg::MODE_THRESHOLD;
    a0 = '0; theta = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    $display("N_avg for theta = %0d*n          sigma:  30    50    70    90   110   130   150", MU);
    for (int n = 6; n <= N; n += 2) begin
      string line;
      line = $sformatf("n = %2d                                 ", n);
      for (int sigma = 30; sigma <= 150; sigma += 20) begin
        int total_cuts;
        total_cuts = 0;
        for (int t = 0; t < TRIALS; t++) begin
          u64_t a[$];
          ref_res_t r;
          a.delete();
          for (int i = 0; i < N; i++) begin
            a0[i] = (i < n) ? 16'(gauss(MU, sigma)) : 16'h0;
            a.push_back(u64_t'(a0[i]));
          end
          theta = 21'(MU * n);
          r = dc_ref(a, u64_t'(theta), 1'b0);
          @(negedge clk); start = 1;
          @(negedge clk); start = 0;
          while (!done) @(negedge clk);
          checks += 3;
          if (y != r.y || int'(n_cycles) != r.n_cycles) begin
            failures++;
            $display("FAIL n=%0d sigma=%0d y=%b/%b cuts=%0d/%0d", n, sigma, y, r.y, n_cycles, r.n_cycles);
          end
          if (int'(n_cycles) > n) begin
            failures++;
            $display("FAIL more than n cuts");
          end
          if (n_cycles == 0) begin
            failures++;
            $display("FAIL zero cuts");
          end
          total_cuts += int'(n_cycles);
        end
        line = {line, $sformatf("%6.2f", real'(total_cuts) / TRIALS)};
      end
      $display("%s", line);
    end
    // Part 2: equal operands. Full runs check the cut count against
    // n - sum_r (m_r - 1), where m_r is the multiplicity of the r-th repeated
    // value; threshold runs compare arrays rounded to multiples of STEP
    // (many ties) with the same arrays unrounded.
    begin
      int cuts_plain, cuts_tied;
      cuts_plain = 0;
      cuts_tied = 0;
      for (int t = 0; t < 2 * TRIALS; t++) begin
        int base[N];
        for (int i = 0; i < N; i++) base[i] = gauss(MU, 90);
        for (int pass = 0; pass < 3; pass++) begin
          u64_t a[$];
          ref_res_t r;
          int expect_cuts;
          a.delete();
          for (int i = 0; i < N; i++) begin
            a0[i] = (pass == 0) ? 16'(base[i]) : 16'(((base[i] + STEP / 2) / STEP) * STEP);
            a.push_back(u64_t'(a0[i]));
          end
          // n - sum over repeated values of (multiplicity - 1)
          expect_cuts = N;
          for (int i = 0; i < N; i++) begin
            for (int k = 0; k < i; k++) begin
              if (a0[k] == a0[i]) begin
                expect_cuts--;
                break;
              end
            end
          end
          theta = 21'(MU * N);
          mode = (pass == 2) ? dc_pkg::MODE_FULL : dc_pkg::MODE_THRESHOLD;
          r = dc_ref(a, u64_t'(theta), pass == 2);
          @(negedge clk); start = 1;
          @(negedge clk); start = 0;
          while (!done) @(negedge clk);
          checks++;
          if (y != r.y || int'(n_cycles) != r.n_cycles) begin
            failures++;
            $display("FAIL ties pass=%0d y=%b/%b cuts=%0d/%0d", pass, y, r.y, n_cycles, r.n_cycles);
          end
          if (pass == 2) begin
            checks++;
            if (int'(n_cycles) != expect_cuts) begin
              failures++;
              $display("FAIL full run cuts=%0d, n - sum(m_r - 1) = %0d", n_cycles, expect_cuts);
            end
          end
          else if (pass == 0) cuts_plain += int'(n_cycles);
          else cuts_tied += int'(n_cycles);
        end
      end
      $display("n = %0d, sigma = 90, threshold runs: N_avg %0.2f unrounded, %0.2f rounded to multiples of %0d (%0.1f%% fewer cuts)",
               N, real'(cuts_plain) / (2 * TRIALS), real'(cuts_tied) / (2 * TRIALS), STEP,
               100.0 * real'(cuts_plain - cuts_tied) / real'(cuts_plain));
      checks++;
      if (cuts_tied >= cuts_plain) begin
        failures++;
        $display("FAIL equal operands did not reduce the number of cuts");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
