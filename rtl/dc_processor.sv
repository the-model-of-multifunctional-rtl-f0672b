// dc_processor: parallel-pipeline difference-cut (DC) processor.
//
// Function. Given the first cut A_0 = {a_1..a_N} (unsigned) and a threshold
// theta, each processing cycle j finds the minimum q_j of the elements still
// above zero, counts them (b_j) and subtracts q_j from each of them; at least
// one element, and every element equal to q_j, reaches zero. One cycle later
// the partial sum S_j = q_j*b_j is added to S and subtracted from
// Delta (Delta_0 = theta). Since S_1+...+S_N equals the sum of A_0, the
// neuron fires (y = 1) as soon as Delta_j <= 0, often long before all cuts
// are done; the number of cycles is at most the number of distinct non-zero
// values. The same q_j also give, for free, the array sorted in ascending
// order (an element that reaches zero in cycle j had the value
// q_1+...+q_j) and the restored A_0 (each cell adds up the q_j it saw).
//
// Structure. N dc_cell elements share q_j from a dc_min tree; dc_count units
// give b_j and the number of elements reaching zero; dc_thresh is the second
// pipeline stage. Stage 1 of cut j+1 overlaps stage 2 of cut j.
//
// Interface and timing. A start pulse (accepted at any time, restarting a run)
// loads a0, theta and mode on its clock edge. busy is high until the run
// ends. done pulses for one cycle on the edge that ends the run, n_cycles+1
// edges after the start edge, where n_cycles is the number of cuts used.
// y, n_cycles, sum, sorted and restored are then held, with valid high,
// until the next start.
//   MODE_THRESHOLD: the run ends at the first cut with Delta_j <= 0, or when
//                   all elements are zero. sum, sorted and restored are then
//                   only complete if the run went to the end.
//   MODE_FULL:      every cut is processed; sum = S, y = (S >= theta).
// The recursion, the partial sums, the firing test and the three uses of
// q_j follow the document. The broadcast of q_j to all cells (rather than a
// systolic chain, whose structure the document does not give), the two
// modes, the handshake and the widths are this design's choices.
module dc_processor #(
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned AW = dc_pkg::AW_DEF,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned SW = AW + CW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0][AW-1:0]  a0,
  input  logic [SW-1:0]         theta,
  input  dc_pkg::dc_mode_e      mode,
  output logic                  busy,
  output logic                  done,
  output logic                  valid,
  output logic                  y,
  output logic [SW-1:0]         sum,
  output logic [CW-1:0]         n_cycles,
  output logic [N-1:0][AW-1:0]  sorted,
  output logic [N-1:0][AW-1:0]  restored
);

  import dc_pkg::*;

  // ---------------- stage 1: the cut ----------------
  logic [N-1:0][AW-1:0] a;
  logic [N-1:0]         f;
  logic [N-1:0]         zeroing;
  logic [AW-1:0]        q;
  logic                 any;
  logic [CW-1:0]        b;
  logic [CW-1:0]        z;
  logic [CW-1:0]        z0;
  logic                 step;

  for (genvar i = 0; i < int'(N); i++) begin : g_cell
    dc_cell #(.AW(AW)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (start),
      .a_in     (a0[i]),
      .step     (step),
      .q        (q),
      .a        (a[i]),
      .f        (f[i]),
      .zeroing  (zeroing[i]),
      .restored (restored[i])
    );
  end

  dc_min   #(.N(N), .AW(AW)) u_min   (.a(a), .en(f), .q(q), .any(any));
  dc_count #(.N(N))          u_cnt_b (.v(f), .cnt(b));
  dc_count #(.N(N))          u_cnt_z (.v(zeroing), .cnt(z));

  // Elements of A_0 that are already zero go to the front of the sorted array.
  logic [N-1:0] a0_zero;
  always_comb begin
    for (int i = 0; i < int'(N); i++) a0_zero[i] = (a0[i] == '0);
  end
  dc_count #(.N(N))          u_cnt_0 (.v(a0_zero), .cnt(z0));

  // ---------------- stage 2: partial sum and threshold ----------------
  logic                 st2_valid;
  logic [AW-1:0]        q_r;
  logic [CW-1:0]        b_r;
  logic                 fire;
  logic                 reached;
  dc_mode_e             mode_r;

  dc_thresh #(.N(N), .AW(AW)) u_thr (
    .clk     (clk),
    .rst_n   (rst_n),
    .init    (start),
    .theta   (theta),
    .valid   (st2_valid && !start),
    .q       (q_r),
    .b       (b_r),
    .sum     (sum),
    .delta   (),
    .fire    (fire),
    .reached (reached)
  );

  // ---------------- control ----------------
  logic fire_stop;   // threshold mode: this edge's stage-2 cut fires
  logic last_cut;    // stage 2 holds the final cut
  logic empty;       // nothing left at all (A_0 was all zero)
  logic finish;

  assign fire_stop = st2_valid && fire && (mode_r == MODE_THRESHOLD);
  assign last_cut  = st2_valid && !any;
  assign empty     = !st2_valid && !any;
  assign finish    = busy && !start && (fire_stop || last_cut || empty);
  assign step      = busy && !start && any && !fire_stop;

  // Sorted-array bookkeeping: Q = q_1+...+q_j, placed = elements already placed.
  logic [AW-1:0] q_cum;
  logic [CW-1:0] placed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      valid     <= 1'b0;
      y         <= 1'b0;
      n_cycles  <= '0;
      st2_valid <= 1'b0;
      q_r       <= '0;
      b_r       <= '0;
      mode_r    <= MODE_THRESHOLD;
      q_cum     <= '0;
      placed    <= '0;
      sorted    <= '0;
    end else if (start) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      valid     <= 1'b0;
      y         <= 1'b0;
      n_cycles  <= '0;
      st2_valid <= 1'b0;
      mode_r    <= mode;
      q_cum     <= '0;
      placed    <= z0;
      sorted    <= '0;
    end else begin
      done      <= finish;
      st2_valid <= step;
      q_r       <= q;
      b_r       <= b;
      if (finish) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        y     <= empty ? reached : fire;
      end
      if (step) begin
        n_cycles <= n_cycles + 1'b1;
        q_cum    <= q_cum + q;
        placed   <= placed + z;
        for (int k = 0; k < int'(N); k++) begin
          if (k >= int'(placed) && k < int'(placed) + int'(z)) begin
            sorted[k] <= q_cum + q;
          end
        end
      end
    end
  end

  // Handshake rules: done is a single-cycle pulse that comes with valid
  // results and the end of busy; valid and busy are never high together.
  a_done_valid : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (valid && !busy));
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);
  a_valid_busy : assert property (@(posedge clk) disable iff (!rst_n)
    !(valid && busy));

  // A cut is only taken while some element is above zero, and at least one
  // element reaches zero in it.
  a_step_has_work : assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (any && z != '0));

endmodule
