// dc_thresh: partial-sum and threshold stage of the difference-cut processor.
//
// For each cut handed over (valid high) it forms the partial sum
// S_j = q_j * b_j, adds it to the running sum S and subtracts it from the
// running threshold difference Delta (Delta_0 = theta). 'fire' is the
// combinational result of the firing test Delta_{j-1} - S_j <= 0 for the cut
// now on the inputs; 'reached' is the same test on the registered Delta, so
// it also covers theta = 0 before any cut. init (which wins over valid)
// loads Delta with theta and clears S. The formulas follow the document;
// the signed Delta one bit wider than S is this design's choice. S is
// SW = AW + clog2(N+1) bits, enough for N elements of AW bits.
module dc_thresh #(
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned AW = dc_pkg::AW_DEF,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned SW = AW + CW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic [SW-1:0]        theta,
  input  logic                 valid,
  input  logic [AW-1:0]        q,
  input  logic [CW-1:0]        b,
  output logic [SW-1:0]        sum,
  output logic signed [SW:0]   delta,
  output logic                 fire,
  output logic                 reached
);

  logic [SW-1:0]      s_j;
  logic signed [SW:0] delta_next;

  assign s_j        = SW'(q) * SW'(b);
  assign delta_next = delta - $signed({1'b0, s_j});
  assign fire       = valid && (delta_next <= 0);
  assign reached    = (delta <= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum   <= '0;
      delta <= '0;
    end else if (init) begin
      sum   <= '0;
      delta <= $signed({1'b0, theta});
    end else if (valid) begin
      sum   <= sum + s_j;
      delta <= delta_next;
    end
  end

endmodule
