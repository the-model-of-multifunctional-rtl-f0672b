// neural_element: one threshold neuron working by difference cuts.
//
// The multiplier line forms the products a_{i,0} = w_i * x_i, which are
// registered on the start edge; one edge later the difference-cut processor
// is started on them. The neuron output is y = 1 when sum_i w_i x_i >= theta,
// obtained, in MODE_THRESHOLD, as soon as the running partial sums reach
// theta. done pulses n_cycles+2 edges after the start edge (one for the
// products, n_cycles cuts, one for the threshold stage). Results stay valid
// until the next start. The chain multiplier line -> cut processor ->
// threshold test is the document's; the extra register stage is this
// design's choice.
module neural_element #(
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned XW = dc_pkg::XW_DEF,
  parameter int unsigned WW = dc_pkg::WW_DEF,
  localparam int unsigned AW = XW + WW,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned SW = AW + CW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0][XW-1:0]  x,
  input  logic [N-1:0][WW-1:0]  w,
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

  logic [N-1:0][AW-1:0] p;
  logic                 start_d;
  logic [SW-1:0]        theta_d;
  dc_pkg::dc_mode_e     mode_d;
  logic                 dc_busy;
  logic                 dc_valid;

  mult_line #(.N(N), .XW(XW), .WW(WW)) u_mul (
    .clk (clk), .rst_n (rst_n), .en (start), .x (x), .w (w), .p (p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_d <= 1'b0;
      theta_d <= '0;
      mode_d  <= dc_pkg::MODE_THRESHOLD;
    end else begin
      start_d <= start;
      if (start) begin
        theta_d <= theta;
        mode_d  <= mode;
      end
    end
  end

  dc_processor #(.N(N), .AW(AW)) u_dc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start_d),
    .a0       (p),
    .theta    (theta_d),
    .mode     (mode_d),
    .busy     (dc_busy),
    .done     (done),
    .valid    (dc_valid),
    .y        (y),
    .sum      (sum),
    .n_cycles (n_cycles),
    .sorted   (sorted),
    .restored (restored)
  );

  assign busy  = start_d || dc_busy;
  assign valid = dc_valid && !start_d;

endmodule
