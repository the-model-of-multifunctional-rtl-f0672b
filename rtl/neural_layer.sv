// neural_layer: a fragment of a single-layer perceptron built from
// difference-cut neural elements (the top of this design).
//
// M neural elements share the input vector x, the threshold theta and the
// mode; element i has its own weight row w[i] and computes
// y[i] = (sum_j w[i][j] x[j] >= theta). All elements start together on a
// start pulse but finish independently: a neuron whose weighted sum passes
// theta early stops early, so each done[i] pulses after its own number of
// cuts n_cycles[i] (done[i] rises n_cycles[i]+2 edges after the start edge).
// all_done is high once every element holds a valid result. In MODE_FULL
// every element also delivers its full sum, its sorted products and its
// restored products. One common theta follows the document's activation
// formula; M = 4 and the word widths are this design's choices.
module neural_layer #(
  parameter int unsigned M  = 4,
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned XW = dc_pkg::XW_DEF,
  parameter int unsigned WW = dc_pkg::WW_DEF,
  localparam int unsigned AW = XW + WW,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned SW = AW + CW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  dc_pkg::dc_mode_e              mode,
  input  logic [N-1:0][XW-1:0]          x,
  input  logic [M-1:0][N-1:0][WW-1:0]   w,
  input  logic [SW-1:0]                 theta,
  output logic [M-1:0]                  busy,
  output logic [M-1:0]                  done,
  output logic [M-1:0]                  valid,
  output logic [M-1:0]                  y,
  output logic                          all_done,
  output logic [M-1:0][SW-1:0]          sum,
  output logic [M-1:0][CW-1:0]          n_cycles,
  output logic [M-1:0][N-1:0][AW-1:0]   sorted,
  output logic [M-1:0][N-1:0][AW-1:0]   restored
);

  for (genvar i = 0; i < int'(M); i++) begin : g_neuron
    neural_element #(.N(N), .XW(XW), .WW(WW)) u_ne (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start),
      .x        (x),
      .w        (w[i]),
      .theta    (theta),
      .mode     (mode),
      .busy     (busy[i]),
      .done     (done[i]),
      .valid    (valid[i]),
      .y        (y[i]),
      .sum      (sum[i]),
      .n_cycles (n_cycles[i]),
      .sorted   (sorted[i]),
      .restored (restored[i])
    );
  end

  assign all_done = &valid;

endmodule
