// dc_count: ones counter giving b_j, the number of elements of a cut that
// still take part (the sum of the sign bits f_{i,j}).
//
// Purely combinational; the count is clog2(N+1) bits wide. The document
// defines b_j as this sum; the adder chain is this design's structure.
module dc_count #(
  parameter int unsigned N = dc_pkg::N_DEF,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  v,
  output logic [CW-1:0] cnt
);

  always_comb begin
    cnt = '0;
    for (int i = 0; i < int'(N); i++) begin
      cnt = cnt + CW'(v[i]);
    end
  end

endmodule
