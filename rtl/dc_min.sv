// dc_min: minimum of the enabled elements of a cut (q_j).
//
// A balanced binary tree of compare-select nodes reduces the N elements to
// the smallest one among those whose en bit is set. A disabled element enters
// the tree as "no value" and never wins. 'any' tells whether at least one
// element was enabled; q is 0 when none is. Purely combinational. The
// document defines q_j as the minimum of the previous cut; the tree is this
// design's structure.
module dc_min #(
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned AW = dc_pkg::AW_DEF
) (
  input  logic [N-1:0][AW-1:0] a,
  input  logic [N-1:0]         en,
  output logic [AW-1:0]        q,
  output logic                 any
);

  // Tree nodes stored heap-style: node k has children 2k+1 and 2k+2;
  // leaves occupy indices P-1 .. 2P-2 where P is N rounded up to a power of 2.
  localparam int unsigned P = (N <= 1) ? 1 : (1 << $clog2(N));

  logic [2*P-2:0][AW-1:0] val;
  logic [2*P-2:0]         vld;

  always_comb begin
    val = '0;
    vld = '0;
    for (int k = 0; k < int'(P); k++) begin
      if (k < int'(N)) begin
        val[P-1+k] = a[k];
        vld[P-1+k] = en[k];
      end
    end
    for (int k = int'(P) - 2; k >= 0; k--) begin
      if (vld[2*k+1] && (!vld[2*k+2] || val[2*k+1] <= val[2*k+2])) begin
        val[k] = val[2*k+1];
        vld[k] = 1'b1;
      end else begin
        val[k] = val[2*k+2];
        vld[k] = vld[2*k+2];
      end
    end
  end

  assign q   = vld[0] ? val[0] : '0;
  assign any = vld[0];

endmodule
