// dc_cell: one element of the difference cut.
//
// The cell holds a_{i,j}. While it is still above zero (f = 1) it takes part
// in a cut: on an edge with step high it subtracts the broadcast minimum q_j
// and adds q_j to its restore register, so that when it reaches zero the
// restore register holds the original a_{i,0}. Once zero it drops out
// (f = 0) and ignores further steps. 'zeroing' flags, combinationally, that
// this cut brings the element to zero (a == q); several equal elements reach
// zero in the same cut. load (which wins over step) loads a_in and clears the
// restore register. The subtraction and the sign bit follow the document's
// cut recursion a_{i,j} = a_{i,j-1} - q_j and sign f_{i,j}; keeping a flag
// instead of letting the value go negative is this design's choice. The
// caller must only step with q no larger than a of any active cell.
module dc_cell #(
  parameter int unsigned AW = dc_pkg::AW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] a_in,
  input  logic          step,
  input  logic [AW-1:0] q,
  output logic [AW-1:0] a,
  output logic          f,
  output logic          zeroing,
  output logic [AW-1:0] restored
);

  assign f       = (a != '0);
  assign zeroing = f && (a == q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a        <= '0;
      restored <= '0;
    end else if (load) begin
      a        <= a_in;
      restored <= '0;
    end else if (step && f) begin
      a        <= a - q;
      restored <= restored + q;
    end
  end

endmodule
