// mult_line: the multiplier line of the neural element.
//
// N unsigned multipliers form the pair products p_i = w_i * x_i that become
// the elements a_{i,0} of the first difference cut. The products are captured
// in a register when en is high, so they are available one clock edge after
// en; otherwise the register holds. Operands are unsigned and the product is
// exact (XW+WW bits). The document names the multiplier line as a basic
// component and gives a_{i,0} = w_ij * x_j; the register stage, the widths and
// unsigned operands are this design's choices.
module mult_line #(
  parameter int unsigned N  = dc_pkg::N_DEF,
  parameter int unsigned XW = dc_pkg::XW_DEF,
  parameter int unsigned WW = dc_pkg::WW_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [N-1:0][XW-1:0]  x,
  input  logic [N-1:0][WW-1:0]  w,
  output logic [N-1:0][XW+WW-1:0] p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0;
    end else if (en) begin
      for (int i = 0; i < int'(N); i++) begin
        p[i] <= (XW+WW)'(x[i]) * (XW+WW)'(w[i]);
      end
    end
  end

endmodule
