// pca_row: one level of M extended PCA cells.
//
// Computes one iteration of the MSB-first modular multiplication
//   C^i = (C^{i-1} * x + a * B) mod P
// bit by bit as c_j^i = c_{m-1}^{i-1} p_j ^ c_{j-1}^{i-1} ^ a b_j, with
// c_{-1} = 0. Cell j takes its left neighbour from c_in[j-1], the shared
// boundary bit a_bit and the shared rightmost bit c_in[M-1]; its cm control is
// b[j] and its cr control p[j], while cl is tied to 1. The row is purely
// combinational: the serial multiplier closes it through M flip-flops, the
// faster variants cascade several rows between the flip-flops. The cell
// connections and control assignment follow the published array; the
// requirement M >= 2 comes from how the left-neighbour vector is formed.
//
// p holds the low M coefficients of the monic field polynomial
// P(x) = x^M + p_{M-1}x^{M-1} + ... + p_0; the x^M term is implicit.
module pca_row #(
  parameter int unsigned M = 6
) (
  input  logic [M-1:0] c_in,   // C^{i-1}, bit j = coefficient of x^j
  input  logic         a_bit,  // a_{m-1-i}, the A bit for this iteration
  input  logic [M-1:0] b,      // B(x) coefficients, drive the cm controls
  input  logic [M-1:0] p,      // P(x) coefficients below x^M, drive the cr controls
  output logic [M-1:0] c_out   // C^i
);

  // Nearest-left neighbour of each cell; the leftmost cell sees a constant 0.
  logic [M-1:0] left_nb;
  always_comb begin
    left_nb = {c_in[M-2:0], 1'b0};
  end

  for (genvar j = 0; j < M; j++) begin : g_cell
    ext_pca_cell u_cell (
      .cl      (1'b1),
      .cm      (b[j]),
      .cr      (p[j]),
      .x_left  (left_nb[j]),
      .x_bound (a_bit),
      .x_rmost (c_in[M-1]),
      .x_next  (c_out[j])
    );
  end

endmodule
