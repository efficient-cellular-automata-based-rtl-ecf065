// pca_core: the extended programmable cellular automaton that holds the
// product C(x), with K levels of cells cascaded between its flip-flops.
//
// The state is M D flip-flops, one per coefficient of C. In one clock cycle
// with step = 1 the state passes through K pca_row levels; level l uses the A
// bit a_bits[K-1-l], so a_bits[K-1] is the most significant of the K bits
// consumed in that cycle. With K = 1 this is the serial multiplier (M cells,
// M cycles per product); with 1 < K < M it is the improved multiplier
// (K*M cells, ceil(M/K) cycles); with K = M it is the optimal parallel
// multiplier (M*M cells, one cycle). All three structures come from the
// published architecture; the synchronous clear and the step enable are this
// design's choice for "reset PCA" and "run PCA".
//
// Timing: clear has priority over step; both act at the rising clock edge.
// The state c is a registered output. Active-low synchronous reset clears c.
module pca_core #(
  parameter int unsigned M = 6,  // field degree m
  parameter int unsigned K = 1   // cascaded levels of cells per clock cycle
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,   // synchronous reset of the PCA state to 0
  input  logic         step,    // advance the PCA by K iterations
  input  logic [K-1:0] a_bits,  // K bits of A for this step, MSB first at [K-1]
  input  logic [M-1:0] b,       // B(x) coefficients (cm controls)
  input  logic [M-1:0] p,       // P(x) coefficients below x^M (cr controls)
  output logic [M-1:0] c        // C(x), the PCA state
);

  // lvl[0] is the flip-flop output, lvl[l+1] the output of level l.
  logic [M-1:0] lvl [K+1];

  assign lvl[0] = c;

  for (genvar l = 0; l < K; l++) begin : g_level
    pca_row #(.M(M)) u_row (
      .c_in  (lvl[l]),
      .a_bit (a_bits[K-1-l]),
      .b     (b),
      .p     (p),
      .c_out (lvl[l+1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c <= '0;
    end else if (clear) begin
      c <= '0;
    end else if (step) begin
      c <= lvl[K];
    end
  end

endmodule
