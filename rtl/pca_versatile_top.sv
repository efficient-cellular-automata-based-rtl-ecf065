// pca_versatile_top: the three cellular-automaton GF(2^M) multipliers side by
// side, sharing the operand inputs.
//
//   serial   : K = 1,          M cells,        M clock cycles per product
//   improved : K = K_IMPROVED, K*M cells,      ceil(M/K) clock cycles
//   parallel : K = M,          M*M cells,      1 clock cycle
//
// Each variant has its own start, busy, done and result so they can be used
// independently; all take A, B and the field polynomial P from the shared
// inputs at the moment their start is accepted. The three variants and their
// cycle counts are the published ones; the field degree default M = 6 is the
// published worked example, and K_IMPROVED = 4 is this design's choice (the
// published k depends on clock and gate delays: floor((t_s - t_d) / t_x)).
module pca_versatile_top #(
  parameter int unsigned M          = 6,
  parameter int unsigned K_IMPROVED = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic [M-1:0] p,
  // serial multiplier
  input  logic         ser_start,
  output logic         ser_busy,
  output logic         ser_done,
  output logic [M-1:0] ser_c,
  // improved multiplier
  input  logic         imp_start,
  output logic         imp_busy,
  output logic         imp_done,
  output logic [M-1:0] imp_c,
  // optimal parallel multiplier
  input  logic         par_start,
  output logic         par_busy,
  output logic         par_done,
  output logic [M-1:0] par_c
);

  pca_mult #(.M(M), .K(1)) u_serial (
    .clk, .rst_n, .start(ser_start), .a, .b, .p,
    .busy(ser_busy), .done(ser_done), .c(ser_c)
  );

  pca_mult #(.M(M), .K(K_IMPROVED)) u_improved (
    .clk, .rst_n, .start(imp_start), .a, .b, .p,
    .busy(imp_busy), .done(imp_done), .c(imp_c)
  );

  pca_mult #(.M(M), .K(M)) u_parallel (
    .clk, .rst_n, .start(par_start), .a, .b, .p,
    .busy(par_busy), .done(par_done), .c(par_c)
  );

endmodule
