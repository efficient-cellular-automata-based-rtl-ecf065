// pca_mult: versatile GF(2^M) multiplier C = A*B mod P built around the
// extended programmable cellular automaton (pca_core) with K cell levels.
//
// Operation (one multiplication):
//   1. When idle, a start pulse captures A, B and P. B and P become the cm
//      and cr control words of every cell, A goes into a shift register padded
//      with leading zeros to a multiple of K bits, and the PCA state is
//      cleared. Leading zeros leave the state at 0, so the padding does not
//      change the product.
//   2. The PCA then runs ceil(M/K) clock cycles, each consuming the next K
//      bits of A, most significant first.
//   3. done pulses for one cycle in the cycle after the last step; from then
//      on c holds A*B mod P until the next start.
// Timing: start sampled at edge 0 -> steps at edges 1..N -> done is high in
// the cycle after edge N, where N = ceil(M/K). busy is high from edge 0 to
// edge N. A start while busy is ignored. Because P is a register loaded with
// each operation, the field polynomial can change between multiplications;
// it must be monic of degree M, given as its M low coefficients. rst_n is an
// active-low synchronous reset of every register.
//
// The PCA array, its control assignment (cl = 1, cm = b_j, cr = p_j) and the
// cycle counts follow the published design. The operand registers, the start /
// busy / done handshake and the zero padding of A are this design's choices.
module pca_mult
  import pca_pkg::*;
#(
  parameter int unsigned M = 6,  // field degree m
  parameter int unsigned K = 1   // cell levels per cycle: 1 serial, M parallel
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,  // begin a multiplication (ignored while busy)
  input  logic [M-1:0] a,      // multiplier A(x)
  input  logic [M-1:0] b,      // multiplicand B(x)
  input  logic [M-1:0] p,      // P(x) = x^M + sum p_j x^j, low M coefficients
  output logic         busy,   // PCA running
  output logic         done,   // one-cycle pulse: c holds the new product
  output logic [M-1:0] c       // product A*B mod P
);

  localparam int unsigned N  = pca_steps(M, K);  // clock cycles per product
  localparam int unsigned AW = N * K;            // padded width of A
  localparam int unsigned CW = $clog2(N + 1);    // step counter width

  pca_state_e      state;
  logic [AW-1:0]   a_sr;    // A, MSB-aligned, shifted left K bits per step
  logic [M-1:0]    b_r;     // cm control word
  logic [M-1:0]    p_r;     // cr control word
  logic [CW-1:0]   left_q;  // steps still to run
  logic            accept;
  logic            run_step;

  assign accept   = start && (state == PCA_IDLE);
  assign run_step = (state == PCA_RUN);
  assign busy     = (state == PCA_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= PCA_IDLE;
      a_sr   <= '0;
      b_r    <= '0;
      p_r    <= '0;
      left_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        state  <= PCA_RUN;
        a_sr   <= AW'(a);
        b_r    <= b;
        p_r    <= p;
        left_q <= CW'(N);
      end else if (run_step) begin
        a_sr   <= a_sr << K;
        left_q <= left_q - 1'b1;
        if (left_q == CW'(1)) begin
          state <= PCA_IDLE;
          done  <= 1'b1;
        end
      end
    end
  end

  pca_core #(.M(M), .K(K)) u_core (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (accept),
    .step   (run_step),
    .a_bits (a_sr[AW-1 -: K]),
    .b      (b_r),
    .p      (p_r),
    .c      (c)
  );

  // A multiplication always takes exactly N steps after it is accepted: the
  // start is taken at one edge, the N steps follow at the next N edges, and
  // done, registered at the last of them, is seen at the edge after.
  property p_latency;
    @(posedge clk) disable iff (!rst_n) accept |-> ##(N + 1) done;
  endproperty
  a_latency : assert property (p_latency);

  // done is only raised as a run finishes.
  a_done_after_run : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> $past(busy));

endmodule
