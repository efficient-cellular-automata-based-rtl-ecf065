// pca_core_check: drives one pca_core instance with random A, B, P and checks
// the state after every step against the reference. After s steps of K bits
// the state must equal (A_top * B) mod P, where A_top is the s*K most
// significant bits of A padded with leading zeros to a multiple of K bits
// (the partial result C^i of the MSB-first algorithm). Also checks that the
// state holds while step is low and that clear returns it to 0.
module pca_core_check #(
  parameter int unsigned M   = 6,
  parameter int unsigned K   = 1,
  parameter int unsigned OPS = 50
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import gf2m_ref_pkg::*;
  localparam int unsigned N  = (M + K - 1) / K;
  localparam int unsigned AW = N * K;

  logic         clear, step;
  logic [K-1:0] a_bits;
  logic [M-1:0] b, p, c;
  logic [AW-1:0] a_pad;

  pca_core #(.M(M), .K(K)) dut (.clk, .rst_n, .clear, .step, .a_bits, .b, .p, .c);

  initial begin
    wide_t a_w, b_w, p_w, exp;
    logic [M-1:0] held;
    checks = 0; failures = 0; finished = 1'b0;
    clear = 1'b0; step = 1'b0; a_bits = '0; b = '0; p = '0;
    @(posedge rst_n);
    for (int op = 0; op < OPS; op++) begin
      a_w = rand_bits(M); b_w = rand_bits(M); p_w = rand_bits(M);
      if (op == 0) begin
        // Worked example: B = x^5 + x + 1, P = x^6 + x^5 + x^4 + x^3 + 1
        // when M = 6, else all-ones operands.
        b_w = (M == 6) ? wide_t'(6'b100011) : ~wide_t'(0) >> (REF_W - M);
        p_w = (M == 6) ? wide_t'(6'b111001) : wide_t'(1);
      end
      a_pad = AW'(a_w[M-1:0]);
      b = b_w[M-1:0]; p = p_w[M-1:0];
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      checks++;
      if (c !== '0) begin failures++; $display("FAIL M=%0d K=%0d clear", M, K); end
      for (int s = 1; s <= int'(N); s++) begin
        a_bits = a_pad[AW-1 -: K];
        a_pad  = a_pad << K;
        step = 1'b1;
        @(negedge clk); step = 1'b0;
        exp = gf_mul(a_w >> (AW - s * K), b_w, p_w, M);
        checks++;
        if (c !== exp[M-1:0]) begin
          failures++;
          $display("FAIL M=%0d K=%0d step %0d got %h exp %h", M, K, s, c, exp[M-1:0]);
        end
        // Hold: a cycle with step low must not change the state.
        held = c;
        a_bits = K'($urandom);
        @(negedge clk);
        checks++;
        if (c !== held) begin failures++; $display("FAIL M=%0d K=%0d hold", M, K); end
      end
    end
    finished = 1'b1;
  end
endmodule
