// pca_mult_check: drives one pca_mult instance through OPS multiplications
// and checks each product against the reference and the number of clock
// cycles from the accepted start to done, which must be ceil(M/K). It also
// changes the field polynomial P between operations, tries a start while the
// multiplier is busy (it must be ignored) and changes the operand inputs while
// busy (the captured operands must be used). Operation 0 is the published
// worked example when M = 6: B = x^5 + x + 1, P = x^6 + x^5 + x^4 + x^3 + 1.
module pca_mult_check #(
  parameter int unsigned M   = 6,
  parameter int unsigned K   = 1,
  parameter int unsigned OPS = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   busy_starts,  // starts issued while busy
  output int   poly_changes, // operations whose P differs from the previous
  output logic finished
);
  import gf2m_ref_pkg::*;
  localparam int unsigned N = (M + K - 1) / K;

  logic         start, busy, done;
  logic [M-1:0] a, b, p, c;

  pca_mult #(.M(M), .K(K)) dut (.clk, .rst_n, .start, .a, .b, .p, .busy, .done, .c);

  initial begin
    wide_t a_w, b_w, p_w, exp, p_prev;
    int cycles;
    checks = 0; failures = 0; busy_starts = 0; poly_changes = 0; finished = 1'b0;
    start = 1'b0; a = '0; b = '0; p = '0;
    p_prev = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int op = 0; op < int'(OPS); op++) begin
      a_w = rand_bits(M); b_w = rand_bits(M); p_w = rand_bits(M);
      if (op == 0 && M == 6) begin
        b_w = wide_t'(6'b100011);
        p_w = wide_t'(6'b111001);
      end
      if (op % 7 == 3) p_w = p_prev;           // sometimes keep the same field
      if (op % 11 == 5) a_w = ~wide_t'(0) >> (REF_W - M);
      if (op > 0 && p_w != p_prev) poly_changes++;
      p_prev = p_w;
      a = a_w[M-1:0]; b = b_w[M-1:0]; p = p_w[M-1:0];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // Scramble the inputs: the multiplier must work on what it captured.
      a = M'($urandom); b = M'($urandom); p = M'($urandom);
      cycles = 0;
      while (!done) begin
        cycles++;
        if (cycles == 1 && busy && (op % 3 == 1)) begin
          start = 1'b1;                        // must be ignored
          busy_starts++;
        end
        @(negedge clk);
        start = 1'b0;
        if (cycles > int'(N) + 4) break;
      end
      exp = gf_mul(a_w, b_w, p_w, M);
      checks++;
      if (cycles != int'(N)) begin
        failures++;
        $display("FAIL M=%0d K=%0d op %0d latency %0d exp %0d", M, K, op, cycles, N);
      end
      checks++;
      if (c !== exp[M-1:0]) begin
        failures++;
        $display("FAIL M=%0d K=%0d op %0d a=%h b=%h p=%h got %h exp %h",
                 M, K, op, a_w[M-1:0], b_w[M-1:0], p_w[M-1:0], c, exp[M-1:0]);
      end
      // Result held while idle.
      @(negedge clk);
      checks++;
      if (c !== exp[M-1:0] || busy || done) begin
        failures++;
        $display("FAIL M=%0d K=%0d op %0d result not held", M, K, op);
      end
    end
    finished = 1'b1;
  end
endmodule
