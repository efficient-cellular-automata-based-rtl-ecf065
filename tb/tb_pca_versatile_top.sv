// tb_pca_versatile_top: end-to-end test of the top at its default parameters
// (M = 6, K_IMPROVED = 4). Each round
//   1. starts all three multipliers together on the same A, B, P and checks
//      each product and latency (serial M cycles, improved ceil(M/K), parallel
//      one cycle); the first round uses the published worked example
//      B = x^5 + x + 1, P = x^6 + x^5 + x^4 + x^3 + 1;
//   2. starts the serial multiplier, then while it runs starts the parallel
//      one on new operands in a different field and pulses the serial start
//      again (it must be ignored); both results are checked.
// Counted mechanisms, each of which must occur: products from each variant,
// a change of field polynomial, a start ignored while busy, a run of the
// improved multiplier with zero-padded A (M not a multiple of K), and two
// variants working in different fields at the same time.
module tb_pca_versatile_top;
  import gf2m_ref_pkg::*;
  localparam int unsigned M  = 6;
  localparam int unsigned KI = 4;
  localparam int ROUNDS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] a, b, p;
  logic ser_start, imp_start, par_start;
  logic ser_busy, imp_busy, par_busy, ser_done, imp_done, par_done;
  logic [M-1:0] ser_c, imp_c, par_c;

  int checks = 0, failures = 0;
  int n_ser = 0, n_imp = 0, n_par = 0, n_field_change = 0, n_busy_ignored = 0;
  int n_padded = 0, n_two_fields = 0;
  int cyc = 0;
  int t_ser, t_imp, t_par;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pca_versatile_top dut (
    .clk, .rst_n, .a, .b, .p,
    .ser_start, .ser_busy, .ser_done, .ser_c,
    .imp_start, .imp_busy, .imp_done, .imp_c,
    .par_start, .par_busy, .par_done, .par_c
  );

  // Record the cycle in which each done is seen.
  always @(negedge clk) begin
    if (ser_done) begin t_ser = cyc; n_ser++; end
    if (imp_done) begin t_imp = cyc; n_imp++; end
    if (par_done) begin t_par = cyc; n_par++; end
  end

  task automatic expect_eq(input string what, input logic [M-1:0] got, input logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  task automatic expect_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    wide_t a1, b1, p1, a2, b2, p2, e1, e2, p_last;
    int t0;
    ser_start = 0; imp_start = 0; par_start = 0; a = '0; b = '0; p = '0;
    p_last = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      a1 = rand_bits(M); b1 = rand_bits(M); p1 = rand_bits(M);
      if (r == 0) begin b1 = wide_t'(6'b100011); p1 = wide_t'(6'b111001); end
      if (r > 0 && p1 != p_last) n_field_change++;
      e1 = gf_mul(a1, b1, p1, M);
      // 1. all three together
      a = a1[M-1:0]; b = b1[M-1:0]; p = p1[M-1:0];
      ser_start = 1; imp_start = 1; par_start = 1;
      t0 = cyc + 1;                     // cycle count after the accepting edge
      @(negedge clk);
      ser_start = 0; imp_start = 0; par_start = 0;
      a = '0; b = '0; p = '0;
      wait (!ser_busy && !imp_busy && !par_busy);
      @(negedge clk);
      #1;                               // after the done recorder
      expect_eq("serial product", ser_c, e1[M-1:0]);
      expect_eq("improved product", imp_c, e1[M-1:0]);
      expect_eq("parallel product", par_c, e1[M-1:0]);
      expect_int("serial latency", t_ser - t0, M);
      expect_int("improved latency", t_imp - t0, (M + KI - 1) / KI);
      expect_int("parallel latency", t_par - t0, 1);
      if (M % KI != 0) n_padded++;
      // 2. serial on field p1, parallel meanwhile on a different field p2
      a2 = rand_bits(M); b2 = rand_bits(M);
      p2 = rand_bits(M);
      if (p2 == p1) p2 = p1 ^ wide_t'(1);
      e2 = gf_mul(a2, b2, p2, M);
      a = a1[M-1:0]; b = b1[M-1:0]; p = p1[M-1:0];
      ser_start = 1;
      @(negedge clk);
      ser_start = 0;
      a = a2[M-1:0]; b = b2[M-1:0]; p = p2[M-1:0];
      par_start = 1;
      @(negedge clk);
      par_start = 0;
      if (ser_busy) begin
        ser_start = 1;                  // must be ignored
        n_busy_ignored++;
        @(negedge clk);
        ser_start = 0;
      end
      a = '0; b = '0; p = '0;
      wait (!ser_busy && !par_busy);
      @(negedge clk);
      expect_eq("serial product, first field", ser_c, e1[M-1:0]);
      expect_eq("parallel product, second field", par_c, e2[M-1:0]);
      n_two_fields++;
      n_field_change++;
      p_last = p2;
      // The ignored start must not have begun another run.
      repeat (2) @(negedge clk);
      checks++;
      if (ser_busy) begin failures++; $display("FAIL serial restarted by a start while busy"); end
    end
    $display("products serial=%0d improved=%0d parallel=%0d field changes=%0d busy starts ignored=%0d padded=%0d two fields=%0d",
             n_ser, n_imp, n_par, n_field_change, n_busy_ignored, n_padded, n_two_fields);
    checks += 7;
    if (n_ser == 0) failures++;
    if (n_imp == 0) failures++;
    if (n_par == 0) failures++;
    if (n_field_change == 0) failures++;
    if (n_busy_ignored == 0) failures++;
    if (n_padded == 0) failures++;
    if (n_two_fields == 0) failures++;
    expect_int("serial done count", n_ser, 2 * ROUNDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
