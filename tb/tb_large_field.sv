// tb_large_field: the multiplier at a cryptographic field size, M = 163 (the
// degree of the NIST binary field GF(2^163)), as serial (163 cycles) and
// improved with K = 8 (21 cycles, A padded by 5 zero bits) and K = 41 (4
// cycles, A padded by 1 zero bit). The fully parallel K = M case is covered at
// M = 64 by tb_pca_mult_parallel.
// The field polynomials are random, so the test covers arbitrary monic P.
module tb_large_field;
  logic clk = 1'b0, rst_n = 1'b0;
  int   ch [3], fl [3], bs [3], pc [3];
  logic fin [3];
  int   checks, failures;

  always #5 clk = ~clk;

  pca_mult_check #(.M(163), .K(1),   .OPS(20)) u0 (.clk, .rst_n, .checks(ch[0]), .failures(fl[0]),
      .busy_starts(bs[0]), .poly_changes(pc[0]), .finished(fin[0]));
  pca_mult_check #(.M(163), .K(8),   .OPS(20)) u1 (.clk, .rst_n, .checks(ch[1]), .failures(fl[1]),
      .busy_starts(bs[1]), .poly_changes(pc[1]), .finished(fin[1]));
  pca_mult_check #(.M(163), .K(41),  .OPS(20)) u2 (.clk, .rst_n, .checks(ch[2]), .failures(fl[2]),
      .busy_starts(bs[2]), .poly_changes(pc[2]), .finished(fin[2]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin checks += ch[i]; failures += fl[i]; end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
