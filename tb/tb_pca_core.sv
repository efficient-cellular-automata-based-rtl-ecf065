// tb_pca_core: checks the extended PCA state register with one level of cells
// (serial, M = 6 and M = 17), several levels where M is not a multiple of K
// (M = 6, K = 4 and M = 17, K = 5) and M levels (parallel, M = 6 and M = 17).
module tb_pca_core;
  logic clk = 1'b0, rst_n = 1'b0;
  int   ch [6], fl [6];
  logic fin [6];
  int   checks, failures;

  always #5 clk = ~clk;

  pca_core_check #(.M(6),  .K(1))  u0 (.clk, .rst_n, .checks(ch[0]), .failures(fl[0]), .finished(fin[0]));
  pca_core_check #(.M(6),  .K(4))  u1 (.clk, .rst_n, .checks(ch[1]), .failures(fl[1]), .finished(fin[1]));
  pca_core_check #(.M(6),  .K(6))  u2 (.clk, .rst_n, .checks(ch[2]), .failures(fl[2]), .finished(fin[2]));
  pca_core_check #(.M(17), .K(1))  u3 (.clk, .rst_n, .checks(ch[3]), .failures(fl[3]), .finished(fin[3]));
  pca_core_check #(.M(17), .K(5))  u4 (.clk, .rst_n, .checks(ch[4]), .failures(fl[4]), .finished(fin[4]));
  pca_core_check #(.M(17), .K(17)) u5 (.clk, .rst_n, .checks(ch[5]), .failures(fl[5]), .finished(fin[5]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin checks += ch[i]; failures += fl[i]; end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
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
