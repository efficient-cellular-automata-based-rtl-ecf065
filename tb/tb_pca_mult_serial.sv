// tb_pca_mult_serial: the serial (one level of cells) multiplier. Runs M = 6 (the worked example size), M = 17 and M = 64, each of which must take exactly M clock cycles per product.
module tb_pca_mult_serial;
  logic clk = 1'b0, rst_n = 1'b0;
  int   ch [3], fl [3], bs [3], pc [3];
  logic fin [3];
  int   checks, failures;

  always #5 clk = ~clk;

  pca_mult_check #(.M(6), .K(1)) u0 (.clk, .rst_n, .checks(ch[0]), .failures(fl[0]),
      .busy_starts(bs[0]), .poly_changes(pc[0]), .finished(fin[0]));
  pca_mult_check #(.M(17), .K(1)) u1 (.clk, .rst_n, .checks(ch[1]), .failures(fl[1]),
      .busy_starts(bs[1]), .poly_changes(pc[1]), .finished(fin[1]));
  pca_mult_check #(.M(64), .K(1)) u2 (.clk, .rst_n, .checks(ch[2]), .failures(fl[2]),
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
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (bs[i] == 0) begin failures++; $display("FAIL no start while busy in instance %0d", i); end
      if (pc[i] == 0) begin failures++; $display("FAIL no field change in instance %0d", i); end
    end
    $display("starts ignored while busy: %0d %0d %0d, field changes: %0d %0d %0d",
             bs[0], bs[1], bs[2], pc[0], pc[1], pc[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
