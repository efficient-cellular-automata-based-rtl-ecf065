// tb_ext_pca_cell: exhaustive check of the extended PCA cell logic over all
// 64 combinations of its three controls and three neighbour values. The
// expected value is worked out from the switch model: a neighbour reaches the
// XOR only when its control is 1, so the output is the parity of the enabled
// neighbours.
module tb_ext_pca_cell;
  logic cl, cm, cr, xl, xb, xr, xn;
  int checks = 0, failures = 0;

  ext_pca_cell dut (.cl(cl), .cm(cm), .cr(cr), .x_left(xl), .x_bound(xb),
                    .x_rmost(xr), .x_next(xn));

  initial begin
    for (int v = 0; v < 64; v++) begin
      int ones;
      {cl, cm, cr, xl, xb, xr} = 6'(v);
      #1;
      ones = 0;
      if (cl && xl) ones++;
      if (cm && xb) ones++;
      if (cr && xr) ones++;
      checks++;
      if (xn !== ones[0]) begin
        failures++;
        $display("FAIL cl=%0d cm=%0d cr=%0d xl=%0d xb=%0d xr=%0d got %0d", cl, cm, cr, xl, xb, xr, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
