// tb_worked_example: the published worked example, A(x)(x^5 + x + 1) mod
// (x^6 + x^5 + x^4 + x^3 + 1) in GF(2^6), for every one of the 64 values of
// A, on the serial, improved and parallel multipliers of the top at its
// default parameters. With this B and P the cell controls are
// cm = b = 100011 and cr = p = 111001 (cell 5 down to cell 0). Each product is
// checked against the reference, and the serial one must take 6 cycles.
module tb_worked_example;
  import gf2m_ref_pkg::*;
  localparam int unsigned M = 6;
  localparam logic [M-1:0] B_EX = 6'b100011;  // x^5 + x + 1
  localparam logic [M-1:0] P_EX = 6'b111001;  // x^6 + x^5 + x^4 + x^3 + 1, x^6 implicit

  logic clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] a, b, p;
  logic ser_start, imp_start, par_start;
  logic ser_busy, imp_busy, par_busy, ser_done, imp_done, par_done;
  logic [M-1:0] ser_c, imp_c, par_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pca_versatile_top dut (
    .clk, .rst_n, .a, .b, .p,
    .ser_start, .ser_busy, .ser_done, .ser_c,
    .imp_start, .imp_busy, .imp_done, .imp_c,
    .par_start, .par_busy, .par_done, .par_c
  );

  initial begin
    wide_t e;
    int cycles;
    ser_start = 0; imp_start = 0; par_start = 0;
    a = '0; b = B_EX; p = P_EX;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int v = 0; v < 64; v++) begin
      a = 6'(v);
      e = gf_mul(wide_t'(a), wide_t'(B_EX), wide_t'(P_EX), M);
      ser_start = 1; imp_start = 1; par_start = 1;
      @(negedge clk);
      ser_start = 0; imp_start = 0; par_start = 0;
      cycles = 0;
      while (!ser_done && cycles < 20) begin
        cycles++;
        @(negedge clk);
      end
      checks += 4;
      if (cycles != 6) begin failures++; $display("FAIL serial took %0d cycles", cycles); end
      if (ser_c !== e[M-1:0]) begin failures++; $display("FAIL serial A=%b got %b exp %b", a, ser_c, e[M-1:0]); end
      if (imp_c !== e[M-1:0]) begin failures++; $display("FAIL improved A=%b got %b exp %b", a, imp_c, e[M-1:0]); end
      if (par_c !== e[M-1:0]) begin failures++; $display("FAIL parallel A=%b got %b exp %b", a, par_c, e[M-1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
