// tb_pca_row: one level of cells against the algebra it implements.
// For random C, a, B, P one row must give (C*x + a*B) mod P. The expected
// value comes from the reference multiplier: C*x mod P = gf_mul(x, C) and
// a*B is B or 0. Also replays the first iteration of the worked example with
// B = x^5 + x + 1, P = x^6 + x^5 + x^4 + x^3 + 1 (controls of Fig. 4).
module tb_pca_row;
  import gf2m_ref_pkg::*;
  localparam int unsigned M = 6;
  logic [M-1:0] c_in, b, p, c_out;
  logic a_bit;
  int checks = 0, failures = 0;

  pca_row #(.M(M)) dut (.c_in, .a_bit, .b, .p, .c_out);

  task automatic check_one();
    wide_t exp;
    #1;
    exp = gf_mul(wide_t'(2), wide_t'(c_in), wide_t'(p), M) ^ (a_bit ? wide_t'(b) : '0);
    checks++;
    if (c_out !== exp[M-1:0]) begin
      failures++;
      $display("FAIL c_in=%b a=%0d b=%b p=%b got %b exp %b", c_in, a_bit, b, p, c_out, exp[M-1:0]);
    end
  endtask

  initial begin
    // Worked example controls: cm = b = 100011, cr = p = 111001.
    b = 6'b100011; p = 6'b111001;
    for (int v = 0; v < 128; v++) begin
      {a_bit, c_in} = 7'(v);
      check_one();
    end
    repeat (500) begin
      c_in = 6'($urandom); a_bit = 1'($urandom); b = 6'($urandom); p = 6'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
