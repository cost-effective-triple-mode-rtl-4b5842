// Self-checking testbench of the complex multiplier with its ROM: random
// data and exponents in both directions against x * exp(-+j*2*pi*H/256) in
// double precision (2-LSB tolerance for the 11-bit coefficients and rounding),
// checked one enabled cycle later.
module tb_complex_mult;
  import r42sdf_pkg::*;

  logic clk = 1'b0;
  logic en;
  logic [7:0] h;
  logic inverse;
  cplx_t din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  complex_mult dut (.clk (clk), .en (en), .h (h), .inverse (inverse), .din (din), .dout (dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, ang, er, ei;
    pi = 3.14159265358979323846;
    en = 1'b1; h = '0; inverse = 1'b0; din = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      h = (t < 256) ? 8'(t) : 8'($urandom);
      inverse = ($urandom_range(1) == 1);
      din.re = word_t'(int'($urandom_range(5790)) - 2895);
      din.im = word_t'(int'($urandom_range(5790)) - 2895);
      ang = 2.0 * pi * real'(h) / 256.0;
      if (inverse) ang = -ang;
      er = din.re * $cos(ang) + din.im * $sin(ang);
      ei = din.im * $cos(ang) - din.re * $sin(ang);
      @(negedge clk);
      checks++;
      if ((dout.re - er) > 2.0 || (er - dout.re) > 2.0 || (dout.im - ei) > 2.0 || (ei - dout.im) > 2.0) begin
        failures++;
        if (failures < 10) $display("H=%0d inv=%0d got %0d,%0d expected %f,%f",
                                    h, inverse, dout.re, dout.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
