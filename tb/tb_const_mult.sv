// Self-checking testbench of the constant multiplier: every exponent m in
// 0..15 in both directions with random and extreme inputs, compared with
// x * exp(-+j*2*pi*m/16) in double precision. The shift-add constants are
// within 3e-4 of the exact values, so a 2-LSB tolerance applies. Also checks
// the one-cycle latency and that the output holds while `en` is low.
module tb_const_mult;
  import r42sdf_pkg::*;

  logic clk = 1'b0;
  logic en;
  logic [3:0] m;
  logic inverse;
  cplx_t din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  const_mult dut (.clk (clk), .en (en), .m (m), .inverse (inverse), .din (din), .dout (dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, ang, er, ei;
    cplx_t held;
    pi = 3.14159265358979323846;
    en = 1'b1; m = '0; inverse = 1'b0; din = '0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      m = 4'(t % 16);
      inverse = t[4];
      if (t < 64) begin
        din.re = (t[5]) ? -13'sd4000 : 13'sd4000;
        din.im = (t[0]) ? 13'sd2900 : -13'sd2900;
      end else begin
        din.re = word_t'(int'($urandom_range(5790)) - 2895);
        din.im = word_t'(int'($urandom_range(5790)) - 2895);
      end
      ang = 2.0 * pi * real'(m) / 16.0;
      if (inverse) ang = -ang;
      er = din.re * $cos(ang) + din.im * $sin(ang);
      ei = din.im * $cos(ang) - din.re * $sin(ang);
      if (er > 4095.0) er = 4095.0;
      if (ei > 4095.0) ei = 4095.0;
      if (er < -4096.0) er = -4096.0;
      if (ei < -4096.0) ei = -4096.0;
      @(negedge clk);
      checks++;
      if ((dout.re - er) > 2.0 || (er - dout.re) > 2.0 || (dout.im - ei) > 2.0 || (ei - dout.im) > 2.0) begin
        failures++;
        if (failures < 10) $display("m=%0d inv=%0d x=%0d,%0d got %0d,%0d expected %f,%f",
                                    m, inverse, din.re, din.im, dout.re, dout.im, er, ei);
      end
    end
    // hold while disabled
    held = dout;
    en = 1'b0;
    din = '{13'sd123, -13'sd77};
    repeat (3) @(negedge clk);
    checks++;
    if (dout != held) begin failures++; $display("output changed while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
