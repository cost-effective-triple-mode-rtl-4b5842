// Self-checking testbench of the eight-folded coefficient ROM: all 256
// exponents H against round(2048*cos(2*pi*H/256)) and
// -round(2048*sin(2*pi*H/256)) (at most 1 LSB apart, the folding reuses
// first-octant words), plus exact conjugate symmetry W^(256-H) = conj(W^H).
module tb_twiddle_rom;
  import r42sdf_pkg::*;

  logic [7:0] h;
  cplx_t w, w0;
  int checks = 0, failures = 0;

  twiddle_rom dut (.h (h), .w (w));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, er, ei;
    pi = 3.14159265358979323846;
    for (int i = 0; i < 256; i++) begin
      h = 8'(i);
      #1;
      er = 2048.0 * $cos(2.0 * pi * i / 256.0);
      ei = -2048.0 * $sin(2.0 * pi * i / 256.0);
      checks++;
      if ((w.re - er) > 1.0 || (er - w.re) > 1.0 || (w.im - ei) > 1.0 || (ei - w.im) > 1.0) begin
        failures++;
        if (failures < 10) $display("H=%0d got %0d,%0d expected %f,%f", i, w.re, w.im, er, ei);
      end
      w0 = w;
      h = 8'(256 - i);
      #1;
      if (i != 0) begin
        checks++;
        if (w.re != w0.re || w.im != -w0.im) begin
          failures++;
          if (failures < 10) $display("symmetry H=%0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
