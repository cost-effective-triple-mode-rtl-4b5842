// Self-checking testbench of the radix-4 butterfly: random and extreme
// inputs in both directions, compared with sums formed here from the
// definition X[k] = sum_m x[m] * (-+j)^(k*m), rounded half-to-even after /4.
module tb_r4_butterfly;
  import r42sdf_pkg::*;

  cplx_t x [4];
  cplx_t y [4];
  logic  inverse;
  int checks = 0, failures = 0;

  r4_butterfly dut (.x (x), .inverse (inverse), .y (y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // (-j)^e or (+j)^e applied to (re, im)
  function automatic void rot(input int re, input int im, input int e, input bit inv,
                              output int ore, output int oim);
    int q;
    q = inv ? (4 - (e % 4)) % 4 : e % 4;
    case (q)
      0: begin ore = re;  oim = im;  end
      1: begin ore = im;  oim = -re; end
      2: begin ore = -re; oim = -im; end
      default: begin ore = -im; oim = re; end
    endcase
  endfunction

  // Reference rounding: v / 2^sh rounded half to even, saturated to 13 bits.
  function automatic int rne(input int v, input int sh);
    int q, rem, half;
    q = $floor(real'(v) / real'(1 << sh));
    rem = v - q * (1 << sh);
    half = 1 << (sh - 1);
    if (rem > half || (rem == half && (q % 2 != 0))) q++;
    if (q > 4095) q = 4095;
    if (q < -4096) q = -4096;
    return q;
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      inverse = t[0];
      for (int m = 0; m < 4; m++) begin
        if (t < 8) begin
          x[m].re = (t[1]) ? -13'sd4096 : 13'sd4095;
          x[m].im = (t[2]) ? -13'sd4096 : 13'sd4095;
        end else begin
          x[m].re = word_t'($urandom);
          x[m].im = word_t'($urandom);
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int sr, si, rr, ri;
        sr = 0; si = 0;
        for (int m = 0; m < 4; m++) begin
          rot(int'(x[m].re), int'(x[m].im), k * m, inverse, rr, ri);
          sr += rr; si += ri;
        end
        checks++;
        if (int'(y[k].re) != rne(sr, 2) || int'(y[k].im) != rne(si, 2)) begin
          failures++;
          if (failures < 10) $display("k=%0d inv=%0d got %0d,%0d expected %0d,%0d",
                                      k, inverse, y[k].re, y[k].im, rne(sr, 2), rne(si, 2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
