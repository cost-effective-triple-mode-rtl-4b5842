// Multiplierless radix-4 butterfly.
//
// Computes X[k] = (1/4) * sum_{m=0..3} x[m] * (-j)^(k*m) for k = 0..3 (forward
// FFT, and every stage of the DCT mode), or with +j in place of -j when
// `inverse` is set (IFFT). The only "multiplications" are real/imaginary swaps
// and sign inversions, so the block is four four-input complex adders behind a
// shuffle network, as in the design's radix-4 butterfly. The result is scaled
// by 1/4 with rounding so that the four stages together apply the 1/256 of the
// 256-point transform; the scaling rule is this implementation's choice.
//
// Purely combinational; x[0] is the oldest of the four samples x(n), x(n+L),
// x(n+2L), x(n+3L).
module r4_butterfly
  import r42sdf_pkg::*;
(
  input  cplx_t x [4],
  input  logic  inverse,
  output cplx_t y [4]
);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      cplx_w_t acc;
      acc = '0;
      for (int m = 0; m < 4; m++) begin
        logic [1:0] q;
        q = 2'(k * m);
        if (inverse) q = 2'(-int'(q));
        acc = cadd(acc, rot_mj(widen(x[m]), q));
      end
      y[k] = cscale(acc, 2);
    end
  end

endmodule
