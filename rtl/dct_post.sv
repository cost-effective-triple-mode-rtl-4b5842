// Post computation of the 2-D DCT mode: two DCT outputs per cycle.
//
// Input is the shifted 2-D FFT Ys(k1, k2) of the packed block
// y = y1 + j*y2, in the order the pipeline produces it, position
// p = 32*k12 + 8*k11 + 2*k2' + h with k1 = 2*k11 + k12 and k2 = k2' + 4*h.
// Each word is stored at address 8*k1 + k2 of one 64-word bank; during the
// next block the other bank is read in raster order k = 8*k1 + k2 and
//   X1 = ( Re Ys(k1,k2) - Re Ys(8-k1,8-k2) - Im Ys(8-k1,k2) - Im Ys(k1,8-k2) ) / 4
//   X2 = ( Im Ys(k1,k2) - Im Ys(8-k1,8-k2) + Re Ys(8-k1,k2) + Re Ys(k1,8-k2) ) / 4
// give the (unnormalised) 2-D DCTs of block 1 and block 2 (X1 on the real,
// X2 on the imaginary output). An index of 8 stands for Ys(8, k) = -j*Ys(0, k)
// (the quarter-sample time shift makes Ys anti-periodic up to -j), so it is
// read as address 0 rotated by -j.
//
// The formulas follow the design. The 64-word frame buffer is this design's
// own realisation: the reference design reaches the same result with an
// 8-word overturn shift register by exploiting the pipeline's output order.
//
// Timing: `phase[5:0]` indexes the word at `din`, `phase[6]` selects the bank
// being written; output word k leaves 65 enabled cycles after input position k.
module dct_post
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [6:0] phase,
  input  cplx_t      din,
  output cplx_t      dout
);

  cplx_t mem [2][64];
  logic [5:0] waddr;
  logic       wbank;
  logic [2:0] k1, k2;
  cplx_w_t a, b, c, d;
  wide_t   x1, x2;
  cplx_t   y;

  // Address and -j rotation count of Ys(m1, m2), m1, m2 in 0..8.
  function automatic logic [7:0] locate(input int m1, input int m2);
    logic [1:0] q;
    logic [5:0] ad;
    ad = {3'(m1 % 8), 3'(m2 % 8)};
    q  = 2'(int'(m1 == 8) + int'(m2 == 8));
    return {q, ad};
  endfunction

  logic [7:0] la, lb, lc, ld;
  logic       rbank;

  always_comb begin
    wbank = phase[6];
    rbank = ~phase[6];
    // position p = {k12, k11[1:0], k2'[1:0], h} -> address {k11, k12, h, k2'}
    waddr = {phase[4:3], phase[5], phase[0], phase[2:1]};
    k1 = phase[5:3];
    k2 = phase[2:0];
    la = locate(int'(k1),     int'(k2));
    lb = locate(8 - int'(k1), 8 - int'(k2));
    lc = locate(8 - int'(k1), int'(k2));
    ld = locate(int'(k1),     8 - int'(k2));
    a  = rot_mj(widen(mem[rbank][la[5:0]]), la[7:6]);
    b  = rot_mj(widen(mem[rbank][lb[5:0]]), lb[7:6]);
    c  = rot_mj(widen(mem[rbank][lc[5:0]]), lc[7:6]);
    d  = rot_mj(widen(mem[rbank][ld[5:0]]), ld[7:6]);
    x1 = a.re - b.re - c.im - d.im;
    x2 = a.im - b.im + c.re + d.re;
    y.re = rshr(32'(x1), 2);
    y.im = rshr(32'(x2), 2);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      mem[wbank][waddr] <= din;
      dout              <= y;
    end
  end

endmodule
