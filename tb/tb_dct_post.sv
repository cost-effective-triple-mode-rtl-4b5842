// Self-checking testbench of the DCT post computation. Random shifted-FFT
// blocks Ys(k1,k2) are streamed in the pipeline's order
// p = 32*k12 + 8*k11 + 2*k2' + h (k1 = 2*k11 + k12, k2 = k2' + 4*h); the
// expected outputs in raster order are formed here from
//   X1 = (Re Ys(k1,k2) - Re Ys(8-k1,8-k2) - Im Ys(8-k1,k2) - Im Ys(k1,8-k2)) / 4
//   X2 = (Im Ys(k1,k2) - Im Ys(8-k1,8-k2) + Re Ys(8-k1,k2) + Re Ys(k1,8-k2)) / 4
// with Ys(8,k) = -j*Ys(0,k) (and Ys(k,8) likewise), rounded half-to-even, and
// checked 65 accepted samples after the block entered.
module tb_dct_post;
  import r42sdf_pkg::*;

  localparam int NF = 8;

  logic clk = 1'b0;
  logic en;
  logic [6:0] phase;
  cplx_t din, dout;
  int checks = 0, failures = 0;
  int yr [NF][8][8];
  int yi [NF][8][8];

  always #5 clk = ~clk;

  dct_post dut (.clk (clk), .en (en), .phase (phase), .din (din), .dout (dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // Ys(m1, m2) for m in 0..8 as (re, im)
  task automatic ys(input int f, input int m1, input int m2, output int re, output int im);
    int r, i, t, n;
    r = yr[f][m1 % 8][m2 % 8];
    i = yi[f][m1 % 8][m2 % 8];
    n = (m1 == 8 ? 1 : 0) + (m2 == 8 ? 1 : 0);
    for (int c = 0; c < n; c++) begin   // multiply by -j
      t = r; r = i; i = -t;
    end
    re = r; im = i;
  endtask

  initial begin
    int s, j, f, k1, k2, k12, k11, k2p, h;
    int ar, ai, br, bi, cr, ci, dr, di, e1, e2;
    en = 1'b0; phase = '0; din = '0;
    for (int ff = 0; ff < NF; ff++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++) begin
          yr[ff][a][b] = int'($urandom_range(6000)) - 3000;
          yi[ff][a][b] = int'($urandom_range(6000)) - 3000;
        end
    s = 0;
    while (s < NF * 64) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      if (en) begin
        f = s / 64;
        k12 = (s % 64) / 32; k11 = (s % 32) / 8; k2p = (s % 8) / 2; h = s % 2;
        k1 = 2 * k11 + k12; k2 = k2p + 4 * h;
        phase = 7'(s);
        din.re = word_t'(yr[f][k1][k2]);
        din.im = word_t'(yi[f][k1][k2]);
        #1;
        if (s >= 65) begin
          j = s - 65;
          f = j / 64; k1 = (j % 64) / 8; k2 = j % 8;
          ys(f, k1, k2, ar, ai);
          ys(f, 8 - k1, 8 - k2, br, bi);
          ys(f, 8 - k1, k2, cr, ci);
          ys(f, k1, 8 - k2, dr, di);
          e1 = rne(ar - br - ci - di, 2);
          e2 = rne(ai - bi + cr + dr, 2);
          checks++;
          if (int'(dout.re) != e1 || int'(dout.im) != e2) begin
            failures++;
            if (failures < 10) $display("k=%0d got %0d,%0d expected %0d,%0d", j % 64, dout.re, dout.im, e1, e2);
          end
        end
        s++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
