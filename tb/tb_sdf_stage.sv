// Self-checking testbench of the SDF butterfly stage.
//
// Three instances with L = 4, LS = 2: full-length radix-4 (FFT mode),
// shortened radix-4 (DCT mode, period 8) and shortened radix-2 (DCT first
// stage, period 4). Random groups are streamed with random idle cycles; the
// expected outputs are small DFTs of each group computed here, rounded
// half-to-even, and are checked at the stated latency (3L+1, 3LS+1 and LS+1
// accepted samples). At the end, the words behind the tap of the shortened
// radix-4 instance (its power-saving segment) must still hold the values
// they had before the run.
module tb_sdf_stage;
  import r42sdf_pkg::*;

  localparam int L = 4, LS = 2;
  localparam int NS = 400;

  logic clk = 1'b0;
  logic en;
  logic [7:0] phase;
  logic inverse;
  cplx_t din, d_full, d_short, d_r2;
  int checks = 0, failures = 0;
  int xr [NS], xi [NS];

  always #5 clk = ~clk;

  sdf_stage #(.L(L), .LS(LS)) u_full (
    .clk (clk), .en (en), .phase (phase), .inverse (inverse), .short_len (1'b0),
    .radix2 (1'b0), .din (din), .dout (d_full));
  sdf_stage #(.L(L), .LS(LS)) u_short (
    .clk (clk), .en (en), .phase (phase), .inverse (inverse), .short_len (1'b1),
    .radix2 (1'b0), .din (din), .dout (d_short));
  sdf_stage #(.L(L), .LS(LS)) u_r2 (
    .clk (clk), .en (en), .phase (phase), .inverse (inverse), .short_len (1'b1),
    .radix2 (1'b1), .din (din), .dout (d_r2));

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

  // Expected radix-4 output at stream position j for group length g.
  task automatic exp_r4(input int j, input int g, input bit inv, output int er, output int ei);
    int base, k, n, sr, si;
    base = (j / (4 * g)) * (4 * g);
    k = (j % (4 * g)) / g;
    n = j % g;
    sr = 0; si = 0;
    for (int m = 0; m < 4; m++) begin
      int ar, ai, q;
      ar = xr[base + n + m * g]; ai = xi[base + n + m * g];
      q = (k * m) % 4;
      if (inv) q = (4 - q) % 4;
      case (q)
        0: begin sr += ar;  si += ai;  end
        1: begin sr += ai;  si -= ar;  end
        2: begin sr -= ar;  si -= ai;  end
        default: begin sr -= ai; si += ar; end
      endcase
    end
    er = rne(sr, 2); ei = rne(si, 2);
  endtask

  task automatic exp_r2(input int j, input int g, output int er, output int ei);
    int base, n;
    base = (j / (2 * g)) * (2 * g);
    n = j % g;
    if ((j % (2 * g)) < g) begin
      er = rne(xr[base + n] + xr[base + n + g], 1);
      ei = rne(xi[base + n] + xi[base + n + g], 1);
    end else begin
      er = rne(xr[base + n] - xr[base + n + g], 1);
      ei = rne(xi[base + n] - xi[base + n + g], 1);
    end
  endtask

  task automatic cmp(input string what, input cplx_t got, input int er, input int ei);
    checks++;
    if (int'(got.re) != er || int'(got.im) != ei) begin
      failures++;
      if (failures < 10) $display("%s got %0d,%0d expected %0d,%0d", what, got.re, got.im, er, ei);
    end
  endtask

  initial begin
    int s, er, ei;
    cplx_t seg0 [3];
    en = 1'b0; phase = '0; din = '0; inverse = 1'b0;
    #1;
    // words behind the tap of the shortened stage: they must never move
    seg0[0] = u_short.sr_a[L-1]; seg0[1] = u_short.sr_b[L-1]; seg0[2] = u_short.sr_c[L-1];
    for (int i = 0; i < NS; i++) begin
      xr[i] = int'($urandom_range(8000)) - 4000;
      xi[i] = int'($urandom_range(8000)) - 4000;
    end
    for (int pass = 0; pass < 2; pass++) begin
      inverse = pass[0];
      s = 0;
      while (s < NS) begin
        @(negedge clk);
        en = ($urandom_range(9) != 0);
        if (en) begin
          phase = 8'(s);
          din.re = word_t'(xr[s]); din.im = word_t'(xi[s]);
          #1;
          if (s >= 3 * L + 1) begin
            exp_r4(s - (3 * L + 1), L, inverse, er, ei);
            cmp("radix-4 L", d_full, er, ei);
          end
          if (s >= 3 * LS + 1) begin
            exp_r4(s - (3 * LS + 1), LS, inverse, er, ei);
            cmp("radix-4 LS", d_short, er, ei);
          end
          if (s >= LS + 1) begin
            exp_r2(s - (LS + 1), LS, er, ei);
            cmp("radix-2 LS", d_r2, er, ei);
          end
          s++;
        end
      end
    end
    // power-saving segment of the shortened stage held its contents
    cmp("held segment a", u_short.sr_a[L-1], int'(seg0[0].re), int'(seg0[0].im));
    cmp("held segment b", u_short.sr_b[L-1], int'(seg0[1].re), int'(seg0[1].im));
    cmp("held segment c", u_short.sr_c[L-1], int'(seg0[2].re), int'(seg0[2].im));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
