// Triple-mode R4^2SDF pipeline processor: 256-point FFT, 256-point IFFT and two
// concurrent 8x8 2-D DCTs on one radix-4^2 single-delay-feedback datapath.
//
// FFT/IFFT datapath (one complex sample per cycle in, one out):
//   stage I (3x64 words) -> constant mult I (W16^(n2*k1))
//   -> stage II (3x16)   -> complex mult (W256^(n3*(k1+4k2)), 32-word ROM)
//   -> stage III (3x4)   -> constant mult II (W16)
//   -> stage IV (3x1)    -> X[k]
// i.e. two radix-16 steps, each split into two multiplierless radix-4
// butterflies with a constant multiplier between them and a single general
// complex multiplier between the two radix-16 steps. IFFT differs only in the
// sign of the trivial rotations and the conjugated twiddles. Every butterfly
// scales by 1/4, so the output is DFT/256 (FFT) or the exact IDFT including
// its 1/256 (IFFT). Outputs leave in base-4 digit-reversed order; `out_index`
// gives k. Latency: 262 accepted samples.
//
// DCT datapath (the word carries a pixel of block 1 in its real part and of
// block 2 in its imaginary part, raster order):
//   input reordering -> stage I as radix-2 over n1 (32 apart)
//   -> constant mult I (W8^(n12*k12)) -> stage II, 3x8 words (column DFT)
//   -> stage III, 3x2 words (row DFT halves) -> constant mult II (W8^k2')
//   -> additional radix-2 stage -> complex mult (time shift W8^((k1+k2)/4))
//   -> post computation -> X1 (real output), X2 (imaginary output)
// Output k = 8*k1 + k2 in raster order, equal to the DCT sum of
// x(n1,n2)*cos(pi*(n1+1/2)*k1/8)*cos(pi*(n2+1/2)*k2/8) divided by 64 (the
// b(k1)b(k2)/4 normalisation is left out). Latency: 200 accepted samples.
//
// Interface: one sample is accepted in each cycle with in_valid high; the
// pipeline only advances on accepted samples, so a frame is flushed out by
// the samples of the next one. out_valid marks, in the same cycle as an
// accepted sample, that dout/out_index hold a result. Changing `mode` (sampled
// with in_valid) restarts the pipeline in the new mode with that sample as
// the first of a frame. The mode encoding, handshake and restart rule are
// this design's own choices.
module r42sdf_top
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] mode,       // 0 FFT, 1 IFFT, 2 2-D DCT
  input  cplx_t      din,
  output logic       out_valid,
  output logic [7:0] out_index,
  output cplx_t      dout
);

  logic       en, inverse, dct;
  logic [7:0] ph_rb, ph_s1, ph_s2, ph_s3, ph_s4, ph_r2, ph_post, h_cx;
  logic [3:0] m_cm1, m_cm2;

  cplx_t rb_out, s1_in, s1_out, cm1_out, s2_out, cx_in, cx_out;
  cplx_t s3_in, s3_out, cm2_out, s4_out, r2_out, post_out;

  r42sdf_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .mode_i    (mode),
    .en        (en),
    .mode      (),
    .inverse   (inverse),
    .dct       (dct),
    .ph_rb     (ph_rb),
    .ph_s1     (ph_s1),
    .ph_s2     (ph_s2),
    .ph_s3     (ph_s3),
    .ph_s4     (ph_s4),
    .ph_r2     (ph_r2),
    .ph_post   (ph_post),
    .m_cm1     (m_cm1),
    .m_cm2     (m_cm2),
    .h_cx      (h_cx),
    .out_valid (out_valid),
    .out_index (out_index),
    .switched  ()
  );

  dct_reorder u_reorder (
    .clk   (clk),
    .en    (en && dct),
    .phase (ph_rb),
    .din   (din),
    .dout  (rb_out)
  );

  assign s1_in = dct ? rb_out : din;

  sdf_stage #(.L(64), .LS(32)) u_stage1 (
    .clk       (clk),
    .en        (en),
    .phase     (ph_s1),
    .inverse   (inverse),
    .short_len (dct),
    .radix2    (dct),
    .din       (s1_in),
    .dout      (s1_out)
  );

  const_mult u_cm1 (
    .clk     (clk),
    .en      (en),
    .m       (m_cm1),
    .inverse (inverse),
    .din     (s1_out),
    .dout    (cm1_out)
  );

  sdf_stage #(.L(16), .LS(8)) u_stage2 (
    .clk       (clk),
    .en        (en),
    .phase     (ph_s2),
    .inverse   (inverse),
    .short_len (dct),
    .radix2    (1'b0),
    .din       (cm1_out),
    .dout      (s2_out)
  );

  assign cx_in = dct ? r2_out : s2_out;

  complex_mult u_cx (
    .clk     (clk),
    .en      (en),
    .h       (h_cx),
    .inverse (inverse),
    .din     (cx_in),
    .dout    (cx_out)
  );

  assign s3_in = dct ? s2_out : cx_out;

  sdf_stage #(.L(4), .LS(2)) u_stage3 (
    .clk       (clk),
    .en        (en),
    .phase     (ph_s3),
    .inverse   (inverse),
    .short_len (dct),
    .radix2    (1'b0),
    .din       (s3_in),
    .dout      (s3_out)
  );

  const_mult u_cm2 (
    .clk     (clk),
    .en      (en),
    .m       (m_cm2),
    .inverse (inverse),
    .din     (s3_out),
    .dout    (cm2_out)
  );

  r2_bf u_r2 (
    .clk    (clk),
    .en     (en && dct),
    .phase0 (ph_r2[0]),
    .din    (cm2_out),
    .dout   (r2_out)
  );

  sdf_stage #(.L(1), .LS(1)) u_stage4 (
    .clk       (clk),
    .en        (en && !dct),
    .phase     (ph_s4),
    .inverse   (inverse),
    .short_len (1'b0),
    .radix2    (1'b0),
    .din       (cm2_out),
    .dout      (s4_out)
  );

  dct_post u_post (
    .clk   (clk),
    .en    (en && dct),
    .phase (ph_post[6:0]),
    .din   (cx_out),
    .dout  (post_out)
  );

  assign dout = dct ? post_out : s4_out;

endmodule
