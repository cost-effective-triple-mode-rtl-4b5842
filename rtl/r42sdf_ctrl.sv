// Counter controller of the R4^2SDF pipeline.
//
// One 8-bit counter numbers the accepted input samples; every stage, twiddle
// generator and the output index derive their position from it by
// subtracting the fixed latency in front of that unit, so the whole schedule
// of the pipeline is set here. The controller also
//   * selects the operating mode: when a sample arrives with a `mode_i`
//     different from the current mode, that sample starts the first frame of
//     the new mode (counter and fill count restart; data in flight is dropped);
//   * computes the twiddle exponents: m1 = n2*k1 (W16) for the first constant
//     multiplier, H = n3*(k1 + 4*k2) (W256) for the complex multiplier,
//     m2 = n2'*k1' (W16) for the second constant multiplier in FFT/IFFT mode, and
//     W8^(n12*k12), W8^(e*k2'), W256^(8*(k1+k2)) in the DCT mode;
//   * flags output valid once the pipeline holds a full latency of samples of
//     the current mode and gives the output index: base-4 digit-reversed k in
//     FFT/IFFT mode, raster 8*k1 + k2 in DCT mode.
// The pipeline advances only on accepted samples (`en` = `in_valid`).
// Everything except the counter, fill count and mode register is
// combinational in the cycle the sample is accepted.
module r42sdf_ctrl
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] mode_i,
  output logic       en,
  output mode_e      mode,
  output logic       inverse,
  output logic       dct,
  output logic [7:0] ph_rb,     // input reorder (DCT)
  output logic [7:0] ph_s1,
  output logic [7:0] ph_s2,
  output logic [7:0] ph_s3,
  output logic [7:0] ph_s4,
  output logic [7:0] ph_r2,     // additional radix-2 stage (DCT)
  output logic [7:0] ph_post,   // post computation (DCT)
  output logic [3:0] m_cm1,
  output logic [3:0] m_cm2,
  output logic [7:0] h_cx,
  output logic       out_valid,
  output logic [7:0] out_index,
  output logic       switched   // a mode switch restarted the pipeline this cycle
);

  // FFT/IFFT schedule (input position of each unit).
  localparam logic [7:0] F_CM1 = 8'd193;  // after stage I   (3*64+1)
  localparam logic [7:0] F_S2  = 8'd194;
  localparam logic [7:0] F_CX  = 8'd243;  // after stage II  (3*16+1)
  localparam logic [7:0] F_S3  = 8'd244;
  localparam int unsigned F_CM2_I = 257;
  localparam int unsigned F_S4_I  = 258;
  localparam int unsigned F_OUT_I = 262;
  // DCT schedule.
  localparam int unsigned D_S1   = 65;   // after the reorder buffer
  localparam int unsigned D_CM1  = 98;   // after stage I (radix-2, 32+1)
  localparam int unsigned D_S2   = 99;
  localparam int unsigned D_S3   = 124;  // after stage II (3*8+1)
  localparam int unsigned D_CM2  = 131;  // after stage III (3*2+1)
  localparam int unsigned D_R2   = 132;
  localparam int unsigned D_CX   = 134;  // after the radix-2 stage (2)
  localparam int unsigned D_POST = 135;
  localparam int unsigned D_OUT_I = 200; // after the post computation (65)

  mode_e      mode_q;
  logic [7:0] cnt_q, c;
  logic [8:0] fill_q, fill;
  logic [7:0] p;

  function automatic mode_e decode(input logic [1:0] v);
    case (v)
      2'd1:    return MODE_IFFT;
      2'd2:    return MODE_DCT;
      default: return MODE_FFT;
    endcase
  endfunction

  always_comb begin
    en       = in_valid;
    mode     = decode(mode_i);
    switched = in_valid && (mode != mode_q);
    c        = switched ? 8'd0 : cnt_q;
    fill     = switched ? 9'd0 : fill_q;
    inverse  = (mode == MODE_IFFT);
    dct      = (mode == MODE_DCT);

    ph_rb   = c;
    ph_r2   = c - 8'(D_R2);
    ph_post = c - 8'(D_POST);
    if (dct) begin
      ph_s1 = c - 8'(D_S1);
      ph_s2 = c - 8'(D_S2);
      ph_s3 = c - 8'(D_S3);
      ph_s4 = c;
      p     = c - 8'(D_CM1);            // {k12, n12, n2}
      m_cm1 = {1'b0, (p[4:3] & {2{p[5]}}), 1'b0};
      p     = c - 8'(D_CM2);            // {.., k2', e}
      m_cm2 = {1'b0, (p[2:1] & {2{p[0]}}), 1'b0};
      p     = c - 8'(D_CX);             // {k12, k11, k2', h}
      h_cx  = ({5'b0, p[4:3], p[5]} + {5'b0, p[0], p[2:1]}) << 3;
      p     = c - 8'(D_OUT_I);
      out_index = {2'b00, p[5:0]};
      out_valid = in_valid && (fill >= 9'(D_OUT_I));
    end else begin
      ph_s1 = c;
      ph_s2 = c - F_S2;
      ph_s3 = c - F_S3;
      ph_s4 = c - 8'(F_S4_I);
      p     = c - F_CM1;                // {k1, n2, n3}
      m_cm1 = {2'b00, p[7:6]} * {2'b00, p[5:4]};
      p     = c - 8'(F_CM2_I);          // {.., k1', n2'}
      m_cm2 = {2'b00, p[3:2]} * {2'b00, p[1:0]};
      p     = c - F_CX;                 // {k1, k2, n3}
      h_cx  = {4'b0000, p[3:0]} * ({4'b0000, p[5:4], 2'b00} + {6'b000000, p[7:6]});
      p     = c - 8'(F_OUT_I);
      out_index = {p[1:0], p[3:2], p[5:4], p[7:6]};
      out_valid = in_valid && (fill >= 9'(F_OUT_I));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_FFT;
      cnt_q  <= '0;
      fill_q <= '0;
    end else if (in_valid) begin
      mode_q <= mode;
      cnt_q  <= c + 8'd1;
      fill_q <= (fill == 9'h1ff) ? fill : fill + 9'd1;
    end
  end

endmodule
