// Accuracy workloads of the processor at full size.
//
//  1. 256-point FFT of full-range random complex input: output SNR against a
//     double-precision DFT/256 (expected well above 35 dB with 13-bit words).
//  2. 256-point IFFT of FFT-like random input, same measure.
//  3. 2-D DCT of random 8-bit pixels in [-128, 127] (placed in the top bits of
//     the 13-bit input word): mean square error, peak mean square error
//     (worst coefficient position), overall mean error and worst error
//     against the double-precision DCT, in output LSBs.
//  4. Constant blocks: every AC coefficient must be exactly zero.
//  5. OFDM channel: random QPSK symbols S(k) are turned into a time signal by
//     a double-precision inverse DFT, white Gaussian noise is added at a
//     channel SNR of 20, 40 and 60 dB, and the quantised signal goes through
//     the FFT mode. The output SNR is measured against the original symbols
//     (S(k)/16 after the 1/256 scaling), so it includes channel noise and all
//     fixed-point losses; it must stay within 3 dB of the channel SNR at 20
//     and 40 dB and above 40 dB for the 60 dB channel.
// The pipeline is fed continuously; each mode's results are compared as they
// appear.
module tb_workload_accuracy;
  import r42sdf_pkg::*;

  localparam int NFFT_FR = 12;
  localparam int NDCT_FR = 250;  // DCT frames, each two 8x8 blocks

  logic clk = 1'b0;
  logic rst_n, in_valid;
  logic [1:0] mode;
  cplx_t din, dout;
  logic out_valid;
  logic [7:0] out_index;
  int checks = 0, failures = 0;

  r42sdf_top dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .mode (mode),
    .din (din), .out_valid (out_valid), .out_index (out_index), .dout (dout));

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [64][256];
  int xi [64][256];
  int sym_r [64][256];
  int sym_i [64][256];
  real sig_p, err_p, sum_e, pmse [64];
  real chan_db;

  // Zero-mean Gaussian sample of unit variance (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    u2 = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979323846 * u2);
  endfunction

  function automatic int clip13(input real v);
    int q;
    q = $rtoi(v < 0 ? v - 0.5 : v + 0.5);
    if (q > 4095) q = 4095;
    if (q < -4096) q = -4096;
    return q;
  endfunction
  int  max_e, ac_nonzero;

  task automatic run(input logic [1:0] m, input int nfr, input int kind);
    int fs, lat, s, idx, fo, total;
    real pi, er, ei, dr, di;
    pi = 3.14159265358979323846;
    fs  = (m == 2'd2) ? 64 : 256;
    lat = (m == 2'd2) ? 200 : 262;
    sig_p = 0; err_p = 0; sum_e = 0; max_e = 0; ac_nonzero = 0;
    for (int k = 0; k < 64; k++) pmse[k] = 0;
    for (int f = 0; f < nfr + 5; f++)
      for (int n = 0; n < fs; n++) begin
        if (kind == 0) begin
          xr[f%64][n] = int'($urandom_range(8190)) - 4095;
          xi[f%64][n] = int'($urandom_range(8190)) - 4095;
        end else if (kind == 1) begin
          xr[f%64][n] = (int'($urandom_range(255)) - 128) * 16;
          xi[f%64][n] = (int'($urandom_range(255)) - 128) * 16;
        end else if (kind == 3) begin
          sym_r[f%64][n] = $urandom_range(1) ? 1000 : -1000;
          sym_i[f%64][n] = $urandom_range(1) ? 1000 : -1000;
        end else begin
          xr[f%64][n] = ((f * 37) % 256 - 128) * 16;
          xi[f%64][n] = ((f * 91) % 256 - 128) * 16;
        end
      end
    if (kind == 3)
      // x(n) = (1/16) sum_k S(k) exp(+j 2 pi n k / 256) plus channel noise
      for (int f = 0; f < nfr + 5; f++)
        for (int n = 0; n < fs; n++) begin
          real ar, ai, ang, sd;
          ar = 0; ai = 0;
          for (int k = 0; k < fs; k++) begin
            ang = 2.0 * pi * real'((n * k) % 256) / 256.0;
            ar += sym_r[f%64][k] * $cos(ang) - sym_i[f%64][k] * $sin(ang);
            ai += sym_i[f%64][k] * $cos(ang) + sym_r[f%64][k] * $sin(ang);
          end
          // per-component signal variance is 1000^2
          sd = 1000.0 / $pow(10.0, chan_db / 20.0);
          xr[f%64][n] = clip13(ar / 16.0 + sd * gauss());
          xi[f%64][n] = clip13(ai / 16.0 + sd * gauss());
        end
    // restart the pipeline so that frame 0 of this run is the first frame
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    total = 0;
    s = 0;
    while (s < nfr * fs + lat) begin
      @(negedge clk);
      in_valid = 1'b1;
      mode = m;
      din.re = word_t'(xr[(s/fs)%64][s%fs]);
      din.im = word_t'(xi[(s/fs)%64][s%fs]);
      #1;
      if (out_valid && (s - lat) / fs < nfr) begin
        fo = (s - lat) / fs;
        idx = int'(out_index);
        er = 0; ei = 0;
        if (kind == 3) begin
          er = sym_r[fo%64][idx] / 16.0;
          ei = sym_i[fo%64][idx] / 16.0;
        end else if (m == 2'd2) begin
          for (int n = 0; n < 64; n++) begin
            real cc;
            cc = $cos(pi * ((n/8) + 0.5) * (idx/8) / 8.0) * $cos(pi * ((n%8) + 0.5) * (idx%8) / 8.0);
            er += xr[fo%64][n] * cc;
            ei += xi[fo%64][n] * cc;
          end
          er /= 64.0; ei /= 64.0;
        end else begin
          for (int n = 0; n < 256; n++) begin
            real ang;
            ang = 2.0 * pi * real'((idx * n) % 256) / 256.0;
            if (m == 2'd1) ang = -ang;
            er += xr[fo%64][n] * $cos(ang) + xi[fo%64][n] * $sin(ang);
            ei += xi[fo%64][n] * $cos(ang) - xr[fo%64][n] * $sin(ang);
          end
          er /= 256.0; ei /= 256.0;
        end
        dr = real'(dout.re) - er;
        di = real'(dout.im) - ei;
        sig_p += er * er + ei * ei;
        err_p += dr * dr + di * di;
        sum_e += dr + di;
        if (m == 2'd2) pmse[idx] += dr * dr + di * di;
        if ($rtoi(dr < 0 ? -dr : dr) > max_e) max_e = $rtoi(dr < 0 ? -dr : dr);
        if ($rtoi(di < 0 ? -di : di) > max_e) max_e = $rtoi(di < 0 ? -di : di);
        if (kind == 2 && idx != 0 && (dout.re != 0 || dout.im != 0)) ac_nonzero++;
        total++;
      end
      s++;
    end
    checks++;
    if (total != nfr * fs) begin
      failures++;
      $display("mode %0d: %0d outputs compared, expected %0d", m, total, nfr * fs);
    end
  endtask

  initial begin
    real snr, mse, pm, ome;
    rst_n = 1'b0; in_valid = 1'b0; mode = 2'd0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run(2'd0, NFFT_FR, 0);
    snr = 10.0 * $log10(sig_p / err_p);
    $display("FFT  256-point: SNR %0.1f dB, worst error %0d LSB", snr, max_e);
    checks++; if (snr < 35.0) begin failures++; $display("FFT SNR too low"); end

    run(2'd1, NFFT_FR, 0);
    snr = 10.0 * $log10(sig_p / err_p);
    $display("IFFT 256-point: SNR %0.1f dB, worst error %0d LSB", snr, max_e);
    checks++; if (snr < 35.0) begin failures++; $display("IFFT SNR too low"); end

    run(2'd2, NDCT_FR, 1);
    mse = err_p / (2.0 * 64.0 * NDCT_FR);
    pm = 0;
    for (int k = 0; k < 64; k++) if (pmse[k] / (2.0 * NDCT_FR) > pm) pm = pmse[k] / (2.0 * NDCT_FR);
    ome = sum_e / (2.0 * 64.0 * NDCT_FR);
    $display("DCT  8x8 (%0d blocks): MSE %0.4f, PMSE %0.4f, OME %0.4f LSB^2/LSB, worst error %0d LSB",
             2 * NDCT_FR, mse, pm, ome, max_e);
    checks++; if (max_e > 2) begin failures++; $display("DCT error too large"); end
    checks++; if (mse > 0.5) begin failures++; $display("DCT MSE too large"); end

    run(2'd2, 8, 2);
    $display("DCT constant blocks: %0d non-zero AC coefficients", ac_nonzero);
    checks++; if (ac_nonzero != 0) begin failures++; end

    for (int l = 0; l < 3; l++) begin
      chan_db = 20.0 + 20.0 * l;
      run(2'd0, 4, 3);
      snr = 10.0 * $log10(sig_p / err_p);
      $display("OFDM channel %0.0f dB -> FFT output SNR %0.1f dB", chan_db, snr);
      checks++;
      if (snr < (l == 2 ? 40.0 : chan_db - 3.0)) begin
        failures++;
        $display("OFDM output SNR too low");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
