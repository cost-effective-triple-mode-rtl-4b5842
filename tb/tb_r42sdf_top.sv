// End-to-end self-checking testbench of the triple-mode R4^2SDF processor at
// its full size (256-point FFT/IFFT, 8x8 DCT).
//
// Streams random frames through the pipeline in the sequence
// FFT -> IFFT -> DCT -> FFT, with random idle cycles (in_valid low) in some
// phases, and compares every valid output with a double-precision reference:
//   FFT : X[k] / 256,  X[k] = sum x[n] e^{-j 2 pi k n / 256}
//   IFFT: (1/256) sum X[n] e^{+j 2 pi k n / 256}
//   DCT : sum x(n1,n2) cos(pi(n1+1/2)k1/8) cos(pi(n2+1/2)k2/8) / 64, for the
//         real part (block 1) and the imaginary part (block 2) of the input.
// It also checks the latency (first valid output after 262 / 200 accepted
// samples of a mode) and counts the mechanisms exercised: mode switches
// (each restarts the pipeline), idle cycles (the pipeline holds), and frames
// of each mode. A mechanism that never happened counts as a failure.
module tb_r42sdf_top;
  import r42sdf_pkg::*;

  localparam int FFT_TOL = 3;   // LSBs
  localparam int DCT_TOL = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [1:0] mode;
  cplx_t din, dout;
  logic out_valid;
  logic [7:0] out_index;

  int checks = 0, failures = 0;
  int n_switch = 0, n_idle = 0;
  int frames_checked [3];
  int max_err [3];
  int cyc = 0;

  r42sdf_top dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .mode (mode),
    .din (din), .out_valid (out_valid), .out_index (out_index), .dout (dout)
  );

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  // Stored input frames (ring of 8).
  int xr [8][256];
  int xi [8][256];

  function automatic void check_val(input string what, input int got, input real exp_v,
                                    input int tol, input int m);
    int e;
    e = $rtoi((got > exp_v) ? (got - exp_v) : (exp_v - got));
    checks++;
    if (e > max_err[m]) max_err[m] = e;
    if (e > tol) begin
      failures++;
      if (failures < 20) $display("MISMATCH %s got %0d expected %f", what, got, exp_v);
    end
  endfunction

  // Run one mode for nframes of random data; idle_pct percent idle cycles.
  task automatic run_mode(input logic [1:0] m, input int nframes, input int idle_pct, input int amp);
    int fs, lat, s, nout, first_out, idx;
    real pi;
    pi = 3.14159265358979323846;
    fs  = (m == 2'd2) ? 64 : 256;
    lat = (m == 2'd2) ? 200 : 262;
    // generate data
    for (int f = 0; f < nframes; f++)
      for (int n = 0; n < fs; n++) begin
        xr[f%8][n] = int'($urandom_range(2*amp)) - amp;
        xi[f%8][n] = int'($urandom_range(2*amp)) - amp;
        if (m == 2'd2) begin
          xr[f%8][n] = xr[f%8][n] & ~15;   // 8-bit pixels placed in the upper bits
          xi[f%8][n] = xi[f%8][n] & ~15;
        end
      end
    if (mode != m) n_switch++;
    s = 0; nout = 0; first_out = -1;
    while (s < nframes * fs) begin
      @(negedge clk);
      if ($urandom_range(99) < idle_pct) begin
        in_valid = 1'b0;
        n_idle++;
      end else begin
        in_valid = 1'b1;
        mode = m;
        din.re = word_t'(xr[(s/fs)%8][s%fs]);
        din.im = word_t'(xi[(s/fs)%8][s%fs]);
      end
      #1;
      if (in_valid) begin
        if (out_valid) begin
          int fo;
          real er, ei;
          if (first_out < 0) begin
            first_out = s;
            checks++;
            if (s != lat) begin
              failures++;
              $display("latency: first output after %0d samples, expected %0d", s, lat);
            end
          end
          fo = (s - lat) / fs;
          idx = int'(out_index);
          er = 0.0; ei = 0.0;
          if (m == 2'd2) begin
            int k1, k2;
            k1 = idx / 8; k2 = idx % 8;
            for (int n = 0; n < 64; n++) begin
              real cc;
              cc = $cos(pi * ((n/8) + 0.5) * k1 / 8.0) * $cos(pi * ((n%8) + 0.5) * k2 / 8.0);
              er += xr[fo%8][n] * cc;
              ei += xi[fo%8][n] * cc;
            end
            er /= 64.0; ei /= 64.0;
            check_val("dct re", int'(dout.re), er, DCT_TOL, 2);
            check_val("dct im", int'(dout.im), ei, DCT_TOL, 2);
          end else begin
            for (int n = 0; n < 256; n++) begin
              real ang;
              ang = 2.0 * pi * real'((idx * n) % 256) / 256.0;
              if (m == 2'd1) ang = -ang;
              er += xr[fo%8][n] * $cos(ang) + xi[fo%8][n] * $sin(ang);
              ei += xi[fo%8][n] * $cos(ang) - xr[fo%8][n] * $sin(ang);
            end
            er /= 256.0; ei /= 256.0;
            check_val("fft re", int'(dout.re), er, FFT_TOL, int'(m));
            check_val("fft im", int'(dout.im), ei, FFT_TOL, int'(m));
          end
          nout++;
          if (nout % fs == 0) frames_checked[m]++;
        end
        s++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; mode = 2'd0; din = '0;
    frames_checked = '{0, 0, 0};
    max_err = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_mode(2'd0, 5, 0, 2000);    // FFT, continuous
    run_mode(2'd1, 5, 10, 2000);   // IFFT, with idle cycles
    run_mode(2'd2, 10, 10, 2040);   // 2-D DCT
    run_mode(2'd0, 4, 0, 4000);    // back to FFT, larger amplitude
    $display("frames checked: FFT %0d IFFT %0d DCT %0d; mode switches %0d; idle cycles %0d",
             frames_checked[0], frames_checked[1], frames_checked[2], n_switch, n_idle);
    $display("max error (LSB): FFT %0d IFFT %0d DCT %0d", max_err[0], max_err[1], max_err[2]);
    checks++;
    if (frames_checked[0] < 5 || frames_checked[1] < 3 || frames_checked[2] < 6) begin
      failures++; $display("too few frames checked");
    end
    checks++;
    if (n_switch < 3) begin failures++; $display("mode switch never happened"); end
    checks++;
    if (n_idle == 0) begin failures++; $display("idle cycles never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
