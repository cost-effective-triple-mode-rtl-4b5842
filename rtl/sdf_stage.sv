// One radix-4 single-delay-feedback (SDF) butterfly stage.
//
// Three feedback shift registers of L words each (a, b, c) sit around a
// radix-4 butterfly. The stage walks through four phases of L samples:
//   phases 0..2  the input is shifted into c -> b -> a while the oldest word of
//                a (a result of the previous group) is sent to the output;
//   phase 3      the butterfly combines a, b, c (samples n, n+L, n+2L) with the
//                input (n+3L); X0 goes to the output, X1..X3 are written back
//                into a, b, c and leave during the next phases 0..2.
// This is the delay-feedback memory organisation of the design, where the
// butterfly outputs share storage with its inputs.
//
// In the 2-D DCT mode the design needs shorter delays: with `short_len` set
// each register is tapped after LS words instead of L (the rest of the
// register is unused). With `radix2` set the stage instead works as a
// radix-2 SDF stage on register c alone (period 2*LS, output (a+b)/2 then
// (a-b)/2), which is how the first stage forms the 32-apart butterflies of the
// DCT mode. As in the design, the words behind the tap form a power-saving
// segment that is not clocked while the register is shortened (here a clock
// enable). The tapping scheme and the radix-2 scaling are this design's own.
//
// Timing: `phase` is the position of the sample currently at `din`, counted
// modulo the period; everything advances only when `en` is high; output word
// j of a group leaves 3L+1 enabled cycles (radix-2: LS+1) after input word j.
module sdf_stage
  import r42sdf_pkg::*;
#(
  parameter int unsigned L  = 64,  // feedback register length (FFT mode)
  parameter int unsigned LS = 64   // shortened length (DCT mode), LS <= L, power of two
) (
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] phase,
  input  logic       inverse,
  input  logic       short_len,
  input  logic       radix2,
  input  cplx_t      din,
  output cplx_t      dout
);

  localparam int unsigned LOGL  = $clog2(L);
  localparam int unsigned LOGLS = $clog2(LS);

  cplx_t sr_a [L];
  cplx_t sr_b [L];
  cplx_t sr_c [L];
  cplx_t a_out, b_out, c_out;
  cplx_t a_in, b_in, c_in, y_next;
  cplx_t bf_x [4];
  cplx_t bf_y [4];
  logic [1:0] sub;

  // Tap point of each register.
  always_comb begin
    if (short_len) begin
      a_out = sr_a[LS-1];
      b_out = sr_b[LS-1];
      c_out = sr_c[LS-1];
      sub   = 2'(phase >> LOGLS);
    end else begin
      a_out = sr_a[L-1];
      b_out = sr_b[L-1];
      c_out = sr_c[L-1];
      sub   = 2'(phase >> LOGL);
    end
  end

  assign bf_x[0] = a_out;
  assign bf_x[1] = b_out;
  assign bf_x[2] = c_out;
  assign bf_x[3] = din;

  r4_butterfly u_bf (
    .x       (bf_x),
    .inverse (inverse),
    .y       (bf_y)
  );

  always_comb begin
    a_in   = b_out;
    b_in   = c_out;
    c_in   = din;
    y_next = a_out;
    if (radix2) begin
      // Radix-2 SDF on register c: store, then butterfly.
      a_in = a_out;
      b_in = b_out;
      if (sub[0]) begin
        y_next = cscale(cadd(widen(c_out), widen(din)), 1);
        c_in   = cscale(csub(widen(c_out), widen(din)), 1);
      end else begin
        y_next = c_out;
        c_in   = din;
      end
    end else if (sub == 2'd3) begin
      y_next = bf_y[0];
      a_in   = bf_y[1];
      b_in   = bf_y[2];
      c_in   = bf_y[3];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      sr_a[0] <= a_in;
      sr_b[0] <= b_in;
      sr_c[0] <= c_in;
      for (int i = 1; i < L; i++) begin
        // In the shortened configuration the words behind the tap are a
        // power-saving segment: they hold their contents (clock-enable gated).
        if (!short_len || i < LS) begin
          sr_a[i] <= sr_a[i-1];
          sr_b[i] <= sr_b[i-1];
          sr_c[i] <= sr_c[i-1];
        end
      end
      dout <= y_next;
    end
  end

endmodule
