// Additional radix-2 SDF butterfly stage with a one-word shift register.
//
// In the 2-D DCT mode the 8-point row DFT over n2 is split into an even and
// an odd radix-4 half (computed by the third radix-4 stage) that must be
// combined as Y[k2] = E + W8^k2 * O and Y[k2+4] = E - W8^k2 * O; the twiddle is
// applied by the constant multiplier in front of this stage. The samples
// arrive in pairs: E when phase[0] = 0, the already-rotated O when
// phase[0] = 1. E is held in the one-word register; when O arrives the sum
// leaves and the difference is fed back into the register, to leave on the
// next cycle. Both results are scaled by 1/2 with rounding (this design's
// scaling rule). Two complex adders and one register word, as in the design.
//
// Timing: output word j leaves 2 enabled cycles after input word j.
module r2_bf
  import r42sdf_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  logic  phase0,
  input  cplx_t din,
  output cplx_t dout
);

  cplx_t hold;

  always_ff @(posedge clk) begin
    if (en) begin
      if (phase0) begin
        dout <= cscale(cadd(widen(hold), widen(din)), 1);
        hold <= cscale(csub(widen(hold), widen(din)), 1);
      end else begin
        dout <= hold;
        hold <= din;
      end
    end
  end

endmodule
