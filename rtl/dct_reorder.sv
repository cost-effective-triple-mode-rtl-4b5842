// Input reordering of the 2-D DCT mode.
//
// The 8x8 block arrives in raster order x(8*n1 + n2); each complex input word
// carries one pixel of two independent blocks (real part: block 1, imaginary
// part: block 2), so that one 2-D FFT yields two 2-D DCTs. The block is
// permuted into y(8*i1 + i2) following
//   y(i1, i2)     = x(2*i1,   2*i2)      y(i1, 7-i2)     = x(2*i1,   2*i2+1)
//   y(7-i1, i2)   = x(2*i1+1, 2*i2)      y(7-i1, 7-i2)   = x(2*i1+1, 2*i2+1)
// i.e. an even index 2i maps to i and an odd index 2i+1 maps to 7-i, in both
// dimensions.
//
// A single 64-word memory is used in place: in every slot the word read out
// (for the previous block) is replaced by the incoming word of the current
// block at the same address. For that to work the address pattern changes
// from block to block. Writing pi for the permutation above (raster index ->
// permuted position), block b uses address pi^-b(t) in slot t, both 3-bit
// halves of t passing b times through the inverse map
//   inv(i) = 2*i (i < 4),   inv(i) = 15 - 2*i (i >= 4).
// Reading that address in block b+1 at slot p then yields x_b(pi^-1(p)), which
// is y_b(p). The 3-bit permutation has order 4 (cycles 1-7-4-2 and 3-6), so
// the pattern repeats every four blocks and the block number modulo 4 is all
// the state needed.
//
// This in-place permutation memory is this design's own realisation of the
// reordering; the reference architecture folds the same permutation into the
// first stage's feedback registers (a segmented shift register). The
// permutation itself and the 8x8 block size follow the reference design.
//
// Timing: `phase[5:0]` is the index of the word at `din`, `phase[7:6]` the
// block number modulo 4 (it must count on from block to block, starting from
// any value after a restart); word j of a block leaves 65 enabled cycles
// after word j of the same block entered (one block plus the output
// register).
module dct_reorder
  import r42sdf_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] phase,
  input  cplx_t      din,
  output cplx_t      dout
);

  cplx_t mem [64];
  logic [2:0] a1, a2;
  logic [5:0] addr;

  // Inverse of the even/odd permutation of one 3-bit index.
  function automatic logic [2:0] inv8(input logic [2:0] i);
    return i[2] ? 3'(15 - 2 * int'(i)) : {i[1:0], 1'b0};
  endfunction

  // inv8 applied b times (b = 0..3).
  function automatic logic [2:0] inv8_pow(input logic [2:0] i, input logic [1:0] b);
    logic [2:0] r;
    r = i;
    for (int k = 0; k < 3; k++)
      if (k < int'(b)) r = inv8(r);
    return r;
  endfunction

  always_comb begin
    a1   = inv8_pow(phase[5:3], phase[7:6]);
    a2   = inv8_pow(phase[2:0], phase[7:6]);
    addr = {a1, a2};
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout       <= mem[addr];
      mem[addr]  <= din;
    end
  end

endmodule
