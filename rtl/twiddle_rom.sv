// Eight-folded coefficient ROM: returns W256^H = cos(2*pi*H/256) - j*sin(2*pi*H/256)
// for any 8-bit exponent H while storing only 32 words.
//
// The ROM holds (cos, sin) of the angles 2*pi*s/256 for s = 0..31, as 13-bit
// values with 11 fractional bits (round(2048*cos), round(2048*sin)). H is
// split as H = 64*q + s. For s <= 32 the word at address s is used (the
// 45-degree point s = 32 is the constant (1448, 1448), the same value the
// constant multiplier uses); for s > 32 the address is the 6-bit two's
// complement of s, i.e. 64 - s, and the cos and sin parts are swapped. The
// quadrant q is applied as a rotation by (-j)^q. This follows the design's
// address-mode / data-mode split of the folding; the exact split between
// "address" and "data" logic here is this design's own.
//
// Purely combinational.
module twiddle_rom
  import r42sdf_pkg::*;
(
  input  logic [7:0] h,
  output cplx_t      w
);

  logic [1:0] q;
  logic [5:0] s, addr;
  logic       swap;
  word_t      c, n, cr, nr;
  cplx_w_t    base;

  // 32-word table: index s -> round(2048*cos(2*pi*s/256)), round(2048*sin(2*pi*s/256)).
  always_comb begin
    unique case (addr[4:0])
      5'd0 : begin c = 13'sd2048; n = 13'sd0;    end
      5'd1 : begin c = 13'sd2047; n = 13'sd50;   end
      5'd2 : begin c = 13'sd2046; n = 13'sd100;  end
      5'd3 : begin c = 13'sd2042; n = 13'sd151;  end
      5'd4 : begin c = 13'sd2038; n = 13'sd201;  end
      5'd5 : begin c = 13'sd2033; n = 13'sd251;  end
      5'd6 : begin c = 13'sd2026; n = 13'sd301;  end
      5'd7 : begin c = 13'sd2018; n = 13'sd350;  end
      5'd8 : begin c = 13'sd2009; n = 13'sd400;  end
      5'd9 : begin c = 13'sd1998; n = 13'sd449;  end
      5'd10: begin c = 13'sd1987; n = 13'sd498;  end
      5'd11: begin c = 13'sd1974; n = 13'sd546;  end
      5'd12: begin c = 13'sd1960; n = 13'sd595;  end
      5'd13: begin c = 13'sd1945; n = 13'sd642;  end
      5'd14: begin c = 13'sd1928; n = 13'sd690;  end
      5'd15: begin c = 13'sd1911; n = 13'sd737;  end
      5'd16: begin c = 13'sd1892; n = 13'sd784;  end
      5'd17: begin c = 13'sd1872; n = 13'sd830;  end
      5'd18: begin c = 13'sd1851; n = 13'sd876;  end
      5'd19: begin c = 13'sd1829; n = 13'sd921;  end
      5'd20: begin c = 13'sd1806; n = 13'sd965;  end
      5'd21: begin c = 13'sd1782; n = 13'sd1009; end
      5'd22: begin c = 13'sd1757; n = 13'sd1053; end
      5'd23: begin c = 13'sd1730; n = 13'sd1096; end
      5'd24: begin c = 13'sd1703; n = 13'sd1138; end
      5'd25: begin c = 13'sd1674; n = 13'sd1179; end
      5'd26: begin c = 13'sd1645; n = 13'sd1220; end
      5'd27: begin c = 13'sd1615; n = 13'sd1260; end
      5'd28: begin c = 13'sd1583; n = 13'sd1299; end
      5'd29: begin c = 13'sd1551; n = 13'sd1338; end
      5'd30: begin c = 13'sd1517; n = 13'sd1375; end
      default: begin c = 13'sd1483; n = 13'sd1412; end
    endcase
  end

  always_comb begin
    q    = h[7:6];
    s    = h[5:0];
    swap = (s > 6'd32);
    addr = swap ? 6'(-s) : s;
    if (addr == 6'd32) begin
      cr = 13'sd1448;
      nr = 13'sd1448;
    end else if (swap) begin
      cr = n;
      nr = c;
    end else begin
      cr = c;
      nr = n;
    end
    base.re = wide_t'(cr);
    base.im = -wide_t'(nr);
    w = cscale(rot_mj(base, q), 0);
  end

endmodule
