// Self-checking testbench of the additional radix-2 stage: random (E, O)
// pairs, some idle cycles; expects (E+O)/2 then (E-O)/2 (rounded half-to-even) at
// a latency of 2 accepted samples.
module tb_r2_bf;
  import r42sdf_pkg::*;

  localparam int NS = 600;

  logic clk = 1'b0;
  logic en, phase0;
  cplx_t din, dout;
  int checks = 0, failures = 0;
  int xr [NS], xi [NS];

  always #5 clk = ~clk;

  r2_bf dut (.clk (clk), .en (en), .phase0 (phase0), .din (din), .dout (dout));

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

  initial begin
    int s, j, er, ei;
    en = 1'b0; phase0 = 1'b0; din = '0;
    for (int i = 0; i < NS; i++) begin
      xr[i] = int'($urandom_range(8190)) - 4095;
      xi[i] = int'($urandom_range(8190)) - 4095;
    end
    s = 0;
    while (s < NS) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      if (en) begin
        phase0 = s[0];
        din.re = word_t'(xr[s]); din.im = word_t'(xi[s]);
        #1;
        if (s >= 2) begin
          j = s - 2;
          if (j % 2 == 0) begin
            er = rne(xr[j] + xr[j+1], 1); ei = rne(xi[j] + xi[j+1], 1);
          end else begin
            er = rne(xr[j-1] - xr[j], 1); ei = rne(xi[j-1] - xi[j], 1);
          end
          checks++;
          if (int'(dout.re) != er || int'(dout.im) != ei) begin
            failures++;
            if (failures < 10) $display("j=%0d got %0d,%0d expected %0d,%0d", j, dout.re, dout.im, er, ei);
          end
        end
        s++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
