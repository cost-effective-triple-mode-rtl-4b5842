// Self-checking testbench of the DCT input reordering: random 8x8 blocks in
// raster order; the expected output block y is built here directly from the
// four equations y(i1,i2) = x(2i1,2i2), y(i1,7-i2) = x(2i1,2i2+1),
// y(7-i1,i2) = x(2i1+1,2i2), y(7-i1,7-i2) = x(2i1+1,2i2+1), and checked in
// linear order 65 accepted samples after the block entered (idle cycles
// included). Twelve blocks cover every block-to-block address pattern of the
// in-place memory three times.
module tb_dct_reorder;
  import r42sdf_pkg::*;

  localparam int NF = 12;  // three wraps of the 4-block address pattern

  logic clk = 1'b0;
  logic en;
  logic [7:0] phase;
  cplx_t din, dout;
  int checks = 0, failures = 0;
  cplx_t x [NF][64];
  cplx_t y [NF][64];

  always #5 clk = ~clk;

  dct_reorder dut (.clk (clk), .en (en), .phase (phase), .din (din), .dout (dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, j;
    en = 1'b0; phase = '0; din = '0;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < 64; n++) begin
        x[f][n].re = word_t'($urandom);
        x[f][n].im = word_t'($urandom);
      end
      for (int i1 = 0; i1 < 4; i1++)
        for (int i2 = 0; i2 < 4; i2++) begin
          y[f][8*i1 + i2]           = x[f][8*(2*i1) + 2*i2];
          y[f][8*i1 + 7 - i2]       = x[f][8*(2*i1) + 2*i2 + 1];
          y[f][8*(7-i1) + i2]       = x[f][8*(2*i1+1) + 2*i2];
          y[f][8*(7-i1) + 7 - i2]   = x[f][8*(2*i1+1) + 2*i2 + 1];
        end
    end
    s = 0;
    while (s < NF * 64) begin
      @(negedge clk);
      en = ($urandom_range(9) != 0);
      if (en) begin
        phase = 8'(s);
        din = x[s/64][s%64];
        #1;
        if (s >= 65) begin
          j = s - 65;
          checks++;
          if (dout != y[j/64][j%64]) begin
            failures++;
            if (failures < 10) $display("pos %0d got %h expected %h", j, dout, y[j/64][j%64]);
          end
        end
        s++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
