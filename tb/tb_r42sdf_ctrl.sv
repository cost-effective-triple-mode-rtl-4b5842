// Self-checking testbench of the counter controller. Streams samples in FFT,
// IFFT and DCT mode (with idle cycles) and checks, for every accepted sample,
// the twiddle exponents and the output flags against the schedule worked
// out here from the stream position of each unit:
//   FFT/IFFT: m1 = k1*n2 at position c-193 = 64k1+16n2+n3,
//             H = n3*(k1+4k2) at c-243 = 64k1+16k2+n3,
//             m2 = k1'*n2' at c-257 (mod 16 = 4k1'+n2'),
//             valid from c = 262, index = base-4 digit reverse of c-262;
//   DCT:      m1 = 2*n12*k12 at c-98 = 32k12+8n12+n2,
//             m2 = 2*e*k2' at c-131 (mod 8 = 2k2'+e),
//             H = 8*(k1+k2) at c-134 = 32k12+8k11+2k2'+h,
//             valid from c = 200, index = (c-200) mod 64.
// Also checks that a mode change restarts the count (switched flag).
module tb_r42sdf_ctrl;
  import r42sdf_pkg::*;

  logic clk = 1'b0;
  logic rst_n, in_valid;
  logic [1:0] mode_i;
  logic en, inverse, dct, out_valid, switched;
  mode_e mode;
  logic [7:0] ph_rb, ph_s1, ph_s2, ph_s3, ph_s4, ph_r2, ph_post, h_cx, out_index;
  logic [3:0] m_cm1, m_cm2;
  int checks = 0, failures = 0, n_sw = 0;

  always #5 clk = ~clk;

  r42sdf_ctrl dut (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid), .mode_i (mode_i), .en (en),
    .mode (mode), .inverse (inverse), .dct (dct), .ph_rb (ph_rb), .ph_s1 (ph_s1),
    .ph_s2 (ph_s2), .ph_s3 (ph_s3), .ph_s4 (ph_s4), .ph_r2 (ph_r2), .ph_post (ph_post),
    .m_cm1 (m_cm1), .m_cm2 (m_cm2), .h_cx (h_cx), .out_valid (out_valid),
    .out_index (out_index), .switched (switched));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int md(input int a, input int m);
    return ((a % m) + m) % m;
  endfunction

  task automatic chk(input string what, input int got, input int exp_v, input int c);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 15) $display("%s at sample %0d: got %0d expected %0d", what, c, got, exp_v);
    end
  endtask

  task automatic run(input logic [1:0] m, input int n);
    int c, p, k1, k2, n2, n3, k12, k11, k2p, h, e;
    c = 0;
    while (c < n) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) != 0);
      mode_i = m;
      #1;
      if (in_valid) begin
        if (c == 0 && switched) n_sw++;
        chk("inverse", int'(inverse), int'(m == 2'd1), c);
        if (m != 2'd2) begin
          p = md(c - 193, 256); k1 = p / 64; n2 = (p / 16) % 4;
          chk("m_cm1", int'(m_cm1), k1 * n2, c);
          p = md(c - 243, 256); k1 = p / 64; k2 = (p / 16) % 4; n3 = p % 16;
          chk("h_cx", int'(h_cx), n3 * (k1 + 4 * k2), c);
          p = md(c - 257, 16);
          chk("m_cm2", int'(m_cm2), (p / 4) * (p % 4), c);
          chk("out_valid", int'(out_valid), int'(c >= 262), c);
          if (c >= 262) begin
            p = md(c - 262, 256);
            chk("out_index", int'(out_index),
                64 * (p % 4) + 16 * ((p / 4) % 4) + 4 * ((p / 16) % 4) + p / 64, c);
          end
        end else begin
          p = md(c - 98, 64); k12 = p / 32; n2 = (p / 8) % 4;
          chk("m_cm1 dct", int'(m_cm1), 2 * k12 * n2, c);
          p = md(c - 131, 8); e = p % 2;
          chk("m_cm2 dct", int'(m_cm2), 2 * e * (p / 2), c);
          p = md(c - 134, 64); k12 = p / 32; k11 = (p / 8) % 4; k2p = (p / 2) % 4; h = p % 2;
          chk("h_cx dct", int'(h_cx), 8 * ((2 * k11 + k12) + (k2p + 4 * h)), c);
          chk("out_valid dct", int'(out_valid), int'(c >= 200), c);
          if (c >= 200) chk("out_index dct", int'(out_index), md(c - 200, 64), c);
        end
        c++;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; mode_i = 2'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(2'd0, 700);
    run(2'd1, 600);
    run(2'd2, 500);
    run(2'd0, 400);
    chk("mode switches seen", n_sw, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
