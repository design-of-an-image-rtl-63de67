// tb_rgb_yuv_core: checks the RGB to YUV equations on random and corner
// pixels (Y = (R+2G+B)/4, U = R-G, V = B-G, the differences as 8-bit two's
// complement), the one-clock latency and that flags travel with the pixel.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_rgb_yuv_core;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [23:0] in_pix;
  logic        in_valid;
  pix_flags_t  in_flags;
  yuv_t        out_pix;
  logic        out_valid;
  pix_flags_t  out_flags;

  rgb_yuv_core dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int r, g, b, ey, eu, ev;
    in_valid = 0; in_pix = 0; in_flags = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 0)      in_pix = 24'hFF00FF;
      else if (n == 1) in_pix = 24'h00FF00;
      else if (n == 2) in_pix = 24'hFFFFFF;
      else             in_pix = 24'($urandom);
      in_flags = 4'($urandom);
      in_valid = 1;
      r = int'(in_pix[23:16]); g = int'(in_pix[15:8]); b = int'(in_pix[7:0]);
      ey = (r + 2*g + b) / 4; eu = (r - g) & 255; ev = (b - g) & 255;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(out_pix.y) != ey || int'(out_pix.u) != eu ||
          int'(out_pix.v) != ev || out_flags !== in_flags) begin
        failures++;
        $display("rgb %h: got %h exp %h %h %h", in_pix, out_pix, ey[7:0], eu[7:0], ev[7:0]);
      end
      if ($urandom_range(1) == 0) begin
        @(negedge clk); in_valid = 0;
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("valid without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
