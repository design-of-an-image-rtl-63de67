// tb_interpolator: feeds random YUV 4:2:2 lines (Y0U0 Y1V1 ...) with two or
// more cycles between pairs and checks every 4:4:4 output pixel against a
// reference computed in the testbench: own chroma kept, missing chroma the
// rounded-down average of the two neighbours, a single neighbour copied at
// the line ends. Also checks that the last pixel of a line leaves exactly
// one clock after the one before it.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_interpolator;
  import pub_pkg::*;

  localparam int W = 10, H = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [23:0] in_pix;
  logic        in_valid;
  pix_flags_t  in_flags;
  yuv_t        out_pix;
  logic        out_valid;
  pix_flags_t  out_flags;

  interpolator dut (.*);

  int checks = 0, failures = 0;
  yuv_t       exp_q[$];
  pix_flags_t expf_q[$];
  int         last_out_t = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      yuv_t e; pix_flags_t f;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = exp_q.pop_front(); f = expf_q.pop_front();
        if (e !== out_pix || f !== out_flags) begin
          failures++; $display("got %h/%b exp %h/%b", out_pix, out_flags, e, f);
        end
        if (out_flags.eol) begin
          checks++;
          if (cyc - last_out_t != 1) begin
            failures++; $display("last pixel of line %0d cycles late", cyc - last_out_t);
          end
        end
      end
      last_out_t = cyc;
    end
  end

  initial begin
    logic [7:0] y[W], c[W];
    int u, v;
    in_valid = 0; in_pix = 0; in_flags = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < H; r++) begin
      for (int k = 0; k < W; k++) begin
        y[k] = 8'($urandom); c[k] = 8'($urandom);
      end
      // reference: even pixels own U, odd pixels own V
      for (int k = 0; k < W; k++) begin
        yuv_t e; pix_flags_t f;
        int a, b;
        a = (k > 0) ? int'(c[k-1]) : int'(c[k+1]);
        b = (k < W-1) ? int'(c[k+1]) : int'(c[k-1]);
        e.y = y[k];
        if (k % 2 == 0) begin e.u = c[k]; e.v = 8'((a + b) / 2); end
        else            begin e.v = c[k]; e.u = 8'((a + b) / 2); end
        f.sof = (r == 0 && k == 0); f.sol = (k == 0); f.eol = (k == W-1);
        f.eof = (k == W-1 && r == H-1);
        exp_q.push_back(e); expf_q.push_back(f);
      end
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        in_valid = 1; in_pix = {8'h00, y[k], c[k]};
        in_flags.sof = (r == 0 && k == 0); in_flags.sol = (k == 0);
        in_flags.eol = (k == W-1); in_flags.eof = (k == W-1 && r == H-1);
        @(negedge clk); in_valid = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d pixels missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
