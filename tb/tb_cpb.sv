// tb_cpb: drives the Colour Processing Block through its three paths and
// checks the outputs against testbench references: RGB-YUV equations on the
// RGB path, horizontal chroma averaging on the 4:2:2 path and an unchanged
// word on the bypass path. It also checks that only the selected path
// produces output.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_cpb;
  import pub_pkg::*;

  localparam int W = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cpb_sel_e    sel;
  logic [23:0] in_pix;
  logic        in_valid;
  pix_flags_t  in_flags;
  yuv_t        out_pix;
  logic        out_valid;
  pix_flags_t  out_flags;

  cpb dut (.*);

  int checks = 0, failures = 0;
  yuv_t exp_q[$];
  int   path_cnt[3] = '{0, 0, 0};

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      yuv_t e;
      checks++;
      path_cnt[sel]++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output %h", out_pix);
      end else begin
        e = exp_q.pop_front();
        if (e !== out_pix) begin failures++; $display("sel %0d got %h exp %h", sel, out_pix, e); end
      end
    end
  end

  task automatic drive(input logic [23:0] p, input bit sol, input bit eol);
    @(negedge clk);
    in_valid = 1; in_pix = p; in_flags = '{sof: 1'b0, sol: sol, eol: eol, eof: 1'b0};
    @(negedge clk); in_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] r, g, b, y[W], c[W];
    yuv_t e;
    in_valid = 0; in_pix = 0; in_flags = 0; sel = CPB_RGB2YUV;
    repeat (2) @(posedge clk); rst_n = 1;
    // RGB path
    sel = CPB_RGB2YUV;
    for (int n = 0; n < 20; n++) begin
      r = 8'($urandom); g = 8'($urandom); b = 8'($urandom);
      e.y = 8'((int'(r) + 2*int'(g) + int'(b)) / 4); e.u = r - g; e.v = b - g;
      exp_q.push_back(e);
      drive({r, g, b}, 1'b1, 1'b1);
    end
    // 4:2:2 path, two lines
    repeat (3) @(negedge clk);
    sel = CPB_INTERP;
    for (int line = 0; line < 2; line++) begin
      for (int k = 0; k < W; k++) begin y[k] = 8'($urandom); c[k] = 8'($urandom); end
      for (int k = 0; k < W; k++) begin
        int a, bb;
        a  = (k > 0) ? int'(c[k-1]) : int'(c[k+1]);
        bb = (k < W-1) ? int'(c[k+1]) : int'(c[k-1]);
        e.y = y[k];
        if (k % 2 == 0) begin e.u = c[k]; e.v = 8'((a + bb) / 2); end
        else            begin e.v = c[k]; e.u = 8'((a + bb) / 2); end
        exp_q.push_back(e);
      end
      for (int k = 0; k < W; k++) drive({8'h00, y[k], c[k]}, k == 0, k == W-1);
    end
    // bypass path
    repeat (3) @(negedge clk);
    sel = CPB_BYPASS;
    for (int n = 0; n < 20; n++) begin
      e = 24'($urandom);
      exp_q.push_back(e);
      drive(e, 1'b1, 1'b1);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (path_cnt[k] == 0) begin failures++; $display("path %0d never produced output", k); end
    end
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
