// tb_bsipo: self-checking test of the byte-serial to parallel converter.
// Sends a small frame in each of the five pixel formats with random bytes
// and random idle cycles, and compares every emitted pixel and its flags
// with a reference built in the testbench from the format table. Also checks
// that a short line and surplus bytes raise err_line, and that a 24-bit
// pixel leaves one clock after its last byte.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_bsipo;
  import pub_pkg::*;

  localparam int W = 8, H = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bsipo_mode_e      mode;
  logic [DIM_W-1:0] width = DIM_W'(W), height = DIM_W'(H);
  logic [7:0]       in_byte;
  logic             in_valid, vsync, hsync;
  logic [23:0]      out_pix;
  logic             out_valid;
  pix_flags_t       out_flags;
  logic             err_line;

  bsipo dut (.*);

  int checks = 0, failures = 0, errs = 0;
  logic [23:0] exp_pix[$];
  logic [23:0] p;
  pix_flags_t f;
  pix_flags_t  exp_flg[$];

  always @(posedge clk) begin
    if (err_line) errs++;
    if (out_valid && rst_n) begin
      checks++;
      if (exp_pix.size() == 0) begin
        failures++; $display("unexpected pixel %h", out_pix);
      end else begin
        p = exp_pix.pop_front(); f = exp_flg.pop_front();
        if (p !== out_pix || f !== out_flags) begin
          failures++;
          $display("mode %0d: got %h/%b exp %h/%b", mode, out_pix, out_flags, p, f);
        end
      end
    end
  end

  // Stimulus queue: 0..255 a byte, 256 V-Synch, 257 H-Synch
  int stim[$];
  int x;
  bit no_gaps = 0;
  always @(posedge clk) begin
    in_valid <= 0; vsync <= 0; hsync <= 0;
    if (rst_n && stim.size() != 0 && (no_gaps || $urandom_range(3) != 0)) begin
      x = stim.pop_front();
      if (x == 256) vsync <= 1;
      else if (x == 257) hsync <= 1;
      else begin in_valid <= 1; in_byte <= 8'(x); end
    end
  end

  task send(input logic [7:0] b);
    stim.push_back(int'(b));
  endtask

  task pulse(input bit v);
    stim.push_back(v ? 256 : 257);
  endtask

  task drain();
    while (stim.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task push(input logic [23:0] p, input int r, input int c);
    pix_flags_t f;
    f.sof = (r == 0 && c == 0); f.sol = (c == 0);
    f.eol = (c == W-1); f.eof = (c == W-1 && r == H-1);
    exp_pix.push_back(p); exp_flg.push_back(f);
  endtask

  task run_frame(input bsipo_mode_e m);
    logic [7:0] a, b, c;
    int col;
    mode <= m; @(posedge clk);
    pulse(1);
    for (int r = 0; r < H; r++) begin
      pulse(0);
      col = 0;
      while (col < W) begin
        a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
        case (m)
          BM_RGB24, BM_YUV444: begin
            push({a, b, c}, r, col); send(a); send(b); send(c); col++;
          end
          BM_RGB12: begin
            push({4'h0, a[7:4], 4'h0, a[3:0], 4'h0, b[7:4]}, r, col);
            push({4'h0, b[3:0], 4'h0, c[7:4], 4'h0, c[3:0]}, r, col + 1);
            send(a); send(b); send(c); col += 2;
          end
          BM_YUV422: begin
            push({8'h00, a, b}, r, col); send(a); send(b); col++;
          end
          default: begin
            push({16'h0, a}, r, col); send(a); col++;
          end
        endcase
      end
    end
    drain();
  endtask

  initial begin
    in_valid = 0; vsync = 0; hsync = 0; in_byte = 0; mode = BM_RGB24;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run_frame(BM_RGB24);
    run_frame(BM_RGB12);
    run_frame(BM_YUV422);
    run_frame(BM_YUV444);
    run_frame(BM_GREY);
    checks++;
    if (exp_pix.size() != 0) begin failures++; $display("%0d pixels missing", exp_pix.size()); end
    checks++;
    if (errs != 0) begin failures++; $display("spurious err_line"); end
    // latency: a 24-bit pixel one clock after its third byte
    mode <= BM_RGB24; pulse(1); pulse(0); drain();
    push(24'h123456, 0, 0);
    no_gaps = 1;
    send(8'h12); send(8'h34); send(8'h56);
    @(posedge clk); @(posedge clk); @(posedge clk);
    #1 checks++;
    if (!(out_valid && out_pix == 24'h123456)) begin failures++; $display("latency wrong"); end
    no_gaps = 0;
    // short line: H-Synch in mid line
    send(8'h01); send(8'h02); send(8'h03);
    push(24'h010203, 0, 1);
    pulse(0);
    drain();
    checks++; if (errs != 1) begin failures++; $display("short line not flagged"); end
    // surplus bytes: grey line of W+1 bytes
    mode <= BM_GREY; pulse(1); pulse(0);
    for (int k = 0; k < W + 1; k++) begin
      if (k < W) push({16'h0, 8'(k)}, 0, k);
      send(8'(k));
    end
    drain();
    checks++; if (errs != 2) begin failures++; $display("surplus bytes not flagged (%0d)", errs); end
    checks++; if (exp_pix.size() != 0) begin failures++; $display("pixels missing at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
