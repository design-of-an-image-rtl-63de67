// tb_tiller_controller: for every frame size, drives two lines of YUV pixels
// (and one line in grey scale) and checks which buffered tillers are written
// for each column and with which byte, together with the tile geometry and
// the number of tiles per frame. The 1024-wide sizes must be refused.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_tiller_controller;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  frame_size_e             fsize;
  logic                    grey, frame_start;
  yuv_t                    in_pix;
  logic                    in_valid;
  pix_flags_t              in_flags;
  logic [8:0]              tile_w, tile_h;
  logic [NCORES-1:0]       wr_en, tiller_used;
  logic [NCORES-1:0][7:0]  wr_data;
  logic [4:0]              tiles_per_frame;
  logic                    size_ok;

  tiller_controller dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  task automatic run(input frame_size_e fs, input bit g, input int w, input int tw,
                     input int th, input int ntiles);
    fsize = fs; grey = g;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    check(tile_w == 9'(tw) && tile_h == 9'(th), $sformatf("size %0d: tile %0dx%0d", fs, tile_w, tile_h));
    check(int'(tiles_per_frame) == ntiles, $sformatf("size %0d grey %0d: %0d tiles", fs, g, tiles_per_frame));
    check(size_ok, "size refused");
    for (int line = 0; line < 2; line++) begin
      for (int c = 0; c < w; c++) begin
        logic [NCORES-1:0] exp_en;
        yuv_t p;
        bit right;
        p = 24'($urandom);
        @(negedge clk);
        in_valid = 1; in_pix = p;
        in_flags = '{sof: (line == 0 && c == 0), sol: (c == 0), eol: (c == w-1), eof: 1'b0};
        @(negedge clk); in_valid = 0;
        right = (c >= tw);
        exp_en = '0;
        for (int comp = 0; comp < 3; comp++)
          if (!g || comp == 0) exp_en[2*comp + (right ? 1 : 0)] = 1'b1;
        check(wr_en == exp_en, $sformatf("size %0d col %0d: wr_en %b exp %b", fs, c, wr_en, exp_en));
        for (int t = 0; t < NCORES; t++) if (exp_en[t]) begin
          logic [7:0] eb;
          eb = (t < 2) ? (g ? p.v : p.y) : (t < 4) ? p.u : p.v;
          check(wr_data[t] == eb, $sformatf("tiller %0d data %h exp %h", t, wr_data[t], eb));
        end
        if ($urandom_range(1) == 0) @(negedge clk);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_pix = 0; in_flags = 0; frame_start = 0; grey = 0; fsize = FS_128X128;
    repeat (2) @(posedge clk); rst_n = 1;
    run(FS_128X128, 0, 128, 128, 128, 3);
    run(FS_256X256, 0, 256, 256, 256, 3);
    run(FS_512X512, 0, 512, 256, 256, 12);
    run(FS_512X768, 0, 512, 256, 256, 18);
    run(FS_512X768, 1, 512, 256, 256, 6);
    run(FS_256X256, 1, 256, 256, 256, 1);
    // sizes without a tiling strategy: nothing written
    fsize = FS_1024X1024; #1;
    check(!size_ok && tiller_used == '0, "1024x1024 accepted");
    @(negedge clk); in_valid = 1; in_flags = '{sof: 1'b1, sol: 1'b1, eol: 1'b0, eof: 1'b0};
    @(negedge clk); in_valid = 0;
    check(wr_en == '0, "pixel written for 1024x1024");
    fsize = FS_1024X1280; #1;
    check(!size_ok, "1024x1280 accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
