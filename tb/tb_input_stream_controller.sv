// tb_input_stream_controller: checks the format and CPB path chosen for
// every colour type and style, the line width and height given to the
// BSIPO, and the gating of the ICU stream: a V-Synch is passed only while
// armed, bytes and H-Synch only inside an accepted frame, and the CPB's
// end-of-frame pixel ends it. The line width and height are checked for
// every frame size, and 3000 cycles of random stimulus are compared with a
// reference model of the frame gate.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_input_stream_controller;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  colour_cfg_t      cfg;
  frame_size_e      fsize;
  logic             arm;
  logic [7:0]       icu_byte;
  logic             icu_valid, icu_vsync, icu_hsync;
  bsipo_mode_e      b_mode;
  logic [DIM_W-1:0] b_width, b_height;
  logic [7:0]       b_byte;
  logic             b_valid, b_vsync, b_hsync;
  cpb_sel_e         c_sel;
  logic             cpb_valid;
  pix_flags_t       cpb_flags;
  logic             frame_started, frame_done, in_frame;

  input_stream_controller dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  task automatic mode(input colour_type_e t, input bit r12, input bit y422,
                      input bsipo_mode_e bm, input cpb_sel_e cs);
    cfg = '{ctype: t, rgb12: r12, yuv422: y422}; #1;
    check(b_mode == bm && c_sel == cs, $sformatf("cfg %b: mode %0d sel %0d", cfg, b_mode, c_sel));
  endtask

  initial begin
    icu_byte = 8'h5A; icu_valid = 0; icu_vsync = 0; icu_hsync = 0; arm = 0;
    cpb_valid = 0; cpb_flags = 0; fsize = FS_512X768;
    cfg = '{ctype: CT_RGB, rgb12: 1'b0, yuv422: 1'b0};
    mode(CT_RGB,  0, 0, BM_RGB24,  CPB_RGB2YUV);
    mode(CT_RGB,  1, 0, BM_RGB12,  CPB_RGB2YUV);
    mode(CT_YUV,  0, 1, BM_YUV422, CPB_INTERP);
    mode(CT_YUV,  0, 0, BM_YUV444, CPB_BYPASS);
    mode(CT_GREY, 1, 1, BM_GREY,   CPB_BYPASS);
    check(b_width == 512 && b_height == 768, "512x768 dimensions");
    fsize = FS_128X128; #1;
    check(b_width == 128 && b_height == 128, "128x128 dimensions");
    repeat (2) @(posedge clk); rst_n = 1;
    // not armed: nothing passes
    @(negedge clk); icu_vsync = 1; icu_valid = 0; #1;
    check(!b_vsync && !frame_started, "V-Synch passed while not armed");
    @(negedge clk); icu_vsync = 0; icu_valid = 1; icu_hsync = 1; #1;
    check(!b_valid && !b_hsync, "stream passed outside a frame");
    // armed: frame starts
    @(negedge clk); icu_valid = 0; icu_hsync = 0; arm = 1; icu_vsync = 1; #1;
    check(b_vsync && frame_started, "V-Synch not passed while armed");
    @(negedge clk); icu_vsync = 0; arm = 0; icu_valid = 1; icu_hsync = 1; #1;
    check(in_frame && b_valid && b_hsync && b_byte == 8'h5A, "stream blocked inside a frame");
    // another V-Synch inside the frame is not passed
    @(negedge clk); icu_valid = 0; icu_hsync = 0; icu_vsync = 1; arm = 1; #1;
    check(!b_vsync, "V-Synch passed inside a frame");
    @(negedge clk); icu_vsync = 0; arm = 0;
    // end of frame
    cpb_valid = 1; cpb_flags = '{sof: 1'b0, sol: 1'b0, eol: 1'b1, eof: 1'b1}; #1;
    check(frame_done, "frame_done missing");
    @(negedge clk); cpb_valid = 0; icu_valid = 1; #1;
    check(!in_frame && !b_valid, "frame did not end");
    // every frame size
    begin
      int ws[6] = '{128, 256, 512, 512, 1024, 1024};
      int hs[6] = '{128, 256, 512, 768, 1024, 1280};
      for (int k = 0; k < 6; k++) begin
        fsize = frame_size_e'(k); #1;
        check(int'(b_width) == ws[k] && int'(b_height) == hs[k], $sformatf("size %0d: %0d x %0d", k, b_width, b_height));
      end
    end
    // random stimulus against a reference frame gate
    begin
      bit ref_in = 0;
      int n_start = 0, n_done = 0;
      for (int n = 0; n < 3000; n++) begin
        bit exp_start, exp_done;
        @(negedge clk);
        arm = 1'($urandom_range(3) == 0); icu_vsync = 1'($urandom_range(15) == 0);
        icu_hsync = 1'($urandom_range(7) == 0); icu_valid = 1'($urandom);
        icu_byte = 8'($urandom); cpb_valid = 1'($urandom);
        cpb_flags = '{sof: 1'b0, sol: 1'b0, eol: 1'b0, eof: 1'($urandom_range(15) == 0)};
        #1;
        exp_start = arm && icu_vsync && !ref_in;
        exp_done  = ref_in && cpb_valid && cpb_flags.eof;
        check(in_frame == ref_in && frame_started == exp_start && b_vsync == exp_start &&
              frame_done == exp_done && b_hsync == (ref_in && icu_hsync) &&
              b_valid == (ref_in && icu_valid && !icu_vsync) && b_byte == icu_byte,
              $sformatf("cycle %0d: gate differs (in_frame %b, ref %b)", n, in_frame, ref_in));
        if (exp_start) begin ref_in = 1; n_start++; end
        else if (exp_done) begin ref_in = 0; n_done++; end
      end
      check(n_start > 10 && n_done > 10, "random frames too few");
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
