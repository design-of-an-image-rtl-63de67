// tb_master_controller: checks the relays between WI and ICU (PZT command,
// position request and answer, frame size), and the encoding flow: the unit
// is armed only after a configuration with a tileable size, a V-Synch starts
// a frame, a new configuration waits until the frame is stored (mode
// switch between frames), V-Synch pulses while busy are counted as dropped,
// and unsupported sizes are reported.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_master_controller;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  colour_cfg_t  wi_colour;
  frame_size_e  wi_fsize;
  logic         wi_use_ratio, wi_cfg_valid, wi_pzt_valid, wi_pos_req;
  logic [7:0]   wi_frame_speed, wi_comp_ratio;
  logic [23:0]  wi_pzt, wi_pos, icu_pos, icu_pzt;
  logic         wi_pos_valid, icu_vsync, icu_pos_valid, icu_status_valid;
  pub_status_t  wi_status;
  logic [7:0]   icu_status;
  logic         icu_pzt_valid, icu_pos_req, icu_fsize_valid;
  frame_size_e  icu_fsize;
  colour_cfg_t  act_colour;
  frame_size_e  act_fsize;
  logic         act_use_ratio;
  logic [7:0]   act_frame_speed, act_comp_ratio;
  logic         arm, frame_started, frame_done, frame_start, frame_stored;
  logic         err_line, err_overflow, err_qt, tillers_idle, size_ok;
  logic [2:0]   qtable;
  logic [7:0]   fps_est;
  logic         fps_valid;

  master_controller dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  task automatic send_cfg(input colour_type_e t, input frame_size_e fs);
    @(negedge clk);
    wi_colour = '{ctype: t, rgb12: 1'b0, yuv422: 1'b1}; wi_fsize = fs; wi_cfg_valid = 1;
    @(negedge clk); wi_cfg_valid = 0;
  endtask

  // frame_started follows icu_vsync while armed, as the input stream unit does
  assign frame_started = arm && icu_vsync;
  assign size_ok = frame_size_tileable(act_fsize);
  assign tillers_idle = 1'b1;

  initial begin
    wi_colour = '0; wi_fsize = FS_128X128; wi_use_ratio = 0; wi_cfg_valid = 0;
    wi_frame_speed = 8'd10; wi_comp_ratio = 8'd4; wi_pzt = 0; wi_pzt_valid = 0; wi_pos_req = 0;
    icu_vsync = 0; icu_pos = 0; icu_pos_valid = 0; icu_status = 0; icu_status_valid = 0;
    frame_done = 0; frame_stored = 0; err_line = 0; err_overflow = 0; err_qt = 0; qtable = 3'd2;
    fps_est = 8'd25; fps_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // relays
    @(negedge clk); wi_pzt = 24'hABCDEF; wi_pzt_valid = 1; wi_pos_req = 1;
    icu_pos = 24'h123456; icu_pos_valid = 1; icu_status = 8'h77; icu_status_valid = 1;
    @(negedge clk); wi_pzt_valid = 0; wi_pos_req = 0; icu_pos_valid = 0; icu_status_valid = 0;
    check(icu_pzt_valid && icu_pzt == 24'hABCDEF, "PZT not relayed");
    check(icu_pos_req, "position request not relayed");
    check(wi_pos_valid && wi_pos == 24'h123456, "position not relayed");
    check(wi_status.icu_status == 8'h77, "ICU status not kept");
    check(wi_status.qtable == 3'd2, "table not reported");
    check(wi_status.fps_est == 8'd0, "frame speed shown before it is computed");
    @(negedge clk); fps_valid = 1; #1;
    check(wi_status.fps_est == 8'd25, "frame speed not reported");
    // no configuration yet: not armed
    check(!arm && wi_status.state == 3'd0, "armed without configuration");
    send_cfg(CT_YUV, FS_256X256);
    check(icu_fsize_valid && icu_fsize == FS_256X256, "frame size not sent to ICU");
    @(negedge clk);
    check(arm && act_fsize == FS_256X256 && act_colour.ctype == CT_YUV, "not armed with config");
    // frame starts
    icu_vsync = 1; @(negedge clk); icu_vsync = 0;
    check(frame_start && !arm && wi_status.state == 3'd2, "frame did not start");
    // mode switch requested during the frame
    send_cfg(CT_GREY, FS_512X768);
    check(act_colour.ctype == CT_YUV && act_fsize == FS_256X256, "config changed mid-frame");
    // V-Synch while busy: dropped
    icu_vsync = 1; @(negedge clk); icu_vsync = 0;
    check(wi_status.frames_dropped == 8'd1, "dropped frame not counted");
    err_line = 1; @(negedge clk); err_line = 0;
    check(wi_status.err_line, "line error not reported");
    frame_done = 1; @(negedge clk); frame_done = 0;
    check(wi_status.state == 3'd3, "not draining");
    repeat (3) @(negedge clk);
    check(!arm, "armed before the frame was stored");
    frame_stored = 1; @(negedge clk); frame_stored = 0;
    check(wi_status.frames_done == 16'd1, "frame not counted");
    @(negedge clk);
    check(arm && act_colour.ctype == CT_GREY && act_fsize == FS_512X768, "mode switch not applied");
    // a second frame with the new mode
    icu_vsync = 1; @(negedge clk); icu_vsync = 0;
    check(wi_status.state == 3'd2 && !wi_status.err_line, "second frame did not start clean");
    frame_done = 1; @(negedge clk); frame_done = 0;
    frame_stored = 1; @(negedge clk); frame_stored = 0;
    // unsupported size: not armed, error reported
    send_cfg(CT_RGB, FS_1024X1024);
    repeat (2) @(negedge clk);
    check(!arm && wi_status.err_size, "1024x1024 not refused");
    icu_vsync = 1; @(negedge clk); icu_vsync = 0;
    check(wi_status.frames_dropped == 8'd2 && wi_status.state == 3'd1, "refused frame handling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
