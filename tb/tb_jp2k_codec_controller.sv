// tb_jp2k_codec_controller: checks the quantisation table choice in both
// modes against a reference loop in the testbench (lowest ratio that meets
// the frame speed over a 1 MB/s link, or the requested ratio), the error
// flag when no table is enough, the one-clock load strobe, and the frame
// speed estimate (ratio x link rate / raw frame bytes, saturated at 255)
// 40 clocks after the edge that samples apply.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_jp2k_codec_controller;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        apply, grey, use_ratio, qt_load, err_qt, fps_valid;
  logic [7:0]  fps_est;
  frame_size_e fsize;
  logic [7:0]  frame_speed, comp_ratio, qt_ratio;
  logic [2:0]  qtable;

  jp2k_codec_controller dut (.*);

  int checks = 0, failures = 0;
  int ratios[5] = '{2, 5, 10, 20, 60};
  int hits[6] = '{0, 0, 0, 0, 0, 0};

  initial begin
    apply = 0; grey = 0; use_ratio = 0; fsize = FS_128X128; frame_speed = 1; comp_ratio = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint raw;
      int exp_k;
      bit exp_err;
      fsize = frame_size_e'($urandom_range(5));
      grey = 1'($urandom); use_ratio = 1'($urandom);
      frame_speed = 8'($urandom_range(1, 60)); comp_ratio = 8'($urandom_range(1, 70));
      raw = longint'(frame_width(fsize)) * longint'(frame_height(fsize)) * (grey ? 1 : 3);
      exp_k = 4; exp_err = 1;
      for (int k = 4; k >= 0; k--)
        if (use_ratio ? (ratios[k] >= int'(comp_ratio))
                      : (longint'(ratios[k]) * 1000000 >= raw * longint'(frame_speed))) begin
          exp_k = k; exp_err = 0;
        end
      hits[exp_err ? 5 : exp_k]++;
      @(negedge clk); apply = 1;
      @(negedge clk); apply = 0;
      checks++;
      if (!qt_load || int'(qtable) != exp_k || int'(qt_ratio) != ratios[exp_k] || err_qt != exp_err) begin
        failures++;
        $display("fs %0d grey %0d mode %0d speed %0d ratio %0d: table %0d err %0d, exp %0d %0d",
                 fsize, grey, use_ratio, frame_speed, comp_ratio, qtable, err_qt, exp_k, exp_err);
      end
      @(negedge clk);
      checks++;
      if (qt_load) begin failures++; $display("qt_load longer than one clock"); end
      begin
        longint e;
        e = longint'(ratios[exp_k]) * 1000000 / raw;
        if (e > 255) e = 255;
        repeat (38) @(negedge clk);
        checks++;
        if (fps_valid) begin failures++; $display("fps_est valid too early"); end
        @(negedge clk);
        checks++;
        if (!fps_valid || longint'(fps_est) != e) begin
          failures++;
          $display("fs %0d grey %0d table %0d: fps_est %0d valid %b, exp %0d", fsize, grey, exp_k,
                   fps_est, fps_valid, e);
        end
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("outcome %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
