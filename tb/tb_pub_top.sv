// tb_pub_top: end-to-end test of the PUB at its default sizes.
//
// An ICU model sends frames byte by byte, with V-Synch and H-Synch pulses,
// random idle bytes and line blanking, in every colour format and every
// tileable frame size (the largest, 512 x 768, included). Six core models
// take the tiles from the six buffered tillers and return short code
// streams, which a WI model reads back from the output memory.
//
// Checked against references computed here from the source pixels:
//   - every sample each core receives (value, tile start/end flags), i.e.
//     BSIPO unpacking, RGB-YUV conversion, 4:2:2 interpolation, bypass and
//     the tile order of the odd/even tillers;
//   - every code stream read back by WI, one per tile, with its checksum;
//   - the quantisation table loaded for each frame;
//   - the relays between WI and ICU and the refusal of a 1024 x 1024 frame.
// Mechanisms counted, each must occur: every colour path, a mode switch
// between frames, two tile columns, a tiller reused for a second tile row,
// a tiller waiting for the writer, a core holding off its tiller, a core
// waiting for the output arbiter, a dropped V-Synch, a refused size, a
// run of 64 samples at one per clock into a core, and a tiller overflow
// (core 0 held off) after which the frame must still complete and report
// err_overflow; the data of the held core is not checked in that frame; and
// an over-long line whose surplus bytes must be dropped and flagged as a line
// error without disturbing the frame.
//
// The expected values are worked out in the testbench itself, from the
// rules described for the block, independently of the RTL.
module tb_pub_top;
  import pub_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ICU
  logic [7:0]  icu_byte = 0;
  logic        icu_byte_valid = 0, icu_vsync = 0, icu_hsync = 0;
  logic [23:0] icu_pos = 0;
  logic        icu_pos_valid = 0;
  logic [7:0]  icu_status = 0;
  logic        icu_status_valid = 0;
  logic [23:0] icu_pzt;
  logic        icu_pzt_valid, icu_pos_req, icu_fsize_valid;
  frame_size_e icu_fsize;
  // WI
  colour_cfg_t wi_colour = '0;
  frame_size_e wi_fsize = FS_128X128;
  logic        wi_use_ratio = 0;
  logic [7:0]  wi_frame_speed = 0, wi_comp_ratio = 0;
  logic        wi_cfg_valid = 0;
  logic [23:0] wi_pzt = 0;
  logic        wi_pzt_valid = 0, wi_pos_req = 0;
  logic [23:0] wi_pos;
  logic        wi_pos_valid;
  pub_status_t wi_status;
  logic        wi_rd_req = 0;
  logic [7:0]  wi_rd_data;
  logic        wi_rd_valid;
  logic [20:0] wi_bytes_avail;
  // cores
  logic [NCORES-1:0][7:0] core_pix, core_cs_data;
  logic [NCORES-1:0]      core_pix_valid, core_sot, core_eot, core_pix_ready, core_enable;
  logic [NCORES-1:0]      core_cs_valid, core_cs_last, core_cs_ready;
  logic [2:0]             core_qtable;
  logic                   core_qt_load;
  // memory
  logic        mem_we, mem_re;
  logic [19:0] mem_waddr, mem_raddr;
  logic [7:0]  mem_wdata, mem_rdata;

  pub_top dut (.*);

  ext_mem_model #(.AW(20)) u_mem (.clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                                  .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  // hold_core[t] makes core t refuse samples for a while (tiller overflow test)
  logic [NCORES-1:0] hold_core = '0, m_ready;
  bit                lossy [NCORES];   // data of this core's tiles not checked
  assign core_pix_ready = m_ready & ~hold_core;

  for (genvar t = 0; t < NCORES; t++) begin : g_core
    jpeg2000_core_model #(.ID(t), .STALL(t != 0)) u_core (
      .clk, .rst_n, .frame_start(dut.frame_start),
      .pix(core_pix[t]), .pix_valid(core_pix_valid[t] & ~hold_core[t]), .sot(core_sot[t]),
      .eot(core_eot[t]), .pix_ready(m_ready[t]),
      .cs_data(core_cs_data[t]), .cs_valid(core_cs_valid[t]), .cs_last(core_cs_last[t]),
      .cs_ready(core_cs_ready[t]));
  end

  int checks = 0, failures = 0;
  int frame_no = 0;

  // ---------------- source image and reference model ----------------
  colour_cfg_t cur_cfg;
  frame_size_e cur_fs;

  function automatic logic [7:0] h(int f, int r, int c, int k);
    int unsigned x;
    x = (f * 7919) ^ (r * 40503) ^ (c * 2654435761) ^ (k * 97);
    x = x ^ (x >> 13); x = x * 1103515245; x = x ^ (x >> 16);
    return x[7:0];
  endfunction

  function automatic int width_of(frame_size_e fs);  return int'(frame_width(fs));  endfunction
  function automatic int height_of(frame_size_e fs); return int'(frame_height(fs)); endfunction

  function automatic logic [7:0] src_chroma422(int f, int r, int c);
    return h(f, r, c, 1);
  endfunction

  // expected component k (0 Y, 1 U, 2 V) at (r, c) after the CPB
  function automatic logic [7:0] expect_comp(int f, colour_cfg_t cfg, int w, int r, int c, int k);
    logic [7:0] R, G, B, y, own, oth;
    int a, b;
    unique case (cfg.ctype)
      CT_RGB: begin
        R = h(f, r, c, 0); G = h(f, r, c, 1); B = h(f, r, c, 2);
        if (cfg.rgb12) begin R = R & 8'h0F; G = G & 8'h0F; B = B & 8'h0F; end
        if (k == 0) return 8'((int'(R) + 2 * int'(G) + int'(B)) / 4);
        if (k == 1) return R - G;
        return B - G;
      end
      CT_YUV: begin
        if (!cfg.yuv422) return h(f, r, c, k);
        y = h(f, r, c, 0); own = src_chroma422(f, r, c);
        a = (c > 0) ? int'(src_chroma422(f, r, c - 1)) : int'(src_chroma422(f, r, c + 1));
        b = (c < w - 1) ? int'(src_chroma422(f, r, c + 1)) : int'(src_chroma422(f, r, c - 1));
        oth = 8'((a + b) / 2);
        if (k == 0) return y;
        if ((c % 2 == 0) == (k == 1)) return own;
        return oth;
      end
      default: return h(f, r, c, 0);
    endcase
  endfunction

  // ---------------- ICU model ----------------
  // Stimulus queue: 0..255 a byte, 256 V-Synch, 257 H-Synch, 258 an idle cycle.
  // One item per clock; about one clock in sixteen is left idle at random.
  int icu_q[$];
  always @(posedge clk) begin
    icu_byte_valid <= 0; icu_vsync <= 0; icu_hsync <= 0;
    if (rst_n && icu_q.size() != 0 && $urandom_range(15) != 0) begin
      int x;
      x = icu_q.pop_front();
      if (x == 256) icu_vsync <= 1;
      else if (x == 257) icu_hsync <= 1;
      else if (x < 256) begin icu_byte <= 8'(x); icu_byte_valid <= 1; end
    end
  end

  task automatic icu_put(input int x);
    icu_q.push_back(x);
  endtask

  task automatic icu_put_byte(input logic [7:0] b);
    icu_q.push_back(int'(b));
  endtask

  task automatic icu_wait_empty();
    while (icu_q.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  int long_line_row = -1;

  task automatic icu_frame(input int f, input colour_cfg_t cfg, input frame_size_e fs);
    int w, hgt;
    w = width_of(fs); hgt = height_of(fs);
    icu_put(256); icu_put(258);
    for (int r = 0; r < hgt; r++) begin
      while (icu_q.size() > 4000) @(posedge clk);
      icu_put(257);
      repeat ($urandom_range(3)) icu_put(258);
      for (int c = 0; c < w; c++) begin
        unique case (cfg.ctype)
          CT_RGB: begin
            if (!cfg.rgb12) begin
              icu_put_byte(h(f, r, c, 0)); icu_put_byte(h(f, r, c, 1)); icu_put_byte(h(f, r, c, 2));
            end else if (c % 2 == 0) begin
              icu_put_byte({h(f, r, c, 0)[3:0], h(f, r, c, 1)[3:0]});
              icu_put_byte({h(f, r, c, 2)[3:0], h(f, r, c + 1, 0)[3:0]});
              icu_put_byte({h(f, r, c + 1, 1)[3:0], h(f, r, c + 1, 2)[3:0]});
            end
          end
          CT_YUV: begin
            if (cfg.yuv422) begin
              icu_put_byte(h(f, r, c, 0)); icu_put_byte(src_chroma422(f, r, c));
            end else begin
              icu_put_byte(h(f, r, c, 0)); icu_put_byte(h(f, r, c, 1)); icu_put_byte(h(f, r, c, 2));
            end
          end
          default: icu_put_byte(h(f, r, c, 0));
        endcase
      end
      // an over-long line: the surplus bytes must be dropped and flagged
      if (r == long_line_row) begin icu_put_byte(8'hA5); icu_put_byte(8'h5A); end
      repeat ($urandom_range(4)) icu_put(258);
    end
    icu_wait_empty();
  endtask

  // ---------------- core-side checking ----------------
  int n_samp [NCORES];
  int exp_samples_total = 0, got_samples = 0;
  int run_len [NCORES];
  int max_run = 0;
  int cnt_core_hold = 0, cnt_starved = 0, cnt_arb_wait = 0, cnt_reuse = 0, cnt_right = 0;
  logic [15:0] tile_sum_exp [int];

  always @(posedge clk) begin
    if (rst_n && dut.frame_start) for (int t = 0; t < NCORES; t++) n_samp[t] = 0;
    else if (rst_n) begin
      for (int t = 0; t < NCORES; t++) begin
        if (dut.t_starved[t]) cnt_starved++;
        if (core_pix_valid[t] && !core_pix_ready[t]) cnt_core_hold++;
        if (core_cs_valid[t] && !core_cs_ready[t]) cnt_arb_wait++;
        if (core_pix_valid[t] && core_pix_ready[t]) begin
          int tw, th, T, tile, tr, tc, fr, fc, comp, w;
          logic [7:0] e;
          w  = width_of(cur_fs);
          tw = int'(dut.tile_w); th = int'(dut.tile_h); T = tw * th;
          tile = n_samp[t] / T; tr = (n_samp[t] % T) / tw; tc = n_samp[t] % tw;
          fr = tile * th + tr; fc = (t % 2) * tw + tc; comp = t / 2;
          e = (cur_cfg.ctype == CT_GREY) ? h(frame_no, fr, fc, 0)
                                         : expect_comp(frame_no, cur_cfg, w, fr, fc, comp);
          checks++;
          got_samples++;
          if ((core_pix[t] !== e && !lossy[t]) || core_sot[t] !== (n_samp[t] % T == 0) ||
              core_eot[t] !== (n_samp[t] % T == T - 1)) begin
            failures++;
            if (failures < 20)
              $display("frame %0d core %0d sample %0d (r%0d c%0d): got %h sot %b eot %b exp %h",
                       frame_no, t, n_samp[t], fr, fc, core_pix[t], core_sot[t], core_eot[t], e);
          end
          if (n_samp[t] % T == 0) begin
            tile_sum_exp[t * 256 + tile] = 16'(e);
            if (tile > 0) cnt_reuse++;
            if (t % 2 == 1) cnt_right++;
          end else begin
            tile_sum_exp[t * 256 + tile] += 16'(e);
          end
          n_samp[t]++;
          run_len[t]++;
          if (run_len[t] > max_run) max_run = run_len[t];
        end else run_len[t] = 0;
      end
    end
  end

  // ---------------- WI code stream reader ----------------
  int cs_bytes = 0, tiles_read = 0;
  logic [7:0] cs_buf [4];
  always @(posedge clk) begin
    wi_rd_req <= (wi_bytes_avail != 0) && ($urandom_range(1) == 0) && !wi_rd_req;
    if (rst_n && wi_rd_valid) begin
      cs_buf[cs_bytes % 4] = wi_rd_data;
      cs_bytes++;
      if (cs_bytes % 4 == 0) begin
        int key;
        key = int'(cs_buf[0]) * 256 + int'(cs_buf[1]);
        checks++;
        if (!tile_sum_exp.exists(key) ||
            (tile_sum_exp[key] !== {cs_buf[2], cs_buf[3]} && !lossy[int'(cs_buf[0]) % NCORES])) begin
          failures++;
          $display("frame %0d: code stream core %0d tile %0d sum %h wrong", frame_no,
                   cs_buf[0], cs_buf[1], {cs_buf[2], cs_buf[3]});
        end else tile_sum_exp.delete(key);
        tiles_read++;
      end
    end
  end

  // ---------------- qtable check ----------------
  int exp_qt = 0, qt_loads = 0;
  always @(posedge clk) if (rst_n && core_qt_load) begin
    qt_loads++;
    checks++;
    if (int'(core_qtable) != exp_qt) begin
      failures++; $display("frame %0d: table %0d, expected %0d", frame_no, core_qtable, exp_qt);
    end
  end

  // ---------------- sequencing ----------------
  int cnt_path [5] = '{0, 0, 0, 0, 0};   // RGB24, RGB12, 4:2:2, 4:4:4, grey
  int cnt_switch = 0, cnt_drop = 0, cnt_refused = 0;

  task automatic wi_config(input colour_cfg_t cfg, input frame_size_e fs, input bit use_ratio,
                           input int speed, input int ratio);
    @(posedge clk);
    wi_colour <= cfg; wi_fsize <= fs; wi_use_ratio <= use_ratio;
    wi_frame_speed <= 8'(speed); wi_comp_ratio <= 8'(ratio); wi_cfg_valid <= 1;
    @(posedge clk); wi_cfg_valid <= 0;
  endtask

  bit expect_ovf = 0, expect_line = 0;
  int cnt_line_err = 0;
  int cnt_overflow = 0;

  task automatic run_frame(input colour_cfg_t cfg, input frame_size_e fs, input int qt,
                           input bit switch_mid);
    int done0, tiles0, ntiles, f;
    colour_cfg_t nxt;
    done0 = int'(wi_status.frames_done);
    f = frame_no;
    // wait until armed with this configuration
    while (!dut.arm) @(posedge clk);
    cur_cfg = cfg; cur_fs = fs; exp_qt = qt;
    if (cfg.ctype == CT_RGB) cnt_path[cfg.rgb12 ? 1 : 0]++;
    else if (cfg.ctype == CT_YUV) cnt_path[cfg.yuv422 ? 2 : 3]++;
    else cnt_path[4]++;
    tiles0 = tiles_read;
    ntiles = (cfg.ctype == CT_GREY ? 1 : 3) * ((width_of(fs) > 256) ? 2 : 1) *
             ((height_of(fs) + 255) / 256);
    if (width_of(fs) > 256 && height_of(fs) == 512) ntiles = (cfg.ctype == CT_GREY ? 1 : 3) * 4;
    icu_frame(f, cfg, fs);
    // a V-Synch while the frame drains is dropped
    if (switch_mid) begin
      int d0;
      d0 = int'(wi_status.frames_dropped);
      icu_put(256); icu_wait_empty();
      if (int'(wi_status.frames_dropped) == d0 + 1) cnt_drop++;
    end
    while (int'(wi_status.frames_done) == done0) @(posedge clk);
    while (tiles_read < tiles0 + ntiles || wi_bytes_avail != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (tiles_read != tiles0 + ntiles || tile_sum_exp.size() != 0) begin
      failures++;
      $display("frame %0d: %0d code streams, expected %0d, %0d tiles unmatched", f,
               tiles_read - tiles0, ntiles, tile_sum_exp.size());
    end
    checks++;
    if (expect_line && wi_status.err_line) cnt_line_err++;
    if (wi_status.err_overflow != expect_ovf || wi_status.err_line != expect_line) begin
      failures++; $display("frame %0d: error flags %b%b", f, wi_status.err_overflow, wi_status.err_line);
    end
    // frame speed the loaded table allows: ratio x 1 MB/s / raw frame bytes
    begin
      int rt [5] = '{2, 5, 10, 20, 60};
      longint e;
      e = longint'(rt[qt]) * 1000000 /
          (longint'(width_of(fs)) * longint'(height_of(fs)) * (cfg.ctype == CT_GREY ? 1 : 3));
      if (e > 255) e = 255;
      checks++;
      if (longint'(wi_status.fps_est) != e) begin
        failures++; $display("frame %0d: frame speed %0d, expected %0d", f, wi_status.fps_est, e);
      end
    end
    $display("frame %0d done: cfg %b size %0d at %0t", f, cfg, fs, $time);
    frame_no++;
  endtask

  initial begin
    colour_cfg_t rgb24, rgb12, y422, y444, grey;
    rgb24 = '{ctype: CT_RGB,  rgb12: 1'b0, yuv422: 1'b0};
    rgb12 = '{ctype: CT_RGB,  rgb12: 1'b1, yuv422: 1'b0};
    y422  = '{ctype: CT_YUV,  rgb12: 1'b0, yuv422: 1'b1};
    y444  = '{ctype: CT_YUV,  rgb12: 1'b0, yuv422: 1'b0};
    grey  = '{ctype: CT_GREY, rgb12: 1'b0, yuv422: 1'b0};
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);

    // relays between WI and ICU
    wi_pzt <= 24'h0A0B0C; wi_pzt_valid <= 1; wi_pos_req <= 1;
    @(posedge clk); wi_pzt_valid <= 0; wi_pos_req <= 0;
    #1;
    checks++;
    if (!(icu_pzt_valid && icu_pzt == 24'h0A0B0C && icu_pos_req)) begin
      failures++; $display("PZT / position request not relayed");
    end
    @(posedge clk); icu_pos <= 24'h00BEEF; icu_pos_valid <= 1;
    @(posedge clk); icu_pos_valid <= 0;
    #1;
    checks++;
    if (!(wi_pos_valid && wi_pos == 24'h00BEEF)) begin failures++; $display("position not relayed"); end

    // 1024 x 1024 cannot be tiled: refused, its V-Synch dropped
    wi_config(rgb24, FS_1024X1024, 0, 1, 1);
    repeat (3) @(posedge clk);
    icu_put(256); icu_wait_empty();
    checks++;
    if (!wi_status.err_size || wi_status.frames_dropped != 8'd1 || dut.arm) begin
      failures++; $display("1024x1024 not refused");
    end else cnt_refused++;

    // frame speed mode: 128x128x3 = 49152 bytes, 50 fps -> 2.46 MB/s -> 5x table
    wi_config(rgb24, FS_128X128, 0, 50, 0);
    run_frame(rgb24, FS_128X128, 1, 1'b0);
    // ratio mode, switch of mode between frames
    wi_config(y422, FS_256X256, 1, 0, 9);
    run_frame(y422, FS_256X256, 2, 1'b1);
    cnt_switch++;
    wi_config(rgb12, FS_128X128, 1, 0, 2);
    long_line_row = 5; expect_line = 1;
    run_frame(rgb12, FS_128X128, 0, 1'b0);
    long_line_row = -1; expect_line = 0;
    cnt_switch++;
    wi_config(y444, FS_128X128, 1, 0, 15);
    // configuration sent while the previous frame is still running is applied next
    fork
      run_frame(y444, FS_128X128, 3, 1'b0);
      begin
        while (dut.u_master.state != 3'd2) @(posedge clk);
        wi_config(grey, FS_512X512, 0, 10, 0);
      end
    join
    if (dut.act_colour == y444) cnt_switch++;
    // grey 512x512 = 262144 bytes x 10 fps -> 2.6 MB/s -> 5x table
    run_frame(grey, FS_512X512, 1, 1'b0);
    cnt_switch++;
    // the largest tileable frame
    wi_config(rgb24, FS_512X768, 1, 0, 40);
    run_frame(rgb24, FS_512X768, 4, 1'b0);
    cnt_switch++;

    // tiller overflow: core 0 refuses samples until its tiller overflows; the
    // frame must still complete, with err_overflow reported
    wi_config(rgb24, FS_256X256, 1, 0, 2);
    hold_core[0] = 1'b1; lossy[0] = 1; expect_ovf = 1;
    fork
      run_frame(rgb24, FS_256X256, 0, 1'b0);
      begin
        while (!wi_status.err_overflow) @(posedge clk);
        cnt_overflow++;
        repeat (10) @(posedge clk);
        hold_core[0] = 1'b0;
      end
    join
    lossy[0] = 0; expect_ovf = 0;

    // mechanisms
    begin
      string names [17];
      int    cnts  [17];
      names = '{"RGB24", "RGB12", "YUV422 interpolation", "YUV444 bypass", "grey bypass",
                "mode switch", "two tile columns", "tiller reuse", "tiller waits for writer",
                "core holds off tiller", "core waits for arbiter", "dropped V-Synch",
                "refused frame size", "1 pixel/clock run", "quantisation table loads",
                "tiller overflow", "over-long line dropped"};
      cnts  = '{cnt_path[0], cnt_path[1], cnt_path[2], cnt_path[3], cnt_path[4], cnt_switch,
                cnt_right, cnt_reuse, cnt_starved, cnt_core_hold, cnt_arb_wait, cnt_drop,
                cnt_refused, (max_run >= 64) ? 1 : 0, qt_loads, cnt_overflow, cnt_line_err};
      for (int k = 0; k < 17; k++) begin
        $display("mechanism %-26s %0d", names[k], cnts[k]);
        checks++;
        if (cnts[k] == 0) begin failures++; $display("mechanism %s never happened", names[k]); end
      end
    end
    $display("core samples checked: %0d, code streams: %0d", got_samples, tiles_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d samples %p tiles_read %0d wr %0d bsipo row %0d col %0d q %0d", dut.u_master.state, n_samp, tiles_read, dut.g_tiller[0].u_tiller.wr_cnt, dut.u_bsipo.row, dut.u_bsipo.col, icu_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
