// pub_top: FPGA design of the Processing Unit Board (PUB), the image
// compression engine of a camera-on-pole station.
//
// A byte-serial image stream from the image capture unit (ICU) goes through
//   input stream unit : BSIPO -> Colour Processing Block (RGB-YUV core,
//                       interpolator or bypass) -> YUV 4:4:4 pixels
//   tiller unit       : tiller controller -> six buffered tillers
//                       (Y, U, V x odd/even tile column)
//   JPEG2000 cores    : six external encoder IP cores, one per buffered
//                       tiller; their pixel inputs, code stream outputs and
//                       quantisation table setting are ports of this module
//   output stream unit: output stream controller -> external output memory,
//                       read by the wireless interface (WI) a byte at a time
// all under the master controller, which also relays camera commands and
// position information between WI and ICU.
//
// Port groups: icu_* (image stream, sync pulses, camera relay), wi_*
// (configuration, commands, status, code stream reads), core_* (to and from
// the JPEG2000 cores, index t = 2*component + column, component 0/1/2 =
// Y/U/V) and mem_* (external output memory, synchronous, one clock read
// latency). One clock domain, asynchronous active-low reset.
//
// Follows the design: the units and their connections, six buffered
// tillers and six cores (two per component), external cores and output
// memory. Own choices: all port names, widths and handshakes.
module pub_top
  import pub_pkg::*;
#(
  parameter int unsigned HALF_ROWS        = 128,
  parameter int unsigned TILE_COLS        = 256,
  parameter int unsigned OUT_AW           = 20,
  parameter int unsigned LINK_BYTES_PER_S = 1_000_000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ICU
  input  logic [7:0]             icu_byte,
  input  logic                   icu_byte_valid,
  input  logic                   icu_vsync,
  input  logic                   icu_hsync,
  input  logic [23:0]            icu_pos,
  input  logic                   icu_pos_valid,
  input  logic [7:0]             icu_status,
  input  logic                   icu_status_valid,
  output logic [23:0]            icu_pzt,
  output logic                   icu_pzt_valid,
  output logic                   icu_pos_req,
  output frame_size_e            icu_fsize,
  output logic                   icu_fsize_valid,
  // WI
  input  colour_cfg_t            wi_colour,
  input  frame_size_e            wi_fsize,
  input  logic                   wi_use_ratio,
  input  logic [7:0]             wi_frame_speed,
  input  logic [7:0]             wi_comp_ratio,
  input  logic                   wi_cfg_valid,
  input  logic [23:0]            wi_pzt,
  input  logic                   wi_pzt_valid,
  input  logic                   wi_pos_req,
  output logic [23:0]            wi_pos,
  output logic                   wi_pos_valid,
  output pub_status_t            wi_status,
  input  logic                   wi_rd_req,
  output logic [7:0]             wi_rd_data,
  output logic                   wi_rd_valid,
  output logic [OUT_AW:0]        wi_bytes_avail,
  // JPEG2000 cores
  output logic [NCORES-1:0][7:0] core_pix,
  output logic [NCORES-1:0]      core_pix_valid,
  output logic [NCORES-1:0]      core_sot,
  output logic [NCORES-1:0]      core_eot,
  input  logic [NCORES-1:0]      core_pix_ready,
  output logic [NCORES-1:0]      core_enable,
  output logic [2:0]             core_qtable,
  output logic                   core_qt_load,
  input  logic [NCORES-1:0][7:0] core_cs_data,
  input  logic [NCORES-1:0]      core_cs_valid,
  input  logic [NCORES-1:0]      core_cs_last,
  output logic [NCORES-1:0]      core_cs_ready,
  // external output memory
  output logic                   mem_we,
  output logic [OUT_AW-1:0]      mem_waddr,
  output logic [7:0]             mem_wdata,
  output logic                   mem_re,
  output logic [OUT_AW-1:0]      mem_raddr,
  input  logic [7:0]             mem_rdata
);

  // active configuration and flow control
  colour_cfg_t act_colour;
  frame_size_e act_fsize;
  logic        act_use_ratio;
  logic [7:0]  act_speed, act_ratio;
  logic        arm, frame_started, frame_done, frame_start, frame_stored;
  logic        err_line, err_qt;
  logic [2:0]  qtable;
  logic [7:0]  fps_est;
  logic        fps_valid;

  // input stream unit
  bsipo_mode_e      b_mode;
  logic [DIM_W-1:0] b_width, b_height;
  logic [7:0]       b_byte;
  logic             b_valid, b_vsync, b_hsync;
  cpb_sel_e         c_sel;
  logic [23:0]      p24;
  logic             p24_valid;
  pix_flags_t       p24_flags;
  yuv_t             yuv;
  logic             yuv_valid;
  pix_flags_t       yuv_flags;

  // tiller unit
  logic [8:0]              tile_w, tile_h;
  logic [NCORES-1:0]       t_wr_en, t_used, t_overflow, t_idle, t_starved;
  logic [NCORES-1:0][7:0]  t_wr_data;
  logic [4:0]              tiles_per_frame;
  logic                    size_ok;

  master_controller u_master (
    .clk, .rst_n,
    .wi_colour, .wi_fsize, .wi_use_ratio, .wi_frame_speed, .wi_comp_ratio, .wi_cfg_valid,
    .wi_pzt, .wi_pzt_valid, .wi_pos_req,
    .wi_pos, .wi_pos_valid, .wi_status,
    .icu_vsync, .icu_pos, .icu_pos_valid, .icu_status, .icu_status_valid,
    .icu_pzt, .icu_pzt_valid, .icu_pos_req, .icu_fsize, .icu_fsize_valid,
    .act_colour, .act_fsize, .act_use_ratio,
    .act_frame_speed(act_speed), .act_comp_ratio(act_ratio),
    .arm, .frame_started, .frame_done, .frame_start, .frame_stored,
    .tillers_idle(&t_idle), .size_ok,
    .err_line, .err_overflow(|t_overflow), .err_qt, .qtable, .fps_est, .fps_valid
  );

  input_stream_controller u_isc (
    .clk, .rst_n,
    .cfg(act_colour), .fsize(act_fsize), .arm,
    .icu_byte, .icu_valid(icu_byte_valid), .icu_vsync, .icu_hsync,
    .b_mode, .b_width, .b_height, .b_byte, .b_valid, .b_vsync, .b_hsync,
    .c_sel,
    .cpb_valid(yuv_valid), .cpb_flags(yuv_flags),
    .frame_started, .frame_done, .in_frame()
  );

  bsipo u_bsipo (
    .clk, .rst_n,
    .mode(b_mode), .width(b_width), .height(b_height),
    .in_byte(b_byte), .in_valid(b_valid), .vsync(b_vsync), .hsync(b_hsync),
    .out_pix(p24), .out_valid(p24_valid), .out_flags(p24_flags),
    .err_line
  );

  cpb u_cpb (
    .clk, .rst_n, .sel(c_sel),
    .in_pix(p24), .in_valid(p24_valid), .in_flags(p24_flags),
    .out_pix(yuv), .out_valid(yuv_valid), .out_flags(yuv_flags)
  );

  tiller_controller u_tctl (
    .clk, .rst_n,
    .fsize(act_fsize), .grey(act_colour.ctype == CT_GREY), .frame_start,
    .in_pix(yuv), .in_valid(yuv_valid), .in_flags(yuv_flags),
    .tile_w, .tile_h, .wr_en(t_wr_en), .wr_data(t_wr_data),
    .tiller_used(t_used), .tiles_per_frame, .size_ok
  );

  for (genvar t = 0; t < NCORES; t++) begin : g_tiller
    buffered_tiller #(.HALF_ROWS(HALF_ROWS), .TILE_COLS(TILE_COLS)) u_tiller (
      .clk, .rst_n, .frame_start,
      .tile_w, .tile_h,
      .wr_en(t_wr_en[t]), .wr_data(t_wr_data[t]),
      .out_data(core_pix[t]), .out_valid(core_pix_valid[t]),
      .out_sot(core_sot[t]), .out_eot(core_eot[t]), .out_ready(core_pix_ready[t]),
      .overflow(t_overflow[t]), .idle(t_idle[t]), .starved(t_starved[t])
    );
  end

  assign core_enable = t_used;

  jp2k_codec_controller #(.LINK_BYTES_PER_S(LINK_BYTES_PER_S)) u_codec (
    .clk, .rst_n, .apply(frame_start),
    .fsize(act_fsize), .grey(act_colour.ctype == CT_GREY),
    .use_ratio(act_use_ratio), .frame_speed(act_speed), .comp_ratio(act_ratio),
    .qtable, .qt_ratio(), .qt_load(core_qt_load), .err_qt, .fps_est, .fps_valid
  );

  assign core_qtable = qtable;

  output_stream_controller #(.AW(OUT_AW)) u_osc (
    .clk, .rst_n, .frame_start, .tiles_expected(tiles_per_frame),
    .cs_data(core_cs_data), .cs_valid(core_cs_valid), .cs_last(core_cs_last),
    .cs_ready(core_cs_ready),
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata,
    .rd_req(wi_rd_req), .rd_data(wi_rd_data), .rd_valid(wi_rd_valid),
    .bytes_avail(wi_bytes_avail), .frame_stored
  );

endmodule
