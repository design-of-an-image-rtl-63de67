// input_stream_controller: supervises the input stream unit.
//
// From the active colour type and style it selects the BSIPO's pixel format
// and the Colour Processing Block path:
//   RGB 24/12 bit -> RGB-YUV core,  YUV 4:2:2 -> interpolator,
//   YUV 4:4:4 and grey scale -> bypass.
// The frame size gives the BSIPO its line width and frame height.
//
// The ICU stream is gated: a V-Synch is passed on only while the master
// controller arms the unit ('arm'); it then starts the frame and raises
// frame_started for one cycle. Bytes and H-Synch pulses pass only inside an
// accepted frame. frame_done pulses when the last pixel of the frame leaves
// the CPB, which ends the frame.
//
// Follows the design: the colour type and style inputs and the use of the
// RGB-YUV core, interpolator and bypass per format. Own choices: the
// encoding of the style bits and gating the stream to armed frames.
module input_stream_controller
  import pub_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  colour_cfg_t      cfg,
  input  frame_size_e      fsize,
  input  logic             arm,
  // from ICU
  input  logic [7:0]       icu_byte,
  input  logic             icu_valid,
  input  logic             icu_vsync,
  input  logic             icu_hsync,
  // to BSIPO
  output bsipo_mode_e      b_mode,
  output logic [DIM_W-1:0] b_width,
  output logic [DIM_W-1:0] b_height,
  output logic [7:0]       b_byte,
  output logic             b_valid,
  output logic             b_vsync,
  output logic             b_hsync,
  // to CPB
  output cpb_sel_e         c_sel,
  // from CPB output
  input  logic             cpb_valid,
  input  pix_flags_t       cpb_flags,
  // to master controller
  output logic             frame_started,
  output logic             frame_done,
  output logic             in_frame
);

  always_comb begin
    unique case (cfg.ctype)
      CT_RGB: begin
        b_mode = cfg.rgb12 ? BM_RGB12 : BM_RGB24;
        c_sel  = CPB_RGB2YUV;
      end
      CT_YUV: begin
        b_mode = cfg.yuv422 ? BM_YUV422 : BM_YUV444;
        c_sel  = cfg.yuv422 ? CPB_INTERP : CPB_BYPASS;
      end
      default: begin
        b_mode = BM_GREY;
        c_sel  = CPB_BYPASS;
      end
    endcase
  end

  assign b_width  = frame_width(fsize);
  assign b_height = frame_height(fsize);

  wire accept_vsync = arm && icu_vsync && !in_frame;

  assign b_vsync       = accept_vsync;
  assign b_hsync       = in_frame && icu_hsync;
  assign b_valid       = in_frame && icu_valid && !icu_vsync;
  assign b_byte        = icu_byte;
  assign frame_started = accept_vsync;
  assign frame_done    = in_frame && cpb_valid && cpb_flags.eof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            in_frame <= 1'b0;
    else if (accept_vsync) in_frame <= 1'b1;
    else if (frame_done)   in_frame <= 1'b0;
  end

endmodule
