// pub_pkg: types and constants shared by the Processing Unit Board (PUB)
// image-compression front end.
//
// Colour configuration follows the WI-to-PUB interface: a colour type
// (RGB, YUV, grey scale) plus two style bits (RGB 24/12 bit, YUV 4:4:4/4:2:2).
// The six frame sizes are the ones the design accepts; only the four up to
// 512 pixels wide can be tiled by the on-chip buffered tillers. Encodings of
// all enums are this design's own choice.
package pub_pkg;

  typedef enum logic [1:0] {
    CT_RGB  = 2'd0,
    CT_YUV  = 2'd1,
    CT_GREY = 2'd2
  } colour_type_e;

  typedef struct packed {
    colour_type_e ctype;
    logic         rgb12;   // RGB: 1 = 12-bit pixels, 0 = 24-bit pixels
    logic         yuv422;  // YUV: 1 = 4:2:2 input,  0 = 4:4:4 input
  } colour_cfg_t;

  // Internal pixel format produced by the BSIPO
  typedef enum logic [2:0] {
    BM_RGB24  = 3'd0,
    BM_RGB12  = 3'd1,
    BM_YUV422 = 3'd2,
    BM_YUV444 = 3'd3,
    BM_GREY   = 3'd4
  } bsipo_mode_e;

  // Colour Processing Block path
  typedef enum logic [1:0] {
    CPB_RGB2YUV = 2'd0,
    CPB_INTERP  = 2'd1,
    CPB_BYPASS  = 2'd2
  } cpb_sel_e;

  // Frame sizes, width x height
  typedef enum logic [2:0] {
    FS_128X128   = 3'd0,
    FS_256X256   = 3'd1,
    FS_512X512   = 3'd2,
    FS_512X768   = 3'd3,
    FS_1024X1024 = 3'd4,
    FS_1024X1280 = 3'd5
  } frame_size_e;

  localparam int unsigned DIM_W = 11;   // holds 1280

  // Position flags travelling with each pixel
  typedef struct packed {
    logic sof;  // first pixel of the frame
    logic sol;  // first pixel of a line
    logic eol;  // last pixel of a line
    logic eof;  // last pixel of the frame
  } pix_flags_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;
    logic [7:0] v;
  } yuv_t;

  // Number of components (Y, U, V) and tillers per component (odd/even tile column)
  localparam int unsigned NCOMP   = 3;
  localparam int unsigned NCOLS   = 2;
  localparam int unsigned NCORES  = NCOMP * NCOLS;

  // Quantisation tables of the JPEG2000 core
  localparam int unsigned NQT     = 5;

  function automatic logic [DIM_W-1:0] frame_width(frame_size_e fs);
    case (fs)
      FS_128X128:   return 11'd128;
      FS_256X256:   return 11'd256;
      FS_512X512,
      FS_512X768:   return 11'd512;
      default:      return 11'd1024;
    endcase
  endfunction

  function automatic logic [DIM_W-1:0] frame_height(frame_size_e fs);
    case (fs)
      FS_128X128:   return 11'd128;
      FS_256X256:   return 11'd256;
      FS_512X512:   return 11'd512;
      FS_512X768:   return 11'd768;
      FS_1024X1024: return 11'd1024;
      default:      return 11'd1280;
    endcase
  endfunction

  // Frame sizes the buffered tillers can handle (up to 512 pixels wide)
  function automatic logic frame_size_tileable(frame_size_e fs);
    return (fs == FS_128X128) || (fs == FS_256X256) ||
           (fs == FS_512X512) || (fs == FS_512X768);
  endfunction

  // Status word reported to WI
  typedef struct packed {
    logic [2:0]  state;          // master controller state
    logic [15:0] frames_done;    // frames fully encoded and stored
    logic [7:0]  frames_dropped; // V-Synch pulses ignored while busy
    logic        err_size;       // frame size not supported by the tiller unit
    logic        err_line;       // line length error seen by the BSIPO
    logic        err_overflow;   // a buffered tiller overflowed
    logic        err_qt;         // no quantisation table reaches the frame speed
    logic [2:0]  qtable;         // quantisation table in use
    logic [7:0]  icu_status;     // last status byte received from ICU
    logic [7:0]  fps_est;        // frames per second the loaded table allows, 0 while computed
  } pub_status_t;

endpackage
