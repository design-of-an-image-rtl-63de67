// cpb: Colour Processing Block.
//
// Turns the BSIPO's 24-bit word into a three-byte YUV 4:4:4 pixel for the
// tiller unit. The input stream controller selects one of three paths:
//   CPB_RGB2YUV : RGB-YUV core (RGB 24-bit and 12-bit input)
//   CPB_INTERP  : interpolator (YUV 4:2:2 input)
//   CPB_BYPASS  : no processing (YUV 4:4:4 and grey scale); the three input
//                 bytes become Y, U, V in order, so a grey byte lands in the
//                 V lane with Y = U = 0.
// Only the selected path's output is forwarded.
//
// Timing: one clock through the RGB-YUV core and the bypass register; the
// interpolator holds each pixel until the next one arrives (see there).
// sel may only change between frames, after the last pixel of the previous
// frame has left, otherwise a pixel held in the interpolator is lost.
//
// Followed from the design: the three paths and their use per colour format.
// Own choices: the lane order of the bypass and the registered mux.
module cpb
  import pub_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cpb_sel_e    sel,
  input  logic [23:0] in_pix,
  input  logic        in_valid,
  input  pix_flags_t  in_flags,
  output yuv_t        out_pix,
  output logic        out_valid,
  output pix_flags_t  out_flags
);

  yuv_t       c_pix, i_pix, b_pix;
  logic       c_valid, i_valid, b_valid;
  pix_flags_t c_flags, i_flags, b_flags;

  rgb_yuv_core u_rgb_yuv (
    .clk, .rst_n,
    .in_pix, .in_valid(in_valid && sel == CPB_RGB2YUV), .in_flags,
    .out_pix(c_pix), .out_valid(c_valid), .out_flags(c_flags)
  );

  interpolator u_interp (
    .clk, .rst_n,
    .in_pix, .in_valid(in_valid && sel == CPB_INTERP), .in_flags,
    .out_pix(i_pix), .out_valid(i_valid), .out_flags(i_flags)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_pix   <= '0;
      b_valid <= 1'b0;
      b_flags <= '0;
    end else begin
      b_valid <= in_valid && sel == CPB_BYPASS;
      if (in_valid) begin
        b_pix   <= in_pix;
        b_flags <= in_flags;
      end
    end
  end

  always_comb begin
    unique case (sel)
      CPB_RGB2YUV: begin out_pix = c_pix; out_valid = c_valid; out_flags = c_flags; end
      CPB_INTERP:  begin out_pix = i_pix; out_valid = i_valid; out_flags = i_flags; end
      default:     begin out_pix = b_pix; out_valid = b_valid; out_flags = b_flags; end
    endcase
  end

endmodule
