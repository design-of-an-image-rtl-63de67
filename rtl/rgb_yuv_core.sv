// rgb_yuv_core: RGB to YUV colour conversion.
//
// Computes, as the design specifies,
//   Y = (R + 2G + B) / 4,   U = R - G,   V = B - G
// on the BSIPO word {R, G, B}. Y is rounded down. U and V are differences
// in the range -255..255; the Colour Processing Block outputs three bytes,
// so they are carried as the low eight bits of the two's-complement
// difference (R is still recovered exactly as G + U modulo 256). That
// narrowing is this design's choice. 12-bit RGB arrives as four-bit values
// in the low nibbles and is converted with the same equations, unscaled.
//
// Timing: one register stage, one pixel per clock; flags are delayed with
// their pixel.
//
// Follows the design: the three transform equations. Own choices: rounding,
// 8-bit U and V, and the one-clock register stage.
module rgb_yuv_core
  import pub_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] in_pix,
  input  logic        in_valid,
  input  pix_flags_t  in_flags,
  output yuv_t        out_pix,
  output logic        out_valid,
  output pix_flags_t  out_flags
);

  wire [7:0] r = in_pix[23:16];
  wire [7:0] g = in_pix[15:8];
  wire [7:0] b = in_pix[7:0];

  logic [9:0] ysum;
  always_comb ysum = {2'b00, r} + {1'b0, g, 1'b0} + {2'b00, b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pix   <= '0;
      out_valid <= 1'b0;
      out_flags <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pix.y <= ysum[9:2];
        out_pix.u <= r - g;
        out_pix.v <= b - g;
        out_flags <= in_flags;
      end
    end
  end

endmodule
