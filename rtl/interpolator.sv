// interpolator: YUV 4:2:2 to YUV 4:4:4 chroma interpolation.
//
// The input is the BSIPO's 4:2:2 word {8'h00, Y, C}: along a line the pairs
// alternate Y0U0, Y1V1, Y2U2, Y3V3, ... (the first pair of every line carries
// U). Each output pixel keeps its own Y and chroma sample and gets the
// missing chroma as the average of the neighbouring pixels' samples of that
// kind, e.g. pixel 1 = {Y1, (U0+U2)/2, V1}. At the ends of a line the single
// neighbour is copied: pixel 0 takes V1, and the last pixel takes the U of
// the pixel before it. The average rounds down. Interpolation runs along
// lines only.
//
// Timing: pixel k is emitted one clock after pair k+1 arrives, because it
// needs the next sample. The last pixel of a line is emitted one clock after
// the second to last, the cycle after the line's last pair arrives; that
// cycle must carry no input, which the byte-serial 4:2:2 stream (two bytes
// per pixel) guarantees. Flags travel with their pixel.
//
// Follows the design: the averaging pattern of the missing U or V. Own
// choices: rounding, line-only interpolation and the flush timing.
module interpolator
  import pub_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [23:0] in_pix,
  input  logic       in_valid,
  input  pix_flags_t in_flags,
  output yuv_t       out_pix,
  output logic       out_valid,
  output pix_flags_t out_flags
);

  logic       have_cur, have_prev, flush, par_cur;
  logic [7:0] y_cur, c_cur, c_prev;
  pix_flags_t f_cur;

  wire [7:0] y_in = in_pix[15:8];
  wire [7:0] c_in = in_pix[7:0];

  function automatic logic [7:0] avg(logic [7:0] a, logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[8:1];
  endfunction

  // Pixel held in 'cur', completed by the next chroma sample 'nxt'
  function automatic yuv_t make_pix(logic [7:0] y, logic [7:0] own, logic [7:0] other,
                                    logic par);
    yuv_t p;
    p.y = y;
    p.u = par ? other : own;
    p.v = par ? own   : other;
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cur  <= 1'b0;
      have_prev <= 1'b0;
      flush     <= 1'b0;
      par_cur   <= 1'b0;
      y_cur     <= '0;
      c_cur     <= '0;
      c_prev    <= '0;
      f_cur     <= '0;
      out_pix   <= '0;
      out_valid <= 1'b0;
      out_flags <= '0;
    end else begin
      out_valid <= 1'b0;
      if (flush) begin
        // last pixel of the line: copy the neighbour's chroma
        out_pix   <= make_pix(y_cur, c_cur, have_prev ? c_prev : c_cur, par_cur);
        out_valid <= 1'b1;
        out_flags <= f_cur;
        flush     <= 1'b0;
        have_cur  <= 1'b0;
        have_prev <= 1'b0;
      end else if (in_valid) begin
        if (have_cur && !in_flags.sol) begin
          out_pix   <= make_pix(y_cur, c_cur,
                                have_prev ? avg(c_prev, c_in) : c_in, par_cur);
          out_valid <= 1'b1;
          out_flags <= f_cur;
          c_prev    <= c_cur;
          have_prev <= 1'b1;
          par_cur   <= ~par_cur;
        end else begin
          have_prev <= 1'b0;
          par_cur   <= 1'b0;
        end
        have_cur <= 1'b1;
        y_cur    <= y_in;
        c_cur    <= c_in;
        f_cur    <= in_flags;
        flush    <= in_flags.eol;
      end
    end
  end

  // The flush cycle after a line's last pair carries no new input
  assert property (@(posedge clk) disable iff (!rst_n) flush |-> !in_valid)
    else $error("interpolator: input during end-of-line flush");

endmodule
