// master_controller: drives the encoding flow of the PUB and relays
// commands between WI and ICU.
//
// Relaying, independent of the encoding flow:
//   - camera positioning (PZT) commands from WI go to ICU on the next clock;
//   - a position request from WI goes to ICU, and the position information
//     ICU returns goes to WI, each on the next clock;
//   - the frame size from WI is forwarded to ICU when it is received;
//   - ICU status bytes are kept and shown in the status word.
//
// Encoding flow. A configuration from WI (colour type and style, frame size,
// frame speed or compression ratio) is held as pending and becomes active
// only between frames, so a mode switch never hits a frame in progress.
//   IDLE    : no configuration received yet
//   ARM     : active <= pending every clock; if the tiller unit accepts the
//             frame size (size_ok)
//             the input stream unit is armed and the next V-Synch starts a
//             frame (frame_start pulses one clock later to the tiller,
//             codec and output stream controllers)
//   CAPTURE : the frame enters; left when the input stream unit has passed
//             the frame's last pixel
//   DRAIN   : waits until the buffered tillers are empty and every tile's
//             code stream is in the output memory
// A V-Synch that arrives outside ARM, or with a frame size that cannot be
// tiled, is counted as a dropped frame. Error flags are sticky within a frame
// and cleared at frame_start.
//
// Follows the design: the relays between WI and ICU, and a controller that
// starts the other units and reports status. Own choices: the four states,
// the pending/active configuration, the dropped-frame count and the status
// word layout.
module master_controller
  import pub_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // WI commands
  input  colour_cfg_t  wi_colour,
  input  frame_size_e  wi_fsize,
  input  logic         wi_use_ratio,
  input  logic [7:0]   wi_frame_speed,
  input  logic [7:0]   wi_comp_ratio,
  input  logic         wi_cfg_valid,
  input  logic [23:0]  wi_pzt,
  input  logic         wi_pzt_valid,
  input  logic         wi_pos_req,
  // to WI
  output logic [23:0]  wi_pos,
  output logic         wi_pos_valid,
  output pub_status_t  wi_status,
  // ICU side
  input  logic         icu_vsync,
  input  logic [23:0]  icu_pos,
  input  logic         icu_pos_valid,
  input  logic [7:0]   icu_status,
  input  logic         icu_status_valid,
  output logic [23:0]  icu_pzt,
  output logic         icu_pzt_valid,
  output logic         icu_pos_req,
  output frame_size_e  icu_fsize,
  output logic         icu_fsize_valid,
  // active configuration to the unit controllers
  output colour_cfg_t  act_colour,
  output frame_size_e  act_fsize,
  output logic         act_use_ratio,
  output logic [7:0]   act_frame_speed,
  output logic [7:0]   act_comp_ratio,
  // unit control and status
  output logic         arm,
  input  logic         frame_started,
  input  logic         frame_done,
  output logic         frame_start,
  input  logic         frame_stored,
  input  logic         tillers_idle,
  input  logic         size_ok,
  input  logic         err_line,
  input  logic         err_overflow,
  input  logic         err_qt,
  input  logic [2:0]   qtable,
  input  logic [7:0]   fps_est,
  input  logic         fps_valid
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_ARM     = 3'd1,
    S_CAPTURE = 3'd2,
    S_DRAIN   = 3'd3
  } state_e;

  state_e      state;
  colour_cfg_t p_colour;
  frame_size_e p_fsize;
  logic        p_use_ratio;
  logic [7:0]  p_speed, p_ratio;
  logic [15:0] frames_done;
  logic [7:0]  frames_dropped, icu_stat_q;
  logic        e_line, e_size;

  assign arm = (state == S_ARM) && size_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      p_colour        <= '{ctype: CT_GREY, rgb12: 1'b0, yuv422: 1'b0};
      p_fsize         <= FS_128X128;
      p_use_ratio     <= 1'b0;
      p_speed         <= '0;
      p_ratio         <= '0;
      act_colour      <= '{ctype: CT_GREY, rgb12: 1'b0, yuv422: 1'b0};
      act_fsize       <= FS_128X128;
      act_use_ratio   <= 1'b0;
      act_frame_speed <= '0;
      act_comp_ratio  <= '0;
      frame_start     <= 1'b0;
      frames_done     <= '0;
      frames_dropped  <= '0;
      icu_stat_q      <= '0;
      e_line          <= 1'b0;
      e_size          <= 1'b0;
      wi_pos          <= '0;
      wi_pos_valid    <= 1'b0;
      icu_pzt         <= '0;
      icu_pzt_valid   <= 1'b0;
      icu_pos_req     <= 1'b0;
      icu_fsize       <= FS_128X128;
      icu_fsize_valid <= 1'b0;
    end else begin
      // relays
      icu_pzt_valid   <= wi_pzt_valid;
      if (wi_pzt_valid) icu_pzt <= wi_pzt;
      icu_pos_req     <= wi_pos_req;
      wi_pos_valid    <= icu_pos_valid;
      if (icu_pos_valid) wi_pos <= icu_pos;
      if (icu_status_valid) icu_stat_q <= icu_status;
      icu_fsize_valid <= wi_cfg_valid;
      if (wi_cfg_valid) begin
        icu_fsize   <= wi_fsize;
        p_colour    <= wi_colour;
        p_fsize     <= wi_fsize;
        p_use_ratio <= wi_use_ratio;
        p_speed     <= wi_frame_speed;
        p_ratio     <= wi_comp_ratio;
      end

      frame_start <= frame_started;
      if (err_line) e_line <= 1'b1;

      unique case (state)
        S_IDLE: if (wi_cfg_valid) state <= S_ARM;
        S_ARM: begin
          act_colour      <= p_colour;
          act_fsize       <= p_fsize;
          act_use_ratio   <= p_use_ratio;
          act_frame_speed <= p_speed;
          act_comp_ratio  <= p_ratio;
          e_size          <= !size_ok;
          if (frame_started) begin
            state  <= S_CAPTURE;
            e_line <= 1'b0;
          end
        end
        S_CAPTURE: if (frame_done) state <= S_DRAIN;
        S_DRAIN: if (frame_stored && tillers_idle && !frame_start) begin
          state       <= S_ARM;
          frames_done <= frames_done + 1'b1;
        end
        default: state <= S_IDLE;
      endcase

      if (icu_vsync && !frame_started && state != S_IDLE)
        frames_dropped <= frames_dropped + 1'b1;
    end
  end

  always_comb begin
    wi_status                = '0;
    wi_status.state          = state;
    wi_status.frames_done    = frames_done;
    wi_status.frames_dropped = frames_dropped;
    wi_status.err_size       = e_size;
    wi_status.err_line       = e_line;
    wi_status.err_overflow   = err_overflow;
    wi_status.err_qt         = err_qt;
    wi_status.qtable         = qtable;
    wi_status.icu_status     = icu_stat_q;
    wi_status.fps_est        = fps_valid ? fps_est : 8'd0;
  end

endmodule
