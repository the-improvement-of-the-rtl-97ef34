// Accessing-position state machine.
//
// Decides where in the display frame the host may start writing the next
// image so that its writing scan never crosses the display scan, with a
// +/-10% margin for rate tolerance. All positions are in gate-line times,
// counted from the first active line of the current frame; a frame lasts
// T = gate_line + porch line times, porch = bp + fp. The host needs
// W = T * dis_rate / wr_rate line times to write a frame ("write line").
// With R = gate_line and M = R/10 (the 10% margin):
//
//   Case 3  (write < 90% of display, Slow_Stable):
//           pos = (2R + porch - M - W) / 2,       every max(2, usr_fm) frames
//   Case 4..6 (write within +/-10% of display:
//           Slow_Unstable, Same, Fast_Unstable):
//           pos = (3R + porch - 2W) / 2,          every max(2, usr_fm) frames
//           when slower than the display, max(1, usr_fm) otherwise
//   Case 7  (write > 110% of display, Fast_Stable):
//           pos = (2R + porch + M - W) / 2,       every max(1, usr_fm) frames
//   Case 1/2 (display > 2 x write, or 2R + porch - M - W <= 0):
//           Slow_Overflow. With ignore = 1 the host follows its own period
//           (Follow: line 0, every max(usr_fm, 1 + W/T) frames); with
//           ignore = 0 the overflow interrupt sys_inter is raised.
//
// The states, their 4-bit codes, the decisions between them, the three
// position formulas and the 2-frame period for slow writing follow the
// design's state chart and its description. This design's own choices: the
// 10% decisions compare the rates (10*wr against 9*dis and 11*dis); the
// Case 2 boundary is the point where the Case 3 position would fall to zero
// or below; the Follow position and period; integer divisions round down and
// the position is clamped to 0..T-1; a change of any setting while in Flag
// restarts the calculation through Idle. One state is passed per clock.
//
// Interface: settings in (live values; they are sampled in Idle). Outputs are
// registered: nth_line / nth_frame / sys_inter are valid while pos_valid is
// high (state Flag). write_line is W as computed in Freq_Compare.
module access_state_machine
  import ldi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,          // synchronous, active high
  input  settings_t  cfg,
  output sm_state_e  state,
  output word_t      nth_line,
  output word_t      nth_frame,
  output logic       sys_inter,
  output logic       pos_valid,
  output word_t      write_line
);

  settings_t snap;                 // settings the current result is based on

  // Wide signed working values (rates and lines are 16-bit).
  typedef logic signed [39:0] sval_t;

  sval_t r, porch, t_len, w, m, dis, wr;
  sval_t p1, usr, fr_q;
  word_t pos_c3, pos_c456, pos_c7, fr_slow, fr_fast, fr_follow;
  logic  wr_faster, wr_equal, overflow_c1, beyond_p10, out_m10, out_p10;
  sm_state_e state_n;
  word_t     line_n, frame_n;

  function automatic word_t clamp_pos(input sval_t v, input sval_t t);
    if (v < 0)           return '0;
    else if (v > t - 1)  return (t > 0) ? word_t'(t - 1) : '0;
    else                 return word_t'(v);
  endfunction

  always_comb begin
    r       = sval_t'(snap.gate_line);
    porch   = sval_t'(snap.bp) + sval_t'(snap.fp);
    t_len   = r + porch;
    dis     = sval_t'(snap.dis_rate);
    wr      = sval_t'(snap.wr_rate);
    m       = r / 10;
    // Write line: line times the host needs for one frame.
    w       = (wr == 0) ? sval_t'(40'sh00_FFFF_FFFF) : (t_len * dis) / wr;

    wr_faster   = wr > dis;
    wr_equal    = wr == dis;
    overflow_c1 = dis > 2 * wr;              // Display Rate / Write Rate > 2
    out_m10     = 10 * wr < 9 * dis;         // slower than the -10% margin scan
    out_p10     = 10 * wr > 11 * dis;        // faster than the +10% margin scan

    p1          = 2 * r + porch - m - sval_t'(write_line);
    beyond_p10  = p1 <= 0;                   // writing ends after the +10% scan

    pos_c3      = clamp_pos(p1 / 2, t_len);
    pos_c456    = clamp_pos((3 * r + porch - 2 * sval_t'(write_line)) / 2, t_len);
    pos_c7      = clamp_pos((2 * r + porch + m - sval_t'(write_line)) / 2, t_len);

    usr         = sval_t'(snap.usr_fm);
    fr_slow     = (usr > 2) ? word_t'(snap.usr_fm) : 16'd2;
    fr_fast     = (usr > 1) ? word_t'(snap.usr_fm) : 16'd1;
    // Follow: enough frames for the previous image to be fully written.
    fr_q        = (t_len == 0) ? 40'sd1 : 1 + sval_t'(write_line) / t_len;
    fr_follow   = (usr > fr_q) ? word_t'(snap.usr_fm) : fr_q[15:0];
  end

  // Next state and the accessing position handed over on entry to Flag.
  always_comb begin
    state_n = state;
    line_n  = nth_line;
    frame_n = nth_frame;
    unique case (state)
      ST_IDLE:          state_n = ST_FREQ_COMPARE;
      ST_FREQ_COMPARE:  state_n = wr_faster ? ST_FAST : (wr_equal ? ST_SAME : ST_SLOW);
      ST_FAST:          state_n = out_p10 ? ST_FAST_STABLE : ST_FAST_UNSTABLE;
      ST_FAST_STABLE:   begin state_n = ST_FLAG; line_n = pos_c7;   frame_n = fr_fast; end
      ST_FAST_UNSTABLE: begin state_n = ST_FLAG; line_n = pos_c456; frame_n = fr_fast; end
      ST_SAME:          begin state_n = ST_FLAG; line_n = pos_c456; frame_n = fr_fast; end
      ST_SLOW:          state_n = overflow_c1 ? ST_SLOW_OVERFLOW : ST_SLOW_CONTROL;
      ST_SLOW_CONTROL:  state_n = beyond_p10 ? ST_SLOW_OVERFLOW
                                 : (out_m10 ? ST_SLOW_STABLE : ST_SLOW_UNSTABLE);
      ST_SLOW_STABLE:   begin state_n = ST_FLAG; line_n = pos_c3;   frame_n = fr_slow; end
      ST_SLOW_UNSTABLE: begin state_n = ST_FLAG; line_n = pos_c456; frame_n = fr_slow; end
      ST_SLOW_OVERFLOW: state_n = snap.ignore ? ST_FOLLOW : ST_INTERRUPT;
      ST_FOLLOW:        begin state_n = ST_FLAG; line_n = '0; frame_n = fr_follow; end
      ST_INTERRUPT:     begin state_n = ST_FLAG; line_n = '0; frame_n = fr_follow; end
      ST_FLAG:          state_n = (cfg != snap) ? ST_IDLE : ST_FLAG;
      default:          state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_IDLE;
      snap       <= cfg;
      nth_line   <= '0;
      nth_frame  <= '0;
      sys_inter  <= 1'b0;
      write_line <= '0;
    end else begin
      state     <= state_n;
      nth_line  <= line_n;
      nth_frame <= frame_n;
      if (state == ST_IDLE) begin
        snap      <= cfg;
        sys_inter <= 1'b0;
      end
      if (state == ST_FREQ_COMPARE)
        write_line <= (w > 40'sh0000_FFFF) ? 16'hFFFF : word_t'(w);
      if (state == ST_INTERRUPT)
        sys_inter <= 1'b1;
    end
  end

  assign pos_valid = (state == ST_FLAG);

endmodule
