// Flag generator: produces the memory accessing signal for the host.
//
// It compares the accessing position from the state machine (nth_line,
// nth_frame) with the display scan position from the RAM & display block
// (ln_cnt, fm_cnt). While both are equal and the position is valid, the
// accessing signal flag is high; as ln_cnt moves on with each display line,
// the flag lasts exactly one gate line. When the state machine raises the
// overflow interrupt sys_inter, flag is held high and overflow tells the
// host that the write rate has to change.
//
// The comparison, the one-gate-line length of the flag and holding the flag
// high on an interrupt follow the design's description; the separate
// overflow output and the registered outputs are this design's own choices.
//
// Timing: flag and overflow are registered, one clock after the inputs.
module flag_generator
  import ldi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  pos_valid,
  input  logic  sys_inter,
  input  word_t nth_line,
  input  word_t nth_frame,
  input  word_t ln_cnt,
  input  word_t fm_cnt,
  output logic  flag,
  output logic  overflow
);

  always_ff @(posedge clk) begin
    if (rst) begin
      flag     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= pos_valid && sys_inter;
      flag     <= pos_valid && (sys_inter ||
                                ((ln_cnt == nth_line) && (fm_cnt == nth_frame)));
    end
  end

endmodule
