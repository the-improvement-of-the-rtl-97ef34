// Clock generator: derives the write-line and display-line strobes from the
// write and display frame rates.
//
// A frame, for the host and for the panel alike, is gate_line + bp + fp line
// times long. The display runs at dis_rate frames per second, so its line
// strobe must come dis_rate * (gate_line + bp + fp) times per second; the
// host's line strobe likewise uses wr_rate. Each strobe is produced by a
// phase accumulator clocked by the system clock of CLK_HZ: the line rate is
// added every cycle and, when the sum reaches CLK_HZ, a one-cycle strobe is
// issued and CLK_HZ subtracted. The average rate is exact; single strobes
// jitter by at most one system clock.
//
// That this block turns the two rates into the write and display clocks
// follows the design's block diagram. Using clock-enable strobes in the one
// system-clock domain instead of separate clocks, and the accumulator itself,
// are this design's own choices. A line rate at or above CLK_HZ gives a
// strobe every cycle.
//
// Timing: wr_tick / dis_tick are high for one clk cycle per line.
module clk_generator
  import ldi_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic  clk,
  input  logic  rst,
  input  word_t wr_rate,
  input  word_t dis_rate,
  input  word_t gate_line,
  input  word_t bp,
  input  word_t fp,
  output logic  wr_tick,
  output logic  dis_tick
);

  localparam int unsigned AW = 34;
  typedef logic [AW-1:0] acc_t;

  acc_t frame_len, wr_inc, dis_inc, wr_acc, dis_acc;
  acc_t wr_sum, dis_sum;

  always_comb begin
    frame_len = acc_t'(gate_line) + acc_t'(bp) + acc_t'(fp);
    wr_inc    = acc_t'(wr_rate)  * frame_len;
    dis_inc   = acc_t'(dis_rate) * frame_len;
    wr_sum    = wr_acc + wr_inc;
    dis_sum   = dis_acc + dis_inc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_acc   <= '0;
      dis_acc  <= '0;
      wr_tick  <= 1'b0;
      dis_tick <= 1'b0;
    end else begin
      wr_tick  <= (wr_sum >= acc_t'(CLK_HZ));
      dis_tick <= (dis_sum >= acc_t'(CLK_HZ));
      wr_acc   <= (wr_sum >= acc_t'(CLK_HZ))
                  ? ((wr_sum - acc_t'(CLK_HZ) >= acc_t'(CLK_HZ)) ? '0 : wr_sum - acc_t'(CLK_HZ))
                  : wr_sum;
      dis_acc  <= (dis_sum >= acc_t'(CLK_HZ))
                  ? ((dis_sum - acc_t'(CLK_HZ) >= acc_t'(CLK_HZ)) ? '0 : dis_sum - acc_t'(CLK_HZ))
                  : dis_sum;
    end
  end

endmodule
