// System block: the host side of the scheduler, as a frame writer.
//
// The host waits for the accessing signal. On each rising edge of flag (and
// not during an overflow) it starts a new image: it pulls the chip select
// cs_n low and, on each write strobe wr_tick, presents one gate line (lnk_cnt
// = 0, 1, ..., gate_line-1) with its data word, until the whole frame is
// written; then cs_n goes high again. A rising flag that comes while a frame
// is still being written is not acted on. The host also passes its user
// frame-period and ignore-overflow choices to the state machine.
//
// Writing one frame on the write clock under chip select after the accessing
// signal, and supplying the user frame and ignore settings, follow the
// design's block diagram and description. The data written is this design's
// own test pattern: data_wr = {image number, line number} packed into DATA_W
// bits, the line number in the low 8 bits (for DATA_W >= 16), so that a
// frame shown on the panel tells which image each line came from.
//
// Timing: cs_n, lnk_cnt and data_wr are registered; the memory takes the
// word on the wr_tick cycle in which they are presented. img_id is the number
// of the image being (or last) written, starting at 0 after reset.
module host_system
  import ldi_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_tick,
  input  logic              flag,
  input  logic              overflow,
  input  word_t             gate_line,
  input  logic [UFM_W-1:0]  usr_fm_set,
  input  logic              igno_set,
  output logic [UFM_W-1:0]  usr_fm,
  output logic              ignore,
  output logic              cs_n,
  output logic [DATA_W-1:0] data_wr,
  output word_t             lnk_cnt,
  output logic              busy,
  output word_t             img_id
);

  logic flag_q;

  function automatic logic [DATA_W-1:0] pattern(input word_t img, input logic [7:0] line);
    return DATA_W'((32'(img) << 8) | 32'(line));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_q  <= 1'b0;
      busy    <= 1'b0;
      cs_n    <= 1'b1;
      lnk_cnt <= '0;
      img_id  <= '0;
      data_wr <= '0;
      usr_fm  <= '0;
      ignore  <= 1'b0;
    end else begin
      flag_q <= flag;
      usr_fm <= usr_fm_set;
      ignore <= igno_set;
      if (!busy) begin
        if (flag && !flag_q && !overflow && gate_line != 0) begin
          busy    <= 1'b1;
          cs_n    <= 1'b0;
          lnk_cnt <= '0;
          img_id  <= img_id + 16'd1;
          data_wr <= pattern(img_id + 16'd1, 8'd0);
        end
      end else if (wr_tick) begin
        if (lnk_cnt + 16'd1 >= gate_line) begin
          busy <= 1'b0;
          cs_n <= 1'b1;
        end else begin
          lnk_cnt <= lnk_cnt + 16'd1;
          data_wr <= pattern(img_id, 8'(lnk_cnt + 16'd1));
        end
      end
    end
  end

endmodule
