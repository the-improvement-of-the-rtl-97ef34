// RAM & display block: the frame memory of the LCD driver and its display
// scan.
//
// The memory holds one DATA_W-bit word per gate line. The host side writes
// the word data_wr at line address lnk_cnt on every write strobe (wr_tick)
// while the chip select cs_n is low. The display side advances the display
// scan position on every display strobe (dis_tick): ln_cnt runs through the
// gate_line active lines (0 .. gate_line-1), then the front and back porch,
// and wraps after gate_line + fp + bp lines. On each active line the stored
// word is read and sent to the panel on data_dis with dis_valid high for one
// cycle. fm_cnt counts frames 1 .. nth_frame (the accessing period from the
// state machine) and wraps, so that the pair (ln_cnt, fm_cnt) can be compared
// with the accessing position.
//
// Writing on the write clock, reading on the display clock, and handing the
// line and frame counts to the flag generator follow the design's block
// diagram. This design's own choices: one memory word per gate line, the
// active-low chip select, the porch lines placed after the active lines, and
// a frame count held at 1 while nth_frame is 0. Writes to addresses at or
// above gate_line are ignored.
//
// Timing: memory write on the clock edge of a qualified wr_tick; ln_cnt,
// fm_cnt, data_dis and dis_valid change on the clock edge of a dis_tick
// (data_dis is the word of the line ln_cnt held before that edge).
module ram_display
  import ldi_pkg::*;
#(
  parameter int unsigned MAX_LINES = 160,
  parameter int unsigned DATA_W    = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_tick,
  input  logic              dis_tick,
  input  word_t             gate_line,
  input  word_t             bp,
  input  word_t             fp,
  input  word_t             nth_frame,
  input  logic              cs_n,
  input  logic [DATA_W-1:0] data_wr,
  input  word_t             lnk_cnt,
  output logic [DATA_W-1:0] data_dis,
  output logic              dis_valid,
  output word_t             dis_line,
  output word_t             ln_cnt,
  output word_t             fm_cnt
);

  localparam int unsigned AW = (MAX_LINES > 1) ? $clog2(MAX_LINES) : 1;

  logic [DATA_W-1:0] mem [MAX_LINES];

  logic [16:0] frame_len;
  logic        last_line, active;

  always_comb begin
    frame_len = 17'(gate_line) + 17'(bp) + 17'(fp);
    last_line = (17'(ln_cnt) + 17'd1 >= frame_len);
    active    = (ln_cnt < gate_line) && (32'(ln_cnt) < MAX_LINES);
  end

  // Host write port.
  always_ff @(posedge clk) begin
    if (wr_tick && !cs_n && (lnk_cnt < gate_line) && (32'(lnk_cnt) < MAX_LINES))
      mem[AW'(lnk_cnt)] <= data_wr;
  end

  // Display scan.
  always_ff @(posedge clk) begin
    if (rst) begin
      ln_cnt    <= '0;
      fm_cnt    <= 16'd1;
      data_dis  <= '0;
      dis_valid <= 1'b0;
      dis_line  <= '0;
    end else begin
      dis_valid <= 1'b0;
      if (dis_tick) begin
        if (active) begin
          data_dis  <= mem[AW'(ln_cnt)];
          dis_valid <= 1'b1;
          dis_line  <= ln_cnt;
        end
        if (last_line) begin
          ln_cnt <= '0;
          fm_cnt <= (fm_cnt >= nth_frame) ? 16'd1 : fm_cnt + 16'd1;
        end else begin
          ln_cnt <= ln_cnt + 16'd1;
        end
      end
    end
  end

endmodule
