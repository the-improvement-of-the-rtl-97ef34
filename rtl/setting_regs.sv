// Setting block: the register file that holds the operating point of the
// memory-access scheduler.
//
// It keeps the host write frame rate, the display frame rate, the gate
// resolution, the back and front porch, the user frame period and the
// "ignore overflow" choice, and hands them to the clock generator, the state
// machine, the host model and the RAM/display block. Which quantities it
// holds follows the design's block diagram; the reset values are the
// operating point of the original simulation (write 40 Hz, display 60 Hz,
// 160 gate lines, 4-line porches, user frame 0, ignore set). The write port
// (one 16-bit register per address, written on a clock edge with cfg_we high)
// is this design's own choice.
//
// Address map: 0 wr_rate, 1 dis_rate, 2 gate_line, 3 bp, 4 fp,
//              5 usr_fm (bits 3:0), 6 ignore (bit 0).
// Timing: a write takes effect on the clock edge; settings are registered.
module setting_regs
  import ldi_pkg::*;
#(
  parameter int unsigned RST_WR_RATE  = 40,
  parameter int unsigned RST_DIS_RATE = 60,
  parameter int unsigned RST_GATE     = 160,
  parameter int unsigned RST_BP       = 4,
  parameter int unsigned RST_FP       = 4,
  parameter int unsigned RST_USR_FM   = 0,
  parameter bit          RST_IGNORE   = 1'b1
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       cfg_we,
  input  logic [2:0] cfg_addr,
  input  word_t      cfg_wdata,
  output settings_t  cfg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.wr_rate   <= word_t'(RST_WR_RATE);
      cfg.dis_rate  <= word_t'(RST_DIS_RATE);
      cfg.gate_line <= word_t'(RST_GATE);
      cfg.bp        <= word_t'(RST_BP);
      cfg.fp        <= word_t'(RST_FP);
      cfg.usr_fm    <= UFM_W'(RST_USR_FM);
      cfg.ignore    <= RST_IGNORE;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        3'd0: cfg.wr_rate   <= cfg_wdata;
        3'd1: cfg.dis_rate  <= cfg_wdata;
        3'd2: cfg.gate_line <= cfg_wdata;
        3'd3: cfg.bp        <= cfg_wdata;
        3'd4: cfg.fp        <= cfg_wdata;
        3'd5: cfg.usr_fm    <= cfg_wdata[UFM_W-1:0];
        3'd6: cfg.ignore    <= cfg_wdata[0];
        default: ;
      endcase
    end
  end

endmodule
