// Memory-access scheduler for an LCD driver IC with embedded frame memory.
//
// In memory-accessing mode the host writes images into the driver's frame
// memory whenever it likes, while the driver reads the memory out to the
// panel at its own frame rate. When the host's writing scan crosses the
// driver's display scan, one displayed frame mixes two images and the eye
// sees a horizontal line. This design computes, from the write and display
// rates, the gate line and the frame period at which the host must start
// writing so that the two scans never cross, and signals that moment to the
// host with an accessing flag one gate line long (or raises an overflow
// interrupt when no such moment exists).
//
// Blocks, wired as in the design's block diagram:
//   setting_regs         operating point (rates, resolution, porches, user
//                        frame period, ignore-overflow)
//   clk_generator        write- and display-line strobes from the rates
//   access_state_machine case analysis and accessing position
//   flag_generator       accessing signal at the accessing position
//   ram_display          frame memory and display scan counters
//   host_system          host that writes one frame after each flag
//
// Interface: clk and synchronous active-high rst; a settings write port
// (see setting_regs for the address map); the panel data data_dis with
// dis_valid / dis_line; and, for observation, the accessing signal and
// position, the scan position and the host's write activity. All of it runs
// in the one clk domain; CLK_HZ is the frequency of clk, used to derive the
// line strobes.
module ldi_access_top
  import ldi_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned MAX_LINES = 160,
  parameter int unsigned DATA_W    = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cfg_we,
  input  logic [2:0]        cfg_addr,
  input  word_t             cfg_wdata,
  output logic [DATA_W-1:0] data_dis,
  output logic              dis_valid,
  output word_t             dis_line,
  output logic              flag,
  output logic              overflow,
  output sm_state_e         sm_state,
  output word_t             nth_line,
  output word_t             nth_frame,
  output word_t             write_line,
  output word_t             ln_cnt,
  output word_t             fm_cnt,
  output logic              wr_tick,
  output logic              dis_tick,
  output logic              cs_n,
  output word_t             lnk_cnt,
  output word_t             img_id,
  output logic              host_busy
);

  settings_t         cfg_set;     // as held by the setting block
  settings_t         cfg_sm;      // as seen by the state machine
  logic [UFM_W-1:0]  usr_fm;
  logic              ignore;
  logic              sys_inter;
  logic              pos_valid;
  logic [DATA_W-1:0] data_wr;

  setting_regs u_setting (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata,
    .cfg (cfg_set)
  );

  clk_generator #(.CLK_HZ(CLK_HZ)) u_clk_gen (
    .clk, .rst,
    .wr_rate   (cfg_set.wr_rate),
    .dis_rate  (cfg_set.dis_rate),
    .gate_line (cfg_set.gate_line),
    .bp        (cfg_set.bp),
    .fp        (cfg_set.fp),
    .wr_tick, .dis_tick
  );

  // The user frame period and ignore choice reach the state machine through
  // the host, the other settings directly from the setting block.
  always_comb begin
    cfg_sm        = cfg_set;
    cfg_sm.usr_fm = usr_fm;
    cfg_sm.ignore = ignore;
  end

  access_state_machine u_sm (
    .clk, .rst,
    .cfg        (cfg_sm),
    .state      (sm_state),
    .nth_line, .nth_frame, .sys_inter, .pos_valid, .write_line
  );

  flag_generator u_flag (
    .clk, .rst, .pos_valid, .sys_inter, .nth_line, .nth_frame,
    .ln_cnt, .fm_cnt, .flag, .overflow
  );

  host_system #(.DATA_W(DATA_W)) u_system (
    .clk, .rst, .wr_tick, .flag, .overflow,
    .gate_line  (cfg_set.gate_line),
    .usr_fm_set (cfg_set.usr_fm),
    .igno_set   (cfg_set.ignore),
    .usr_fm, .ignore, .cs_n, .data_wr, .lnk_cnt, .busy(host_busy), .img_id
  );

  ram_display #(.MAX_LINES(MAX_LINES), .DATA_W(DATA_W)) u_ram (
    .clk, .rst, .wr_tick, .dis_tick,
    .gate_line (cfg_set.gate_line),
    .bp        (cfg_set.bp),
    .fp        (cfg_set.fp),
    .nth_frame, .cs_n, .data_wr, .lnk_cnt,
    .data_dis, .dis_valid, .dis_line, .ln_cnt, .fm_cnt
  );

endmodule
