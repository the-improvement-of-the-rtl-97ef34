// End-to-end testbench of the memory-access scheduler, at the design's
// default parameters (50 MHz system clock, 160-line memory, 16-bit words).
//
// The host model inside the design writes a new image after every accessing
// flag; each memory word carries its image number, so every frame that
// reaches the panel shows whether it mixes two images. For a sequence of
// operating points (display 60 Hz, 160 gate lines, 4 + 4 porch lines) the
// testbench:
//   * sweeps the write rate over 40, 45, ..., 90 Hz and checks the accessing
//     start line and the line at which the host finishes writing, both in
//     display line times from the start of the flag's frame, against the
//     table of written ranges (within 3 lines);
//   * checks that every flag comes at the computed accessing line and frame,
//     lasts one gate line, and recurs every nth_frame frames;
//   * checks that no displayed frame mixes two images, and that new images
//     do reach the panel;
//   * runs the overflow cases (display more than twice the write rate, and
//     writing beyond the +10% margin) with the host following its own frame
//     period and with the overflow interrupt, and a user frame period.
// Every mechanism (each state-machine state, flag, interrupt, follow mode,
// restart on a setting change, porch lines, image change on the panel) is
// counted; one that never happens counts as a failure.
module tb_ldi_access_top;
  import ldi_pkg::*;

  localparam int unsigned DW = 16;

  logic clk = 1'b0;
  logic rst, cfg_we;
  logic [2:0] cfg_addr;
  word_t cfg_wdata;
  logic [DW-1:0] data_dis;
  logic dis_valid, flag, overflow, wr_tick, dis_tick, cs_n, host_busy;
  sm_state_e sm_state;
  word_t dis_line, nth_line, nth_frame, write_line, ln_cnt, fm_cnt, lnk_cnt, img_id;

  int checks = 0, failures = 0;

  ldi_access_top dut (.*);

  // 50 MHz
  always #10ns clk = ~clk;

  initial begin : watchdog
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- monitors
  int state_seen[16];
  int n_flags, n_overflow_cycles, n_restarts, n_porch_lines, n_img_changes;
  int n_mixed_frames, n_clean_frames, n_writes_started;
  bit check_mixing;          // frames must not mix images
  bit flag_q, arm_frames;
  longint abs_line;          // display line times since reset
  longint flag_frame_start;  // abs_line of line 0 of the flag's frame
  longint last_flag_abs;
  int exp_period;            // flag period in frames, 0 = unknown
  int range_start, range_end;
  int frame_img, frame_ok, frame_lines;
  int last_shown_img;

  always @(posedge clk) begin
    if (!rst) begin
      state_seen[sm_state]++;
      if (sm_state == ST_FLAG && overflow) n_overflow_cycles++;
      if (dis_tick) begin
        abs_line++;
        if (ln_cnt >= 16'd160) n_porch_lines++;
      end
      // Flag: position and one-gate-line length.
      if (flag && !flag_q && !overflow) begin
        n_flags++;
        check(ln_cnt == nth_line && fm_cnt == nth_frame,
              $sformatf("flag at %0d/%0d, position %0d/%0d", ln_cnt, fm_cnt, nth_line, nth_frame));
        if (exp_period > 0 && last_flag_abs >= 0)
          check(abs_line - last_flag_abs == longint'(exp_period) * 168,
                $sformatf("flag period %0d lines, expected %0d frames",
                          abs_line - last_flag_abs, exp_period));
        last_flag_abs = abs_line;
        if (!host_busy) flag_frame_start = abs_line - longint'(ln_cnt);
      end
      if (!flag && flag_q && !overflow && exp_period > 0)
        check(abs_line - last_flag_abs == 1, "flag lasts one gate line");
      flag_q <= flag;
      // Written range of each image.
      if (wr_tick && !cs_n) begin
        if (lnk_cnt == 0) begin
          n_writes_started++;
          range_start = int'(abs_line - flag_frame_start);
        end
        if (lnk_cnt == 16'd159) range_end = int'(abs_line - flag_frame_start);
      end
      // Displayed frames: all 160 lines from one image.
      if (dis_valid) begin
        if (dis_line == 0) begin
          frame_img = int'(data_dis[15:8]);
          frame_ok = 1;
          frame_lines = 1;
        end else begin
          frame_lines++;
          if (int'(data_dis[15:8]) != frame_img) frame_ok = 0;
          check(int'(data_dis[7:0]) == int'(dis_line[7:0]) || !arm_frames,
                "displayed word belongs to its line");
        end
        if (dis_line == 16'd159 && arm_frames) begin
          if (frame_ok) n_clean_frames++; else n_mixed_frames++;
          if (check_mixing)
            check(frame_ok == 1 && frame_lines == 160,
                  $sformatf("frame mixes images (write %0d Hz)", cur_wr));
          if (frame_ok && frame_img != last_shown_img) n_img_changes++;
          last_shown_img = frame_img;
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  int cur_wr;

  task automatic set_reg(input logic [2:0] a, input int v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic wait_frames(int n);
    repeat (n) begin
      @(posedge clk iff (dis_tick && ln_cnt == 16'd167));
    end
  endtask

  // Set an operating point once the host is idle, and wait for the state
  // machine to settle.
  task automatic op_point(int wr, int usr, bit ign);
    @(negedge clk iff !host_busy);
    cur_wr = wr;
    check_mixing = 0;
    exp_period = 0;
    if (sm_state == ST_FLAG) n_restarts++;
    set_reg(3'd0, wr);
    set_reg(3'd5, usr);
    set_reg(3'd6, int'(ign));
    repeat (30) @(negedge clk);
    check(sm_state == ST_FLAG, "state machine settles in Flag");
    exp_period = int'(nth_frame);
    last_flag_abs = -1;
  endtask

  // Written range table: write rate 40..90 Hz -> start, end line.
  int t_start[11] = '{30, 44, 55, 61, 76, 89, 100, 105, 109, 113, 116};
  int t_end[11]   = '{271, 258, 247, 235, 236, 236, 237, 233, 229, 225, 223};

  initial begin
    int imgs;
    rst = 1'b1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    abs_line = 0; flag_q = 0; n_flags = 0; n_overflow_cycles = 0; n_restarts = 0;
    n_porch_lines = 0; n_img_changes = 0; n_mixed_frames = 0; n_clean_frames = 0;
    n_writes_started = 0; check_mixing = 0; arm_frames = 0; last_flag_abs = -1;
    exp_period = 0; last_shown_img = -1; frame_ok = 0; frame_img = 0; frame_lines = 0;
    flag_frame_start = 0; cur_wr = 40;
    foreach (state_seen[i]) state_seen[i] = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // Reset operating point: 40 Hz write, 60 Hz display, accessing line 30, frame 2.
    repeat (40) @(negedge clk);
    check(sm_state == ST_FLAG && nth_line == 16'd30 && nth_frame == 16'd2 && write_line == 16'd252,
          "40/60 Hz: accessing line 30 of frame 2, write line 252");
    exp_period = 2;
    // First image fills the memory; from then on frames are compared.
    @(negedge clk iff host_busy);
    @(negedge clk iff !host_busy);
    wait_frames(1);
    arm_frames = 1;

    // Sweep of the write rate.
    for (int i = 0; i < 11; i++) begin
      op_point(40 + 5 * i, 0, 1'b1);
      // Let one image be written at the new position before judging frames.
      @(negedge clk iff host_busy);
      @(negedge clk iff !host_busy);
      wait_frames(1);
      check_mixing = 1;
      imgs = n_writes_started;
      @(negedge clk iff host_busy);
      @(negedge clk iff !host_busy);
      check(range_start >= t_start[i] && range_start <= t_start[i] + 1,
            $sformatf("%0d Hz: write starts at %0d, table %0d", cur_wr, range_start, t_start[i]));
      check(range_end >= t_end[i] - 3 && range_end <= t_end[i] + 3,
            $sformatf("%0d Hz: write ends at %0d, table %0d", cur_wr, range_end, t_end[i]));
      wait_frames(4);
      check(n_writes_started > imgs, "images keep coming");
    end

    // User frame period 5 at 50 Hz.
    op_point(50, 5, 1'b1);
    check(nth_frame == 16'd5, "user frame period 5");
    @(negedge clk iff host_busy);
    @(negedge clk iff !host_busy);
    wait_frames(1);
    check_mixing = 1;
    wait_frames(11);

    // Display more than twice the write rate: host follows its period of 4.
    op_point(25, 4, 1'b1);
    check(nth_frame == 16'd4 && nth_line == 16'd0 && !overflow, "25 Hz follow every 4 frames");
    wait_frames(9);
    // Beyond the +10% margin: host follows period 3.
    op_point(32, 3, 1'b1);
    check(nth_frame == 16'd3 && !overflow, "32 Hz follow every 3 frames");
    wait_frames(7);
    // Same with the interrupt: overflow held, no new image.
    op_point(32, 0, 1'b0);
    check(overflow && flag, "32 Hz interrupt: overflow and flag high");
    imgs = n_writes_started;
    wait_frames(3);
    check(n_writes_started == imgs, "no write during an overflow interrupt");
    op_point(25, 0, 1'b0);
    check(overflow, "25 Hz interrupt");
    wait_frames(2);
    // Back to equal rates: writing resumes, frames clean again.
    op_point(60, 0, 1'b1);
    check(!overflow, "interrupt cleared");
    @(negedge clk iff host_busy);
    @(negedge clk iff !host_busy);
    wait_frames(1);
    check_mixing = 1;
    wait_frames(4);

    // Mechanism coverage.
    for (int s = 0; s < 14; s++)
      check(state_seen[s] > 0, $sformatf("state %s visited", sm_state_e'(s)));
    check(n_flags > 20, $sformatf("%0d flags", n_flags));
    check(n_overflow_cycles > 0, "overflow interrupt happened");
    check(n_restarts > 10, "restart on setting change happened");
    check(n_porch_lines > 0, "porch lines scanned");
    check(n_img_changes > 20, $sformatf("%0d image changes on the panel", n_img_changes));
    check(n_clean_frames > 50, $sformatf("%0d clean frames", n_clean_frames));
    $display("flags=%0d img_changes=%0d clean_frames=%0d mixed_frames(overflow cases)=%0d restarts=%0d",
             n_flags, n_img_changes, n_clean_frames, n_mixed_frames, n_restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
