// Self-checking testbench of the flag generator.
//
// Drives a display scan position (line 0..T-1, frame 1..N) one line every
// few clocks and checks that the accessing flag is high exactly for the line
// that equals the accessing position, one clock after the match, that no
// flag comes while the position is not valid, and that an interrupt holds the
// flag and the overflow output high.
module tb_flag_generator;
  import ldi_pkg::*;

  logic clk = 1'b0;
  logic rst, pos_valid, sys_inter, flag, overflow;
  word_t nth_line, nth_frame, ln_cnt, fm_cnt;
  int checks = 0, failures = 0;
  int pulses, high_cycles;

  flag_generator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Scan F frames of T lines, 4 clocks per line; check flag on every clock.
  task automatic scan(int t, int nfr, int frames, bit expect_flags);
    bit exp_next;
    pulses = 0; high_cycles = 0;
    exp_next = 1'b0;
    for (int f = 0; f < frames; f++)
      for (int l = 0; l < t; l++)
        for (int c = 0; c < 4; c++) begin
          @(negedge clk);
          ln_cnt = 16'(l);
          fm_cnt = 16'(f % nfr + 1);
          exp_next = pos_valid && (sys_inter || (l == int'(nth_line) && (f % nfr + 1) == int'(nth_frame)));
          @(posedge clk);
          #1;
          check(flag == exp_next, $sformatf("flag at line %0d frame %0d", l, f % nfr + 1));
          if (flag) high_cycles++;
        end
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; pos_valid = 0; sys_inter = 0;
    nth_line = 16'd30; nth_frame = 16'd2; ln_cnt = '0; fm_cnt = 16'd1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // No valid position: never a flag.
    scan(40, 2, 2, 0);
    check(high_cycles == 0, "no flag without a valid position");
    // Line 30 of every second frame: one gate line (4 clocks) per 2 frames.
    pos_valid = 1;
    scan(40, 2, 4, 1);
    check(high_cycles == 8, $sformatf("flag lasted %0d clocks over 2 periods, expected 8", high_cycles));
    // Every frame, line 0.
    nth_line = 16'd0; nth_frame = 16'd1;
    scan(20, 1, 3, 1);
    check(high_cycles == 12, $sformatf("line-0 flag %0d clocks", high_cycles));
    // Interrupt: flag and overflow held high.
    sys_inter = 1;
    repeat (3) @(posedge clk);
    #1 check(flag && overflow, "interrupt holds flag and overflow high");
    scan(10, 1, 1, 1);
    check(high_cycles == 40, "flag high on every clock during interrupt");
    sys_inter = 0;
    repeat (2) @(posedge clk);
    #1 check(!overflow, "overflow drops with the interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
