// Self-checking testbench of the accessing-position state machine.
//
// For a set of operating points it loads the settings, waits for the Flag
// state and checks the visited state sequence, the write line, the accessing
// line and frame and the interrupt against a reference model written here
// from the case formulas. It also checks the accessing start positions of the
// table for 160 gate lines at 60 Hz display (writing at 40..90 Hz, porch 8)
// and the 40 Hz / 60 Hz example (line 30, frame 2, write line 252), and that
// changing a setting while in Flag restarts the calculation.
module tb_access_state_machine;
  import ldi_pkg::*;

  logic clk = 1'b0;
  logic rst;
  settings_t cfg;
  sm_state_e state;
  word_t nth_line, nth_frame, write_line;
  logic sys_inter, pos_valid;
  int checks = 0, failures = 0;

  access_state_machine dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model: returns the expected states after Freq_Compare.
  typedef struct {
    int w; int line; int frame; bit inter;
    sm_state_e path[4]; int npath;
  } exp_t;

  function automatic exp_t model(int wr, int dis, int gr, int porch, int usr, bit ign);
    exp_t e;
    int t, m, pos, fq;
    t = gr + porch;
    m = gr / 10;
    e.w = (t * dis) / wr;
    e.inter = 0;
    e.npath = 0;
    if (wr > dis) begin
      e.path[e.npath++] = ST_FAST;
      if (wr * 10 > dis * 11) begin
        e.path[e.npath++] = ST_FAST_STABLE;
        pos = (2 * gr + porch + m - e.w) / 2;
      end else begin
        e.path[e.npath++] = ST_FAST_UNSTABLE;
        pos = (3 * gr + porch - 2 * e.w) / 2;
      end
      e.frame = (usr > 1) ? usr : 1;
    end else if (wr == dis) begin
      e.path[e.npath++] = ST_SAME;
      pos = (3 * gr + porch - 2 * e.w) / 2;
      e.frame = (usr > 1) ? usr : 1;
    end else begin
      bit ovf;
      e.path[e.npath++] = ST_SLOW;
      ovf = dis > 2 * wr;
      if (!ovf) begin
        e.path[e.npath++] = ST_SLOW_CONTROL;
        ovf = (2 * gr + porch - m - e.w) <= 0;
      end
      if (ovf) begin
        e.path[e.npath++] = ST_SLOW_OVERFLOW;
        e.path[e.npath++] = ign ? ST_FOLLOW : ST_INTERRUPT;
        e.inter = !ign;
        pos = 0;
        fq = 1 + e.w / t;
        e.frame = (usr > fq) ? usr : fq;
      end else begin
        if (wr * 10 < dis * 9) begin
          e.path[e.npath++] = ST_SLOW_STABLE;
          pos = (2 * gr + porch - m - e.w) / 2;
        end else begin
          e.path[e.npath++] = ST_SLOW_UNSTABLE;
          pos = (3 * gr + porch - 2 * e.w) / 2;
        end
        e.frame = (usr > 2) ? usr : 2;
      end
    end
    if (pos < 0) pos = 0;
    if (pos > t - 1) pos = t - 1;
    e.line = pos;
    return e;
  endfunction

  // Apply a setting and run the machine to Flag, checking the path.
  task automatic run_point(int wr, int dis, int gr, int bp, int fp, int usr, bit ign,
                           int want_line = -1, bit by_reset = 1'b1);
    exp_t e;
    sm_state_e seen[$];
    e = model(wr, dis, gr, bp + fp, usr, ign);
    // Restart either by reset or by the setting change itself.
    @(negedge clk);
    if (!by_reset) check(state == ST_FLAG, "in Flag before the setting change");
    cfg.wr_rate = 16'(wr); cfg.dis_rate = 16'(dis); cfg.gate_line = 16'(gr);
    cfg.bp = 16'(bp); cfg.fp = 16'(fp); cfg.usr_fm = 4'(usr); cfg.ignore = ign;
    if (by_reset) begin
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
    end else begin
      @(negedge clk);
    end
    for (int i = 0; i < 20 && state != ST_FLAG; i++) begin
      seen.push_back(state);
      @(negedge clk);
    end
    check(state == ST_FLAG && pos_valid, $sformatf("wr=%0d reached Flag", wr));
    check(seen.size() == e.npath + 2, $sformatf("wr=%0d path length %0d", wr, seen.size()));
    if (seen.size() == e.npath + 2) begin
      check(seen[0] == ST_IDLE && seen[1] == ST_FREQ_COMPARE, "Idle, Freq_Compare first");
      for (int i = 0; i < e.npath; i++)
        check(seen[i+2] == e.path[i],
              $sformatf("wr=%0d dis=%0d step %0d: %s, expected %s", wr, dis, i,
                        seen[i+2].name(), e.path[i].name()));
    end
    check(int'(write_line) == e.w, $sformatf("wr=%0d write line %0d exp %0d", wr, write_line, e.w));
    check(int'(nth_line) == e.line, $sformatf("wr=%0d nth_line %0d exp %0d", wr, nth_line, e.line));
    check(int'(nth_frame) == e.frame, $sformatf("wr=%0d nth_frame %0d exp %0d", wr, nth_frame, e.frame));
    check(sys_inter == e.inter, $sformatf("wr=%0d sys_inter", wr));
    if (want_line >= 0)
      check(int'(nth_line) == want_line,
            $sformatf("wr=%0d table start %0d got %0d", wr, want_line, nth_line));
  endtask

  // Accessing start positions for writing at 40, 45, ... 90 Hz, 60 Hz display,
  // 160 gate lines, 8 porch lines. At 80 Hz the position 109 follows from the
  // case 7 formula and from the table's end position 229 (= 109 + 120).
  int table_start[11] = '{30, 44, 55, 61, 76, 89, 100, 105, 109, 113, 116};

  initial begin
    cfg = '{wr_rate: 16'd40, dis_rate: 16'd60, gate_line: 16'd160, bp: 16'd4, fp: 16'd4,
            usr_fm: 4'd0, ignore: 1'b1};
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // Example point: 40 Hz writing, 60 Hz display.
    run_point(40, 60, 160, 4, 4, 0, 1, 30);
    check(nth_frame == 16'd2 && write_line == 16'd252, "example: frame 2, write line 252");
    // Table sweep.
    for (int i = 0; i < 11; i++)
      run_point(40 + 5 * i, 60, 160, 4, 4, 0, 1, table_start[i]);
    // Overflow cases, both host choices, and user frame periods.
    run_point(25, 60, 160, 4, 4, 4, 1);   // display/write > 2, follow every 4
    run_point(25, 60, 160, 4, 4, 0, 0);   // same, interrupt
    run_point(32, 60, 160, 4, 4, 3, 1);   // beyond +10% margin, follow every 3
    run_point(32, 60, 160, 4, 4, 0, 0);   // same, interrupt
    run_point(50, 60, 160, 4, 4, 5, 1);   // slow, user period 5
    run_point(90, 60, 160, 4, 4, 3, 1);   // fast, user period 3
    run_point(120, 60, 320, 2, 6, 0, 1);  // other resolution and porches
    // Random points within the dynamic range.
    for (int i = 0; i < 40; i++)
      run_point(20 + $urandom_range(0, 110), 60, 100 + $urandom_range(0, 220),
                $urandom_range(0, 8), $urandom_range(0, 8), $urandom_range(0, 6),
                1'($urandom_range(0, 1)));
    // A setting change in Flag restarts the calculation without reset.
    run_point(60, 60, 160, 4, 4, 0, 1, 76, 1'b0);
    run_point(70, 60, 160, 4, 4, 0, 0, 100, 1'b0);
    run_point(25, 60, 160, 4, 4, 0, 0, -1, 1'b0);
    run_point(45, 60, 160, 4, 4, 0, 1, 44, 1'b0);
    // Holding still in Flag.
    repeat (5) @(posedge clk);
    #1 check(state == ST_FLAG, "stays in Flag while settings hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
