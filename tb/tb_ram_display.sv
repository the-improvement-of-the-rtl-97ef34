// Self-checking testbench of the RAM & display block.
//
// Writes random words at random lines (some with the chip select high, some
// beyond the gate resolution, both of which must be ignored) while the
// display scan runs, and checks every displayed word, the line and frame
// counters and the number of active lines per frame against a reference
// memory and reference counters kept here.
module tb_ram_display;
  import ldi_pkg::*;

  localparam int unsigned ML = 16;
  localparam int unsigned DW = 8;

  logic clk = 1'b0;
  logic rst, wr_tick, dis_tick, cs_n, dis_valid;
  word_t gate_line, bp, fp, nth_frame, lnk_cnt, dis_line, ln_cnt, fm_cnt;
  logic [DW-1:0] data_wr, data_dis;
  int checks = 0, failures = 0;

  logic [DW-1:0] ref_mem [ML];
  int ref_ln, ref_fm, lines_shown, frames_seen;
  logic [DW-1:0] exp_word;

  ram_display #(.MAX_LINES(ML), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; wr_tick = 0; dis_tick = 0; cs_n = 1;
    gate_line = 16'd12; bp = 16'd2; fp = 16'd3; nth_frame = 16'd3;
    lnk_cnt = '0; data_wr = '0;
    for (int i = 0; i < int'(ML); i++) ref_mem[i] = '0;
    @(negedge clk);
    // Preload the memory through the write port.
    rst = 1'b0;
    for (int i = 0; i < int'(ML); i++) begin
      wr_tick = 1; cs_n = 0; lnk_cnt = 16'(i); data_wr = DW'(i * 7 + 1);
      if (i < 12) ref_mem[i] = data_wr;
      @(negedge clk);
    end
    wr_tick = 0; cs_n = 1;
    ref_ln = 0; ref_fm = 1; lines_shown = 0; frames_seen = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // Random host activity.
      wr_tick = 1'($urandom_range(0, 1));
      cs_n    = 1'($urandom_range(0, 3) == 0);
      lnk_cnt = 16'($urandom_range(0, 15));
      data_wr = DW'($urandom);
      dis_tick = (cyc % 3 == 0);
      if (cyc == 1500) nth_frame = 16'd1;
      // A read returns the word stored before this clock edge.
      if (ref_ln < 12) exp_word = ref_mem[ref_ln];
      @(posedge clk);
      if (wr_tick && !cs_n && lnk_cnt < 12) ref_mem[lnk_cnt] = data_wr;
      #1;
      if (dis_tick) begin
        if (ref_ln < 12) begin
          check(dis_valid && int'(dis_line) == ref_ln, $sformatf("line %0d shown", ref_ln));
          check(data_dis == exp_word, $sformatf("data line %0d: %h exp %h", ref_ln, data_dis, exp_word));
          lines_shown++;
        end else
          check(!dis_valid, "no output in porch");
        ref_ln++;
        if (ref_ln == 17) begin
          ref_ln = 0;
          ref_fm = (ref_fm >= int'(nth_frame)) ? 1 : ref_fm + 1;
          frames_seen++;
        end
        check(int'(ln_cnt) == ref_ln && int'(fm_cnt) == ref_fm,
              $sformatf("counters %0d/%0d exp %0d/%0d", ln_cnt, fm_cnt, ref_ln, ref_fm));
      end else
        check(!dis_valid, "dis_valid only after a display strobe");
      @(negedge clk);
    end
    check(frames_seen > 50 && lines_shown == frames_seen * 12 + (ref_ln < 12 ? ref_ln : 12),
          "12 active lines per 17-line frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
