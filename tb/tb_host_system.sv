// Self-checking testbench of the host (System) block.
//
// Raises the accessing flag at random moments and checks that each rising
// flag seen while idle starts exactly one frame write: chip select low,
// lines 0 .. gate_line-1 in order, one per write strobe, each carrying the
// image number and line number, then chip select high. Flags during a write
// and flags during an overflow must start nothing. Also checks that the user
// frame and ignore settings are handed on.
module tb_host_system;
  import ldi_pkg::*;

  localparam int unsigned DW = 16;

  logic clk = 1'b0;
  logic rst, wr_tick, flag, overflow, igno_set, ignore, cs_n, busy;
  word_t gate_line, lnk_cnt, img_id;
  logic [UFM_W-1:0] usr_fm_set, usr_fm;
  logic [DW-1:0] data_wr;
  int checks = 0, failures = 0;
  int images, exp_line, exp_img, lines_written;
  bit writing, flag_q;

  host_system #(.DATA_W(DW)) dut (.*);

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

  initial begin
    rst = 1'b1; wr_tick = 0; flag = 0; overflow = 0; gate_line = 16'd10;
    usr_fm_set = 4'd3; igno_set = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    writing = 0; flag_q = 0; images = 0; exp_img = 0; lines_written = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      wr_tick  = (cyc % 3 == 0);
      flag     = ($urandom_range(0, 99) < 2) ? ~flag : flag;
      overflow = (cyc > 15000);
      if (cyc == 10000) begin usr_fm_set = 4'd5; igno_set = 1'b0; end
      @(posedge clk);
      // The word presented now is written if wr_tick is high.
      if (writing && wr_tick) begin
        check(!cs_n && int'(lnk_cnt) == exp_line, $sformatf("line %0d written, got %0d", exp_line, lnk_cnt));
        check(data_wr == DW'((exp_img << 8) | exp_line), $sformatf("data %h", data_wr));
        lines_written++;
        exp_line++;
        if (exp_line == 10) writing = 0;
      end else if (!writing) begin
        if (flag && !flag_q && !overflow) begin
          writing = 1; exp_line = 0; exp_img++; images++;
        end
      end
      flag_q = flag;
      #1;
      check(cs_n == !writing, $sformatf("chip select at cycle %0d", cyc));
      check(busy == writing, "busy");
      if (cyc > 2) check(usr_fm == usr_fm_set && ignore == igno_set, "settings handed on");
      @(negedge clk);
    end
    check(images > 10 && lines_written >= 10 * (images - 1), $sformatf("%0d images written", images));
    check(int'(img_id) == images, "image count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
