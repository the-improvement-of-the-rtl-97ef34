// Self-checking testbench of the clock generator.
//
// With a 100 kHz system clock it counts the write and display line strobes
// over one simulated second and checks them against rate x frame length
// (40 Hz and 60 Hz at 160 + 4 + 4 lines: 6720 and 10080), checks that
// successive strobes are evenly spaced (floor or ceiling of CLK_HZ / line
// rate), and repeats for a second operating point.
module tb_clk_generator;
  import ldi_pkg::*;

  localparam int unsigned CLK_HZ = 100_000;

  logic clk = 1'b0;
  logic rst, wr_tick, dis_tick;
  word_t wr_rate, dis_rate, gate_line, bp, fp;
  int checks = 0, failures = 0;

  clk_generator #(.CLK_HZ(CLK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(int wr, int dis, int gr, int b, int f);
    int nwr, ndis, last_dis, gap, lo, hi, rate_d;
    @(negedge clk);
    rst = 1'b1;
    wr_rate = 16'(wr); dis_rate = 16'(dis); gate_line = 16'(gr); bp = 16'(b); fp = 16'(f);
    @(negedge clk);
    rst = 1'b0;
    nwr = 0; ndis = 0; last_dis = -1;
    rate_d = dis * (gr + b + f);
    lo = CLK_HZ / rate_d;
    hi = (CLK_HZ + rate_d - 1) / rate_d;
    for (int c = 0; c < int'(CLK_HZ); c++) begin
      @(posedge clk);
      #1;
      if (wr_tick) nwr++;
      if (dis_tick) begin
        ndis++;
        if (last_dis >= 0) begin
          gap = c - last_dis;
          check(gap >= lo && gap <= hi, $sformatf("display strobe gap %0d not in %0d..%0d", gap, lo, hi));
        end
        last_dis = c;
      end
    end
    check(nwr >= wr * (gr + b + f) - 1 && nwr <= wr * (gr + b + f),
          $sformatf("write strobes %0d exp %0d", nwr, wr * (gr + b + f)));
    check(ndis >= rate_d - 1 && ndis <= rate_d,
          $sformatf("display strobes %0d exp %0d", ndis, rate_d));
  endtask

  initial begin
    rst = 1'b1;
    measure(40, 60, 160, 4, 4);
    measure(75, 50, 120, 2, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
