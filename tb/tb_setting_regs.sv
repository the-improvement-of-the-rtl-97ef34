// Self-checking testbench of the setting block: reset values, each register
// written and read back through the settings output, an unused address that
// changes nothing, and no change while cfg_we is low.
module tb_setting_regs;
  import ldi_pkg::*;

  logic clk = 1'b0;
  logic rst, cfg_we;
  logic [2:0] cfg_addr;
  word_t cfg_wdata;
  settings_t cfg, exp_cfg;
  int checks = 0, failures = 0;

  setting_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    exp_cfg = '{wr_rate: 16'd40, dis_rate: 16'd60, gate_line: 16'd160, bp: 16'd4,
                fp: 16'd4, usr_fm: 4'd0, ignore: 1'b1};
    check(cfg == exp_cfg, "reset values");
    for (int i = 0; i < 200; i++) begin
      cfg_we    = 1'($urandom_range(0, 1));
      cfg_addr  = 3'($urandom_range(0, 7));
      cfg_wdata = 16'($urandom);
      if (cfg_we)
        case (cfg_addr)
          3'd0: exp_cfg.wr_rate   = cfg_wdata;
          3'd1: exp_cfg.dis_rate  = cfg_wdata;
          3'd2: exp_cfg.gate_line = cfg_wdata;
          3'd3: exp_cfg.bp        = cfg_wdata;
          3'd4: exp_cfg.fp        = cfg_wdata;
          3'd5: exp_cfg.usr_fm    = cfg_wdata[3:0];
          3'd6: exp_cfg.ignore    = cfg_wdata[0];
          default: ;
        endcase
      @(negedge clk);
      check(cfg == exp_cfg, $sformatf("after write %0d to address %0d", cfg_wdata, cfg_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
