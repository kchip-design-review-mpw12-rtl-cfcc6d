// tb_config_regs: self-checking test of config_regs through its register bus.
// Checks the reset values (CalPulse_WIDTH 2, CalPulse_DELAY 8'b1111_1110, ADC pipeline 6),
// write and read-back of the three, the CTRL pulses, the read-only status registers and ID
// fuses (writes ignored), and the three saturating event counters with clear.
module tb_config_regs;
  import kchip_pkg::*;
  logic clk = 0, rst_n;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we;
  cfg_t cfg;
  logic bist_start, err_clear;
  logic [NPACE-1:0] sync_err;
  logic [7:0] sync_err_cnt;
  logic col_err;
  logic bist_done, bist_fail, sec_ev, ded_ev, ovf_ev;
  logic [15:0] id_fuse;
  int checks = 0, failures = 0;

  config_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  // reads all registers into rv[] (combinational read port)
  logic [7:0] rv [16];
  task automatic snap();
    for (int a = 0; a < 16; a++) begin
      reg_addr = 8'(a);
      #1 rv[a] = reg_rdata;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pulses;
    rst_n = 0; reg_addr = 0; reg_wdata = 0; reg_we = 0;
    sync_err = 4'b0101; col_err = 1; sync_err_cnt = 8'd77; bist_done = 1; bist_fail = 0;
    sec_ev = 0; ded_ev = 0; ovf_ev = 0; id_fuse = 16'hBEEF;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(cfg.cal_width == 8'd2 && cfg.cal_delay == 8'hFE && cfg.adc_pipe == 8'd6, "reset values");
    snap();
    check(rv[REG_CAL_WIDTH] == 8'd2 && rv[REG_CAL_DELAY] == 8'hFE && rv[REG_ADC_PIPE] == 8'd6, "reset values read");
    wr(REG_CAL_WIDTH, 8'd9); wr(REG_CAL_DELAY, 8'h3C); wr(REG_ADC_PIPE, 8'd4);
    check(cfg.cal_width == 8'd9 && cfg.cal_delay == 8'h3C && cfg.adc_pipe == 8'd4, "written values");
    snap();
    check(rv[REG_CAL_WIDTH] == 8'd9 && rv[REG_CAL_DELAY] == 8'h3C && rv[REG_ADC_PIPE] == 8'd4, "read back");
    snap();
    check(rv[REG_STATUS] == 8'b0101_0101, $sformatf("status %b", rv[REG_STATUS]));
    snap();
    check(rv[REG_SYNC_ERRS] == 8'd77, "sync error count");
    snap();
    check(rv[REG_ID_LO] == 8'hEF && rv[REG_ID_HI] == 8'hBE, "ID fuses");
    wr(REG_ID_LO, 8'h00);
    snap();
    check(rv[REG_ID_LO] == 8'hEF, "ID read-only");
    // CTRL pulses
    pulses = 0;
    fork
      wr(REG_CTRL, 8'h01);
      repeat (4) @(posedge clk) #1 if (bist_start) pulses++;
    join
    snap();
    check(pulses == 1 && rv[REG_CTRL] == 8'h00, "one BIST start pulse");
    // counters
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      sec_ev = (i < 10); ded_ev = (i < 3); ovf_ev = 1;
    end
    @(negedge clk); sec_ev = 0; ded_ev = 0; ovf_ev = 0;
    snap();
    check(rv[REG_ECC_SEC] == 8'd10 && rv[REG_ECC_DED] == 8'd3 && rv[REG_OVF] == 8'hFF,
          $sformatf("counters %0d %0d %0d", rv[REG_ECC_SEC], rv[REG_ECC_DED], rv[REG_OVF]));
    pulses = 0;
    fork
      wr(REG_CTRL, 8'h02);
      repeat (4) @(posedge clk) #1 if (err_clear) pulses++;
    join
    check(pulses == 1, "one clear pulse");
    snap();
    check(rv[REG_ECC_SEC] == 0 && rv[REG_ECC_DED] == 0 && rv[REG_OVF] == 0, "counters cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
