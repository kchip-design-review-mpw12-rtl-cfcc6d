// tb_cal_pulse_gen: self-checking test of cal_pulse_gen.
// For the reset values (width 2, delay 8'b1111_1110) and a set of other settings it sends
// one request and measures, in clocks, the time from the request clock to the first clock
// of CalPulse (expected delay[7:3] + 1) and the pulse width (expected width), and checks the
// DLL tap (delay[2:0]). A request while busy must not restart the pulse; width 0 must give
// no pulse.
module tb_cal_pulse_gen;
  logic clk = 0, rst_n, cal_req, cal_pulse, busy;
  logic [7:0] cal_width, cal_delay;
  logic [2:0] dll_tap;
  int checks = 0, failures = 0;

  cal_pulse_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic one(input logic [7:0] w, input logic [7:0] d, input bit extra_req);
    int t, start_t, width;
    cal_width = w; cal_delay = d;
    @(negedge clk); cal_req = 1;
    @(negedge clk); cal_req = 0;
    t = 1; start_t = -1; width = 0;
    while (t < 400) begin
      if (cal_pulse) begin
        if (start_t < 0) start_t = t;
        width++;
      end
      if (extra_req && t == 3) cal_req = 1; else cal_req = 0;
      @(negedge clk);
      t++;
    end
    if (w == 0) check(start_t < 0, "width 0 gives no pulse");
    else begin
      check(start_t == int'(d[7:3]) + 1, $sformatf("w=%0d d=%b: pulse after %0d clocks, expected %0d", w, d, start_t, int'(d[7:3]) + 1));
      check(width == int'(w), $sformatf("width %0d expected %0d", width, w));
      check(dll_tap == d[2:0], "dll tap");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cal_req = 0; cal_width = 8'd2; cal_delay = 8'hFE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(8'd2, 8'b1111_1110, 0);
    one(8'd1, 8'b0000_0011, 0);
    one(8'd5, 8'b0000_1000, 1);
    one(8'd0, 8'b0010_0000, 0);
    repeat (10) one(8'($urandom_range(1, 40)), 8'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
