// tb_cal_dll: self-checking test of the cal_dll behavioural model.
// For every tap it sends a pulse and measures the delay of both edges of pulse_out against
// tap * 25 ns / 8; it also checks that locked rises after the lock time.
module tb_cal_dll;
  logic clk = 0, rst_n, pulse_in, pulse_out, locked;
  logic [2:0] tap;
  realtime t_in, t_out;
  int checks = 0, failures = 0;

  cal_dll dut (.*);

  always #12.5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; pulse_in = 0; tap = 0;
    #50ns rst_n = 1;
    check(!locked, "not locked right after reset");
    repeat (20) @(posedge clk);
    check(locked, "locked after the lock time");
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      tap = 3'(k);
      #1ns;
      pulse_in = 1; t_in = $realtime;
      @(posedge pulse_out or negedge rst_n) t_out = $realtime;
      check((t_out - t_in) > (k * 3.125ns - 0.01ns) && (t_out - t_in) < (k * 3.125ns + 0.01ns),
            $sformatf("tap %0d rising delay %0t", k, t_out - t_in));
      #20ns pulse_in = 0; t_in = $realtime;
      @(negedge pulse_out) t_out = $realtime;
      check((t_out - t_in) > (k * 3.125ns - 0.01ns) && (t_out - t_in) < (k * 3.125ns + 0.01ns),
            $sformatf("tap %0d falling delay %0t", k, t_out - t_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
