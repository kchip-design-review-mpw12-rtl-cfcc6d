// tb_sync_fifo: self-checking test of sync_fifo against a queue model.
// Random push/pop for 3000 clocks, including pushes when full and pops when empty; checks
// the head word, full, empty and count every clock.
module tb_sync_fifo;
  localparam int unsigned W = 33;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n;
  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;
  int fulls = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == 4'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      check(full == (q.size() == DEPTH) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("head %h vs %h", rd_data, q[0]));
      if (full) fulls++;
      // bias toward filling in the first half and draining in the second
      push = ($urandom % 100) < ((i / 500) % 2 == 0 ? 70 : 30);
      pop  = ($urandom % 100) < ((i / 500) % 2 == 0 ? 30 : 70);
      wr_data = {$urandom, 1'($urandom)};
      begin
        bit do_push, do_pop;
        do_push = push && q.size() < DEPTH;
        do_pop  = pop && q.size() > 0;
        @(posedge clk);
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(wr_data);
      end
    end
    check(fulls > 0, "FIFO reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
