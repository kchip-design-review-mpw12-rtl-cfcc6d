// tb_pace_emulator: self-checking test of pace_emulator (NSMP reduced to 6).
// Triggers are sent at random spacing, some closer than a frame so that they queue. A
// reference computes each frame start as max(trigger clock + PACE_LAT + 1, previous start +
// frame length) and from it the expected DataValid, the known mask, busy and the sample
// strobes for every clock; all are compared clock by clock. A resync in the middle of a frame
// must stop it and discard queued triggers.
module tb_pace_emulator;
  import kchip_pkg::*;
  localparam int unsigned L = 4, GAP = 1, NSMP = 6;
  localparam int unsigned FRAME = (1 + COL_W + NSMP + GAP) * SLOT_CLKS;

  logic clk = 0, rst_n, p_lv1, resync;
  logic exp_dv, exp_known, busy, frame_start, addr_stb, smp_stb, smp_last;
  logic [4:0] smp_idx;
  logic [5:0] pending;
  int checks = 0, failures = 0;
  int cyc = 0;
  int starts [$];
  int queued = 0;

  pace_emulator #(.PACE_LAT(L), .GAP(GAP), .NSMP(NSMP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // reference for clock c given the list of frame starts
  task automatic ref_at(input int c, output bit dv, output bit known, output bit bsy,
                        output bit sstb, output int sidx);
    dv = 0; known = 1; bsy = 0; sstb = 0; sidx = 0;
    foreach (starts[i]) begin
      int o, slot;
      o = c - starts[i];
      if (o >= 0 && o < int'(FRAME)) begin
        slot = o / SLOT_CLKS;
        bsy = 1;
        dv = (slot == 0) || (slot > COL_W && slot <= COL_W + NSMP);
        known = !(slot >= 1 && slot <= COL_W);
        sstb = (slot > COL_W && slot <= COL_W + NSMP) && (o % SLOT_CLKS == SLOT_CLKS - 1);
        sidx = slot - COL_W - 1;
      end
    end
  endtask

  task automatic trigger();
    int s;
    // p_lv1 is high in the current clock (cyc)
    s = cyc + L + 1;
    if (starts.size() > 0 && starts[$] + int'(FRAME) > s) s = starts[$] + FRAME;
    starts.push_back(s);
    p_lv1 = 1;
  endtask

  int smp_seen = 0, queued_seen = 0;
  bit chk_en = 1;
  always @(negedge clk) if (rst_n && chk_en) begin
    bit dv, kn, bs, ss;
    int si;
    ref_at(cyc, dv, kn, bs, ss, si);
    check(exp_dv == dv && exp_known == kn && busy == bs,
          $sformatf("dv %b/%b known %b/%b busy %b/%b", exp_dv, dv, exp_known, kn, busy, bs));
    check(smp_stb == ss, $sformatf("smp_stb %b/%b", smp_stb, ss));
    if (ss) check(32'(smp_idx) == si, $sformatf("smp_idx %0d/%0d", smp_idx, si));
    if (smp_stb) smp_seen++;
    if (pending > 0 && busy) queued_seen++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; p_lv1 = 0; resync = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      repeat ($urandom_range(1, 45)) @(posedge clk);
      #1 trigger();
      @(posedge clk);
      #1 p_lv1 = 0;
    end
    repeat (30 * FRAME) @(posedge clk);
    check(smp_seen == 30 * NSMP, $sformatf("sample strobes %0d, expected %0d", smp_seen, 30 * NSMP));
    check(queued_seen > 0, "a trigger arrived during a frame and was queued");
    // resync during a frame with a trigger queued
    #1 trigger();
    @(posedge clk); #1 p_lv1 = 0;
    @(posedge clk); #1 trigger();
    @(posedge clk); #1 p_lv1 = 0;
    repeat (L + 8) @(posedge clk);
    #1 resync = 1; chk_en = 0;
    @(posedge clk); #1 resync = 0;
    repeat (3 * FRAME) begin
      @(negedge clk);
      check(!busy && pending == 0, "no frame after resync");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
