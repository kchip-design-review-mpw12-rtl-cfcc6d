// tb_pace_controller: self-checking test of pace_controller, driven by a pace_emulator
// (NSMP reduced to 6, Data FIFO depth 64).
// The testbench plays the four PACE chips (DataValid with a different serial column address
// per PACE and frame) and the ADC (channel p shows f(clock, p) in every clock). For every
// accepted frame starting at clock s it expects sample i of PACE p to be written at clock
// s + 2*(COL_W+1+i) + 1 + adc_pipe with the value f(that clock, p), and one column entry with
// the four addresses right with the last write. It runs with adc_pipe 6 and 3, checks the
// one-clock forwarding of the trigger, and makes one frame overflow (a Data FIFO reported
// nearly full): no writes, a dropped column entry and one ovf_ev pulse.
module tb_pace_controller;
  import kchip_pkg::*;
  localparam int unsigned NSMP = 6, DEPTH = 64, L = 4;
  localparam int unsigned FRAME = (1 + COL_W + NSMP + 1) * SLOT_CLKS;

  logic clk = 0, rst_n, l1a, resync_in, p_lv1, p_resync;
  logic exp_dv, exp_known, busy, frame_start, addr_stb, smp_stb, smp_last;
  logic [4:0] smp_idx;
  logic [5:0] pending;
  logic [NPACE-1:0] pace_dv;
  logic [ADC_W-1:0] adc_ch [NPACE];
  logic [7:0] adc_pipe;
  logic [6:0] fifo_count [NPACE];
  logic fifo_we;
  logic [ADC_W-1:0] fifo_wd [NPACE];
  logic [4:0] col_count;
  logic col_push, ovf_ev;
  col_entry_t col_entry;
  int checks = 0, failures = 0;
  int cyc = 0;

  pace_emulator #(.PACE_LAT(L), .NSMP(NSMP)) u_emu (.clk, .rst_n, .p_lv1, .resync(p_resync),
    .exp_dv, .exp_known, .busy, .frame_start, .addr_stb, .smp_stb, .smp_last, .smp_idx, .pending);
  pace_controller #(.DEPTH(DEPTH), .NSMP(NSMP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [ADC_W-1:0] f(input int c, input int p);
    return ADC_W'(c * 37 + p * 1000 + 5);
  endfunction

  always_comb for (int p = 0; p < NPACE; p++) adc_ch[p] = f(cyc, p);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // PACE model: DataValid from the frame offset, address bits from the per-frame address
  int fs = -1000;
  logic [COL_W-1:0] addr [NPACE];
  int nframe = 0;
  always @(posedge clk) begin
    #1;
    if (frame_start) begin
      fs = cyc;
      nframe++;
      for (int p = 0; p < NPACE; p++) addr[p] = COL_W'(nframe * 13 + p * 50);
    end
  end
  always_comb begin
    int o, slot;
    o = cyc - fs;
    slot = o / SLOT_CLKS;
    for (int p = 0; p < NPACE; p++) begin
      if (o >= 0 && slot >= 1 && slot <= COL_W) pace_dv[p] = addr[p][COL_W - slot];
      else pace_dv[p] = exp_dv;
    end
  end

  // expected writes and pushes, filled at frame start
  int exp_w [$];
  int exp_push [$];
  logic [NPACE*COL_W-1:0] exp_col [$];
  bit exp_drop [$];
  bit drop_next = 0;
  int writes = 0, pushes = 0, ovfs = 0, drops = 0;

  always @(negedge clk) if (rst_n) begin
    if (frame_start) begin
      int s;
      logic [NPACE*COL_W-1:0] cols;
      s = cyc;
      for (int p = 0; p < NPACE; p++) cols[p*COL_W +: COL_W] = COL_W'((nframe) * 13 + p * 50);
      if (!drop_next)
        for (int i = 0; i < int'(NSMP); i++) exp_w.push_back(s + 2 * (COL_W + 1 + i) + 1 + int'(adc_pipe));
      exp_push.push_back(s + 2 * (COL_W + NSMP) + 1 + int'(adc_pipe));
      exp_col.push_back(cols);
      exp_drop.push_back(drop_next);
      check(ovf_ev == drop_next, "ovf_ev at frame start");
    end
    if (ovf_ev) ovfs++;
    if (fifo_we) begin
      writes++;
      check(exp_w.size() > 0 && exp_w[0] == cyc, $sformatf("write at %0d, expected %0d", cyc,
            exp_w.size() > 0 ? exp_w[0] : -1));
      for (int p = 0; p < NPACE; p++)
        check(fifo_wd[p] == f(cyc, p), $sformatf("pace %0d data %h expected %h", p, fifo_wd[p], f(cyc, p)));
      if (exp_w.size() > 0) void'(exp_w.pop_front());
    end
    if (col_push) begin
      pushes++;
      if (col_entry.dropped) drops++;
      check(exp_push.size() > 0 && exp_push[0] == cyc, "column entry push time");
      if (exp_push.size() > 0) begin
        check(col_entry.col == exp_col[0] && col_entry.dropped == exp_drop[0],
              $sformatf("column entry %h/%b expected %h/%b", col_entry.col, col_entry.dropped,
                        exp_col[0], exp_drop[0]));
        void'(exp_push.pop_front()); void'(exp_col.pop_front()); void'(exp_drop.pop_front());
      end
    end
  end

  // trigger forwarding
  logic l1a_q;
  always @(posedge clk) begin
    l1a_q <= l1a;
    #1 if (rst_n) check(p_lv1 == l1a_q, "p_lv1 is l1a one clock later");
  end

  task automatic send_trigger(input int gap);
    repeat (gap) @(posedge clk);
    #2 l1a = 1;
    @(posedge clk);
    #2 l1a = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; l1a = 0; resync_in = 0; adc_pipe = 8'd6; col_count = 0;
    for (int p = 0; p < NPACE; p++) fifo_count[p] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 8; i++) send_trigger($urandom_range(5, 60));
    repeat (10 * FRAME) @(posedge clk);
    adc_pipe = 8'd3;
    for (int i = 0; i < 5; i++) send_trigger($urandom_range(5, 60));
    repeat (8 * FRAME) @(posedge clk);
    // overflow: PACE 2's FIFO nearly full for the next frame
    fifo_count[2] = 7'(DEPTH - NSMP + 1);
    drop_next = 1;
    send_trigger(3);
    repeat (2 * FRAME) @(posedge clk);
    fifo_count[2] = 0;
    drop_next = 0;
    send_trigger(3);
    repeat (3 * FRAME) @(posedge clk);
    check(writes == 14 * NSMP, $sformatf("%0d writes, expected %0d", writes, 14 * NSMP));
    check(pushes == 15 && drops == 1 && ovfs == 1, $sformatf("pushes %0d drops %0d ovf %0d", pushes, drops, ovfs));
    check(exp_w.size() == 0 && exp_push.size() == 0, "nothing outstanding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
