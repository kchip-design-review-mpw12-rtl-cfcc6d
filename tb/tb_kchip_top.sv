// tb_kchip_top: end-to-end test of kchip_top at its default parameters (Data FIFO depth 1024,
// 96 samples per PACE and event).
// Four pace_model instances and an adc_model play the front end; an I2C master task set
// plays the slow control; a packet checker decodes the link stream and compares every packet
// with what the front-end models produced (column address, event number, every sample, CRC).
// Phases: register reset values over I2C; SRAM self test; single triggers; a burst that makes
// triggers queue in the PACE chips and overflows the Data FIFOs (dropped events); SRAM upsets
// injected into a Data FIFO (one corrected, one uncorrectable giving CRC FFFFh); a 200 kHz
// random trigger sequence; calibration pulses with the reset and a rewritten width; a lost
// trigger in one PACE (sync error seen in the status register), then resync and error clear.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_kchip_top;
  import kchip_pkg::*;
  localparam int NSMP_T = 96;
  localparam int FRAME_T = (1 + 8 + NSMP_T + 1) * 2;
  localparam logic [6:0] DEV = 7'h42;
  localparam realtime TQ = 75ns;

  logic clk = 0, rst_n;
  logic l1a, resync_in, cal_req;
  logic p_lv1, p_resync, p_calpulse;
  logic [NPACE-1:0] pace_dv;
  logic [ADC_W-1:0] adc_bus [2];
  logic scl, sda_m, sda_in, sda_low;
  logic [15:0] id_fuse;
  logic [WORD_W-1:0] gol_data;
  logic gol_en;

  logic [11:0] analog [4];
  logic [3:0] skip;
  int qif [4];

  int checks = 0, failures = 0;

  kchip_top dut (.*);

  for (genvar p = 0; p < 4; p++) begin : g_pace
    pace_model #(.PACE_ID(p), .LAT(4), .NSMP(NSMP_T)) u_pace (
      .clk, .p_lv1, .resync(p_resync), .skip_next(skip[p]), .dv(pace_dv[p]),
      .analog(analog[p]), .queued_in_frame(qif[p]));
  end
  adc_model #(.PIPE(5)) u_adc (.clk, .ain(analog), .bus(adc_bus));

  assign sda_in = sda_m & !sda_low;
  always #12.5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ---------------------------------------------------------------- I2C master
  task automatic i2c_start();
    sda_m = 1; #TQ; scl = 1; #TQ; sda_m = 0; #TQ; scl = 0; #TQ;
  endtask
  task automatic i2c_stop();
    sda_m = 0; #TQ; scl = 1; #TQ; sda_m = 1; #(2 * TQ);
  endtask
  task automatic put_bit(input logic b);
    sda_m = b; #TQ; scl = 1; #(2 * TQ); scl = 0; #TQ;
  endtask
  task automatic get_bit(output logic b);
    sda_m = 1; #TQ; scl = 1; #TQ; b = sda_in; #TQ; scl = 0; #TQ;
  endtask
  task automatic put_byte(input logic [7:0] v);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(a);
    check(!a, "I2C ACK");
  endtask
  task automatic get_byte(output logic [7:0] v, input logic ack);
    for (int i = 7; i >= 0; i--) get_bit(v[i]);
    put_bit(!ack);
  endtask
  int i2c_writes = 0, i2c_reads = 0;
  task automatic reg_write(input logic [7:0] a, input logic [7:0] d);
    i2c_start(); put_byte({DEV, 1'b0}); put_byte(a); put_byte(d); i2c_stop();
    i2c_writes++;
  endtask
  task automatic reg_read(input logic [7:0] a, output logic [7:0] d);
    i2c_start(); put_byte({DEV, 1'b0}); put_byte(a);
    i2c_start(); put_byte({DEV, 1'b1}); get_byte(d, 0); i2c_stop();
    i2c_reads++;
  endtask

  // ---------------------------------------------------------------- expected events
  // all four PACE models block the same columns: event k (since reset/resync) starts at
  // column 3k mod 192
  function automatic logic [11:0] value(input int p, input int c, input int i);
    return 12'(c * 97 + i * 13 + p * 411 + 7);
  endfunction
  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [15:0] w);
    for (int b = 15; b >= 0; b--) c = (c << 1) ^ ((c[15] ^ w[b]) ? 16'h1021 : 16'h0000);
    return c;
  endfunction

  // ---------------------------------------------------------------- packet checker
  int ev_next = 0;        // event number expected in the next packet set
  int pk_pace = 0;        // PACE expected in the next packet
  int st = 0, widx = 0;   // 0 header0, 1 header1, 2 data, 3 crc
  logic [15:0] crc;
  bit pk_drop, pk_ded, pk_sec;
  int pk_col;
  bit ignore_pace [4] = '{0, 0, 0, 0};
  int packets = 0, full_events = 0, dropped_events = 0, sec_words = 0, ded_packets = 0;
  int words_total = 0;

  always @(negedge clk) if (rst_n && gol_en) begin
    words_total++;
    case (st)
      0: begin
        check(gol_data[15:12] == 4'hA, $sformatf("packet marker %h", gol_data));
        check(32'(gol_data[9:8]) == pk_pace, $sformatf("PACE %0d expected %0d", gol_data[9:8], pk_pace));
        pk_drop = gol_data[11];
        pk_col = (3 * ev_next) % 192;
        if (!ignore_pace[pk_pace])
          check(32'(gol_data[7:0]) == pk_col, $sformatf("column %0d expected %0d (event %0d PACE %0d)",
                gol_data[7:0], pk_col, ev_next, pk_pace));
        crc = crc_ref(16'hFFFF, gol_data);
        pk_ded = 0; pk_sec = 0;
        st = 1;
      end
      1: begin
        check(32'(gol_data) == (ev_next % 4096), $sformatf("event number %0d expected %0d", gol_data, ev_next));
        crc = crc_ref(crc, gol_data);
        widx = 0;
        st = pk_drop ? 3 : 2;
      end
      2: begin
        if (gol_data[13]) pk_ded = 1;
        else begin
          if (gol_data[12]) begin pk_sec = 1; sec_words++; end
          if (!ignore_pace[pk_pace])
            check(gol_data[11:0] == value(pk_pace, pk_col, widx),
                  $sformatf("sample %0d of PACE %0d event %0d: %h expected %h", widx, pk_pace,
                            ev_next, gol_data[11:0], value(pk_pace, pk_col, widx)));
        end
        check(gol_data[15:14] == 2'b00, "data word tag");
        crc = crc_ref(crc, gol_data);
        widx++;
        if (widx == NSMP_T) st = 3;
      end
      default: begin
        if (pk_ded) begin
          check(gol_data == 16'hFFFF, "CRC field FFFFh after an uncorrectable error");
          ded_packets++;
        end else begin
          check(gol_data == crc, $sformatf("CRC %h expected %h", gol_data, crc));
        end
        packets++;
        st = 0;
        if (pk_pace == 3) begin
          if (pk_drop) dropped_events++; else full_events++;
          pk_pace = 0;
          ev_next++;
        end else pk_pace++;
      end
    endcase
  end

  // a packet must be sent without gaps
  bit prev_en = 0;
  always @(negedge clk) begin
    if (prev_en && !gol_en) check(st == 0, "gap inside a packet");
    prev_en = gol_en;
  end

  // ---------------------------------------------------------------- calibration pulse
  realtime cal_req_t, cal_rise_t, cal_fall_t;
  // length of the SRAM self test, in clocks, against the 1.5 ms budget
  int bist_clks = 0;
  always @(posedge clk) if (rst_n && dut.bist_busy) bist_clks++;

  int cal_pulses = 0;
  always @(posedge p_calpulse) if (rst_n) begin
    cal_rise_t = $realtime;
    cal_pulses++;
  end
  always @(negedge p_calpulse) cal_fall_t = $realtime;

  // ---------------------------------------------------------------- stimulus helpers
  task automatic trigger(input int gap);
    repeat (gap) @(posedge clk);
    #2 l1a = 1;
    @(posedge clk);
    #2 l1a = 0;
  endtask

  task automatic wait_idle();
    // wait until no frame is running and every packet has gone out
    int quiet;
    quiet = 0;
    while (quiet < 3 * FRAME_T) begin
      @(posedge clk);
      if (gol_en || pace_dv != 0) quiet = 0; else quiet++;
    end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    int n_sent;
    int overflows_seen, bist_ok, sync_seen, col_seen, resyncs, cal_checked, poisson_done;
    rst_n = 0; l1a = 0; resync_in = 0; cal_req = 0; scl = 1; sda_m = 1; skip = 0;
    id_fuse = 16'h5C3A;
    overflows_seen = 0; bist_ok = 0; sync_seen = 0; col_seen = 0; resyncs = 0; cal_checked = 0; poisson_done = 0;
    #200ns rst_n = 1;
    #1us;

    // register reset values and ID fuses
    reg_read(REG_CAL_WIDTH, v); check(v == 8'd2, $sformatf("CalPulse_WIDTH reset %0d", v));
    reg_read(REG_CAL_DELAY, v); check(v == 8'b1111_1110, $sformatf("CalPulse_DELAY reset %b", v));
    reg_read(REG_ADC_PIPE, v);  check(v == 8'd6, $sformatf("ADC pipeline reset %0d", v));
    reg_read(REG_ID_LO, v);     check(v == 8'h3A, "ID fuses low");
    reg_read(REG_ID_HI, v);     check(v == 8'h5C, "ID fuses high");

    // SRAM self test (15 * 1024 clocks)
    reg_write(REG_CTRL, 8'h01);
    repeat (15 * 1024 + 100) @(posedge clk);
    reg_read(REG_STATUS, v);
    check(v[4] && !v[5], $sformatf("BIST done without failure, status %b", v));
    if (v[4] && !v[5]) bist_ok++;
    check(bist_clks > 0 && real'(bist_clks) * 25.0e-9 <= 1.5e-3,
          $sformatf("self test %0d clocks = %.3f ms, budget 1.5 ms", bist_clks, real'(bist_clks) * 25.0e-6));

    // single triggers
    n_sent = 0;
    for (int i = 0; i < 3; i++) begin trigger(600); n_sent++; end
    wait_idle();
    check(full_events == 3, $sformatf("%0d full events after single triggers", full_events));

    // burst: 40 triggers 60 clocks apart queue in the PACE chips and overflow the FIFOs
    for (int i = 0; i < 40; i++) trigger(60);
    // meanwhile, upset SRAM bits in PACE 3's Data FIFO
    wait (dut.g_fifo[3].u_fifo.count > 300);
    @(negedge clk);
    begin
      int a;
      a = (int'(dut.g_fifo[3].u_fifo.rptr) + 150) % 1024;
      dut.g_fifo[3].u_fifo.u_ram.mem[a][5] = !dut.g_fifo[3].u_fifo.u_ram.mem[a][5];
      a = (int'(dut.g_fifo[3].u_fifo.rptr) + 260) % 1024;
      dut.g_fifo[3].u_fifo.u_ram.mem[a][3] = !dut.g_fifo[3].u_fifo.u_ram.mem[a][3];
      dut.g_fifo[3].u_fifo.u_ram.mem[a][9] = !dut.g_fifo[3].u_fifo.u_ram.mem[a][9];
    end
    wait_idle();
    check(full_events + dropped_events == 43, $sformatf("events %0d + %0d dropped, expected 43",
          full_events, dropped_events));
    reg_read(REG_OVF, v);
    check(32'(v) == dropped_events, $sformatf("overflow counter %0d vs %0d dropped", v, dropped_events));
    if (dropped_events > 0) overflows_seen++;
    reg_read(REG_ECC_SEC, v); check(v == 8'd1, $sformatf("corrected-error counter %0d", v));
    reg_read(REG_ECC_DED, v); check(v == 8'd1, $sformatf("uncorrectable-error counter %0d", v));
    reg_read(REG_STATUS, v);  check(v[3:0] == 0 && !v[6], "no sync or column error so far");

    // 200 kHz random triggers (mean 200 clocks, at least 3 apart), 60 of them
    begin
      int n_before;
      n_before = full_events + dropped_events;
      for (int i = 0; i < 60; i++) begin
        real u;
        int g;
        u = real'($urandom_range(1, 1000000)) / 1000000.0;
        g = int'(-200.0 * $ln(u));
        if (g < 3) g = 3;
        trigger(g);
      end
      wait_idle();
      check(full_events + dropped_events - n_before == 60, "all 60 random triggers produced packets");
      reg_read(REG_STATUS, v);
      check(v[3:0] == 0 && !v[6], "no loss of synchronisation at 200 kHz");
      poisson_done++;
    end

    // calibration pulse: reset timing (31 clocks + 6/8 clock, 2 clocks wide), then width 4
    @(posedge clk); #1; cal_req = 1; cal_req_t = $realtime;
    @(posedge clk); #1; cal_req = 0;
    repeat (60) @(posedge clk);
    check(cal_rise_t - cal_req_t > 31 * 25ns + 18.75ns - 2ns && cal_rise_t - cal_req_t < 31 * 25ns + 18.75ns + 2ns + 25ns,
          $sformatf("CalPulse delay %0t", cal_rise_t - cal_req_t));
    check(cal_fall_t - cal_rise_t > 49ns && cal_fall_t - cal_rise_t < 51ns,
          $sformatf("CalPulse width %0t", cal_fall_t - cal_rise_t));
    reg_write(REG_CAL_WIDTH, 8'd4);
    reg_write(REG_CAL_DELAY, 8'b0000_1000);
    @(posedge clk); #1; cal_req = 1; cal_req_t = $realtime;
    @(posedge clk); #1; cal_req = 0;
    repeat (20) @(posedge clk);
    check(cal_fall_t - cal_rise_t > 99ns && cal_fall_t - cal_rise_t < 101ns,
          $sformatf("CalPulse width after rewrite %0t", cal_fall_t - cal_rise_t));
    check(cal_rise_t - cal_req_t > 24ns && cal_rise_t - cal_req_t < 51ns,
          $sformatf("CalPulse delay after rewrite %0t", cal_rise_t - cal_req_t));
    cal_checked = (cal_pulses == 2);
    check(cal_pulses == 2, $sformatf("%0d calibration pulses, expected 2", cal_pulses));

    // lost trigger in PACE 2: loss of synchronisation must be flagged
    skip[2] = 1;
    @(posedge clk); #1 skip[2] = 0;
    ignore_pace[2] = 1;
    trigger(10);
    trigger(300);
    wait_idle();
    reg_read(REG_STATUS, v);
    check(v[3:0] == 4'b0100, $sformatf("sync error flags %b, expected 0100", v[3:0]));
    if (v[2]) sync_seen++;
    check(v[6], "differing PACE column addresses flagged");
    if (v[6]) col_seen++;
    reg_read(REG_SYNC_ERRS, v);
    check(v != 0, "sync error count");

    // resync, clear the errors and read out cleanly again
    @(posedge clk); #2 resync_in = 1;
    @(posedge clk); #2 resync_in = 0;
    repeat (10) @(posedge clk);
    ev_next = 0;
    ignore_pace[2] = 0;
    resyncs++;
    reg_write(REG_CTRL, 8'h02);
    reg_read(REG_STATUS, v);
    check(v[3:0] == 0 && !v[6], "sync and column flags cleared");
    begin
      int n_before;
      n_before = full_events;
      for (int i = 0; i < 3; i++) trigger(500);
      wait_idle();
      check(full_events - n_before == 3, "clean events after resync");
    end
    reg_read(REG_STATUS, v);
    check(v[3:0] == 0 && !v[6], "in sync after resync");

    // every mechanism must have happened
    check(full_events > 0, "full events read out");
    check(qif[0] > 0, $sformatf("triggers queued in the PACE during a frame: %0d", qif[0]));
    check(overflows_seen > 0 && dropped_events > 0, "Data FIFO overflow");
    check(sec_words == 1, $sformatf("corrected SRAM errors: %0d", sec_words));
    check(ded_packets == 1, $sformatf("packets with CRC FFFFh: %0d", ded_packets));
    check(bist_ok > 0, "self test ran");
    check(sync_seen > 0, "sync loss detected");
    check(col_seen > 0, "column address mismatch detected");
    check(resyncs > 0, "resync");
    check(cal_checked != 0, "calibration pulses");
    check(poisson_done > 0, "200 kHz trigger sequence");
    $display("events: %0d full, %0d dropped; packets %0d; words %0d; queued triggers %0d; sec %0d; ded %0d; i2c %0d writes %0d reads",
             full_events, dropped_events, packets, words_total, qif[0], sec_words, ded_packets, i2c_writes, i2c_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
