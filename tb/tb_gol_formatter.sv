// tb_gol_formatter: self-checking test of gol_formatter (NSMP reduced to 6).
// The testbench models the Column Address FIFO and the four Data FIFOs (one-clock read
// latency, with per-word sec/ded flags). It queues 6 events: a clean one, one with a
// corrected error, one with an uncorrectable error in PACE 1, a dropped event, and two more
// clean ones, with a resync before the last. The expected word stream (headers, samples,
// CRC-16-CCITT computed here bit by bit, FFFFh for the packet with the uncorrectable error)
// is built independently and compared word by word; packets must have no gaps.
module tb_gol_formatter;
  import kchip_pkg::*;
  localparam int unsigned NSMP = 6;

  logic clk = 0, rst_n, resync;
  logic col_empty, col_pop;
  col_entry_t col_entry;
  logic [NPACE-1:0] fifo_rd, fifo_valid, fifo_sec, fifo_ded;
  logic [ADC_W-1:0] fifo_data [NPACE];
  logic [WORD_W-1:0] gol_data;
  logic gol_en, sec_ev, ded_ev;
  int checks = 0, failures = 0;

  gol_formatter #(.NSMP(NSMP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [15:0] w);
    for (int b = 15; b >= 0; b--) c = (c << 1) ^ ((c[15] ^ w[b]) ? 16'h1021 : 16'h0000);
    return c;
  endfunction

  // models of the FIFOs: entries {ded, sec, data}
  col_entry_t colq [$];
  logic [13:0] dq [NPACE][$];
  logic [15:0] expq [$];

  assign col_empty = (colq.size() == 0);
  assign col_entry = colq.size() > 0 ? colq[0] : '0;

  always @(posedge clk) begin
    if (col_pop && colq.size() > 0) begin
      #1 void'(colq.pop_front());
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < NPACE; p++) begin
      fifo_valid[p] <= 1'b0;
      if (fifo_rd[p]) begin
        if (dq[p].size() == 0) check(0, "read of an empty data FIFO");
        else begin
          logic [13:0] v;
          v = dq[p].pop_front();
          fifo_valid[p] <= 1'b1;
          fifo_data[p]  <= v[11:0];
          fifo_sec[p]   <= v[12];
          fifo_ded[p]   <= v[13];
        end
      end
    end
  end

  task automatic add_event(input int evt, input bit dropped, input int sec_p, input int ded_p);
    col_entry_t e;
    e.dropped = dropped;
    for (int p = 0; p < NPACE; p++) e.col[p*COL_W +: COL_W] = COL_W'(evt * 31 + p * 3);
    for (int p = 0; p < NPACE; p++) begin
      logic [15:0] c, w;
      bit bad;
      c = 16'hFFFF; bad = 0;
      w = {4'hA, dropped, 1'b0, 2'(p), COL_W'(evt * 31 + p * 3)};
      expq.push_back(w); c = crc_ref(c, w);
      w = {4'h0, 12'(evt)};
      expq.push_back(w); c = crc_ref(c, w);
      if (!dropped)
        for (int i = 0; i < int'(NSMP); i++) begin
          logic [11:0] d;
          bit s, x;
          d = 12'($urandom);
          s = (p == sec_p && i == 2);
          x = (p == ded_p && i == 3);
          dq[p].push_back({x, s, d});
          w = {2'b00, x, s, d};
          expq.push_back(w); c = crc_ref(c, w);
          if (x) bad = 1;
        end
      expq.push_back(bad ? 16'hFFFF : c);
    end
    colq.push_back(e);
  endtask

  int nsec = 0, nded = 0, words = 0;
  bit in_pkt = 0;
  int pkt_len = 0;
  always @(negedge clk) if (rst_n) begin
    if (sec_ev) nsec++;
    if (ded_ev) nded++;
    if (gol_en) begin
      words++;
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        logic [15:0] e;
        e = expq.pop_front();
        check(gol_data == e, $sformatf("word %0d: %h expected %h", words, gol_data, e));
      end
      if (gol_data[15:12] == 4'hA && !in_pkt) begin in_pkt = 1; pkt_len = 0; end
      pkt_len++;
    end else if (in_pkt) begin
      check(0, "gap inside a packet");
      in_pkt = 0;
    end
    if (gol_en && in_pkt && ((pkt_len == int'(NSMP) + 3) || (gol_data[15:12] != 4'hA && pkt_len == 3 && dropped_pkt)))
      in_pkt = 0;
  end
  bit dropped_pkt = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; resync = 0;
    for (int p = 0; p < NPACE; p++) begin
      fifo_valid[p] = 0; fifo_sec[p] = 0; fifo_ded[p] = 0; fifo_data[p] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    add_event(0, 0, -1, -1);
    add_event(1, 0, 2, -1);
    add_event(2, 0, -1, 1);
    repeat (4 * (NSMP + 3) * 3 + 10) @(negedge clk);
    dropped_pkt = 1;
    add_event(3, 1, -1, -1);
    repeat (4 * 3 + 10) @(negedge clk);
    dropped_pkt = 0;
    add_event(4, 0, -1, -1);
    repeat (4 * (NSMP + 3) + 10) @(negedge clk);
    resync = 1;
    @(negedge clk);
    resync = 0;
    add_event(0, 0, -1, -1);
    repeat (4 * (NSMP + 3) + 10) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d words never sent", expq.size()));
    check(words == 5 * 4 * int'(NSMP + 3) + 4 * 3, $sformatf("%0d words", words));
    check(nsec == 1 && nded == 1, $sformatf("sec events %0d, ded events %0d", nsec, nded));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
