// tb_error_logger: self-checking test of error_logger against a reference model.
// Random expected/actual DataValid patterns with mostly matching lines and occasional
// mismatches, some of them in clocks whose expected value is unknown (must be ignored).
// Column-address checks come at random clocks with equal or (sometimes) differing addresses,
// and some differing addresses are offered with col_chk low (must be ignored).
// Checks the sticky per-PACE flags, the column flag, the saturating count (driven past 255)
// and clear.
module tb_error_logger;
  import kchip_pkg::*;
  logic clk = 0, rst_n, clear, exp_dv, exp_known;
  logic [NPACE-1:0] pace_dv, sync_err, m_err;
  logic [7:0] err_cnt;
  logic col_chk, col_err, m_col;
  logic [NPACE*COL_W-1:0] col_addr;
  int m_cnt;
  int checks = 0, failures = 0;

  error_logger dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic step(input int err_pct, input int col_pct = 0);
    logic [NPACE-1:0] flip;
    logic [COL_W-1:0] base;
    @(negedge clk);
    check(sync_err == m_err && 32'(err_cnt) == m_cnt && col_err == m_col,
          $sformatf("flags %b/%b count %0d/%0d col %b/%b", sync_err, m_err, err_cnt, m_cnt, col_err, m_col));
    exp_dv = 1'($urandom);
    exp_known = ($urandom % 5) != 0;
    flip = '0;
    for (int p = 0; p < NPACE; p++) flip[p] = ($urandom % 100) < err_pct;
    pace_dv = {NPACE{exp_dv}} ^ flip;
    col_chk = ($urandom % 4) == 0;
    base = COL_W'($urandom);
    col_addr = {NPACE{base}};
    if (($urandom % 100) < col_pct)
      col_addr[($urandom % NPACE)*COL_W +: COL_W] ^= COL_W'(1 << ($urandom % COL_W));
    clear = 0;
    @(posedge clk);
    if (exp_known && flip != 0) begin
      m_err |= flip;
      if (m_cnt < 255) m_cnt++;
    end
    if (col_chk && col_addr != {NPACE{col_addr[COL_W-1:0]}}) m_col = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; exp_dv = 0; exp_known = 1; pace_dv = 0;
    col_chk = 0; col_addr = 0; m_col = 0;
    m_err = 0; m_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) step(0);
    check(sync_err == 0 && err_cnt == 0 && col_err == 0, "no errors while in sync");
    repeat (300) step(2, 0);
    check(col_err == 0, "equal column addresses accepted");
    repeat (100) step(0, 20);
    check(col_err == 1, "differing column address flagged");
    check(sync_err != 0, "some error flagged");
    repeat (600) step(40);
    check(err_cnt == 8'hFF, "count saturates");
    @(negedge clk); clear = 1; exp_known = 0; col_chk = 0;
    @(posedge clk); m_err = 0; m_cnt = 0; m_col = 0;
    @(negedge clk); clear = 0;
    check(sync_err == 0 && err_cnt == 0 && col_err == 0, "clear");
    repeat (200) step(3, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
