// error_logger: detects loss of readout synchronisation of the PACE chips.
//
// Two checks run side by side.
// Each clock it compares the DataValid line of every PACE with the DataValid that the
// concentrator's own copy of the PACE readout state machine (pace_emulator) expects. Clocks in
// which the expected value is unknown (the column-address bits) are skipped. A mismatch sets
// that PACE's sticky sync_err flag and bumps a saturating 8-bit count of mismatching clocks.
// Second, all four PACE chips receive the same triggers, so their pipeline memories must
// block the same columns: when col_chk is high (one clock per event, as the entry goes into
// the Column Address FIFO) the four column addresses on col_addr are compared, and a
// difference sets the sticky col_err flag. Flags and count stay until clear. Watching the
// PACE readout and pipeline memories follows the description; what is compared, the sticky
// flags, the count and their widths are this design's choice. Outputs are registered (one
// clock after the mismatch).
module error_logger
  import kchip_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             exp_dv,
  input  logic             exp_known,
  input  logic [NPACE-1:0] pace_dv,
  input  logic                   col_chk,
  input  logic [NPACE*COL_W-1:0] col_addr,
  output logic [NPACE-1:0]       sync_err,
  output logic [7:0]             err_cnt,
  output logic                   col_err
);

  logic [NPACE-1:0] mism;
  logic             col_mism;

  assign mism = exp_known ? (pace_dv ^ {NPACE{exp_dv}}) : '0;

  always_comb begin
    col_mism = 1'b0;
    for (int p = 1; p < NPACE; p++)
      if (col_addr[p*COL_W +: COL_W] != col_addr[COL_W-1:0]) col_mism = col_chk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_err <= '0;
      err_cnt  <= '0;
      col_err  <= 1'b0;
    end else if (clear) begin
      sync_err <= '0;
      err_cnt  <= '0;
      col_err  <= 1'b0;
    end else begin
      sync_err <= sync_err | mism;
      col_err  <= col_err | col_mism;
      if (mism != '0 && err_cnt != 8'hFF) err_cnt <= err_cnt + 1'b1;
    end
  end

endmodule
