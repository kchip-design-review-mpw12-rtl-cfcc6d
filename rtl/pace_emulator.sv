// pace_emulator: a copy of the PACE readout state machine inside the concentrator.
//
// Every PACE receives the same triggers (P_LV1) and reads out on its own; this block runs the
// same state machine so the concentrator knows, clock by clock, what the PACE chips should be
// doing. Its expected DataValid is compared with the real ones by error_logger, and its slot
// strobes drive the readout controller.
//
// Readout frame (this design's model of the PACE, all in 20 MHz slots of SLOT_CLKS clocks):
//   slot 0                     DataValid high (start)
//   slots 1 .. COL_W           column address, one bit per slot on DataValid, MSB first
//   slots COL_W+1 .. +NSAMPLE  DataValid high, one analog sample per slot (3 columns x 32)
//   GAP slots                  DataValid low
// A frame starts PACE_LAT+1 clocks after the clock in which P_LV1 is high, or, if a frame is
// still running, as soon as that frame and its gap are over: triggers queue up (up to
// 2^CNT_W - 1 of them). resync clears the queue and stops any frame.
// Outputs are combinational from the state registers and valid in the current clock:
// exp_dv / exp_known give the expected DataValid (unknown during the address bits),
// addr_stb marks the clock in which an address bit is sampled, smp_stb the clock in which a
// sample is taken, with smp_idx its index; frame_start and smp_last mark the first clock of a
// frame and the strobe of its last sample.
module pace_emulator
  import kchip_pkg::*;
#(
  parameter int unsigned PACE_LAT = 4,
  parameter int unsigned GAP      = 1,
  parameter int unsigned NSMP     = NSAMPLE,
  parameter int unsigned CNT_W    = 6,
  localparam int unsigned TOT_SLOTS = 1 + COL_W + NSMP + GAP,
  localparam int unsigned SLOT_W    = $clog2(TOT_SLOTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              p_lv1,      // trigger as sent to the PACE chips
  input  logic              resync,
  output logic              exp_dv,
  output logic              exp_known,
  output logic              busy,
  output logic              frame_start,
  output logic              addr_stb,
  output logic              smp_stb,
  output logic              smp_last,
  output logic [SLOT_W-1:0] smp_idx,
  output logic [CNT_W-1:0]  pending
);

  logic [PACE_LAT-1:0] dly;
  logic                rdy_in, last, start_next;
  logic                active;
  logic [SLOT_W-1:0]   slot;
  localparam int unsigned PH_W = $clog2(SLOT_CLKS);
  logic [PH_W-1:0]     ph;

  assign rdy_in     = dly[PACE_LAT-1];
  assign last       = active && slot == SLOT_W'(TOT_SLOTS-1) && ph == PH_W'(SLOT_CLKS-1);
  assign start_next = (pending != '0 || rdy_in) && (!active || last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly     <= '0;
      pending <= '0;
      active  <= 1'b0;
      slot    <= '0;
      ph      <= '0;
    end else if (resync) begin
      dly     <= '0;
      pending <= '0;
      active  <= 1'b0;
      slot    <= '0;
      ph      <= '0;
    end else begin
      if (PACE_LAT > 1) dly <= {dly[PACE_LAT-2:0], p_lv1};
      else              dly <= PACE_LAT'(p_lv1);
      pending <= pending + CNT_W'(rdy_in) - CNT_W'(start_next);
      if (start_next) begin
        active <= 1'b1;
        slot   <= '0;
        ph     <= '0;
      end else if (active) begin
        if (ph == PH_W'(SLOT_CLKS-1)) begin
          ph <= '0;
          if (slot == SLOT_W'(TOT_SLOTS-1)) active <= 1'b0;
          else                              slot   <= slot + 1'b1;
        end else begin
          ph <= ph + 1'b1;
        end
      end
    end
  end

  logic in_addr, in_smp;
  assign in_addr     = active && slot >= 1 && slot <= SLOT_W'(COL_W);
  assign in_smp      = active && slot > SLOT_W'(COL_W) && slot <= SLOT_W'(COL_W + NSMP);
  assign busy        = active;
  assign exp_dv      = active && (slot == '0 || in_smp);
  assign exp_known   = !in_addr;
  assign frame_start = active && slot == '0 && ph == '0;
  assign addr_stb    = in_addr && ph == PH_W'(SLOT_CLKS-1);
  assign smp_stb     = in_smp && ph == PH_W'(SLOT_CLKS-1);
  assign smp_idx     = in_smp ? slot - SLOT_W'(COL_W + 1) : '0;
  assign smp_last    = smp_stb && slot == SLOT_W'(COL_W + NSMP);

endmodule
