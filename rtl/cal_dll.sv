// cal_dll: behavioural model of the on-chip DLL that gives the calibration pulse its fine
// timing. Not synthesizable logic: the real part is a delay-locked loop, a mixed-signal macro.
//
// The model delays pulse_in by tap/NTAPS of the clock period (tap = 0..NTAPS-1), the delay a
// locked DLL with NTAPS equal taps across one 40 MHz period would give. locked rises after
// LOCK_CYCLES clocks, standing for the lock time. The number of taps, the period and the lock
// time are this design's assumptions; only the existence of the DLL and its use for the
// calibration-pulse timing come from the description.
module cal_dll #(
  parameter int unsigned NTAPS       = 8,
  parameter int unsigned PERIOD_PS   = 25000,
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NTAPS)-1:0] tap,
  input  logic                     pulse_in,
  output logic                     pulse_out,
  output logic                     locked
);

  int unsigned lock_cnt;

  initial pulse_out = 1'b0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      locked <= 1'b1;
    end
  end


  always @(pulse_in) begin
    pulse_out <= #((PERIOD_PS * tap) / NTAPS * 1ps) pulse_in;
  end

endmodule
