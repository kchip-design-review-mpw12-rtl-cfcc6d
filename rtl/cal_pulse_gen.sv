// cal_pulse_gen: calibration event generation.
//
// A calibration request from the control chips starts a programmable delay, after which the
// CalPulse sent to the PACE chips is high for CalPulse_WIDTH clocks. CalPulse_DELAY sets the
// timing: in this design its bits [7:3] are the coarse delay in whole clocks and bits [2:0]
// select one of eight DLL taps that shift the pulse by eighths of a clock period (cal_dll).
// With the reset values (width 2, delay 8'b1111_1110) the pulse starts 31 clocks after the
// request and is delayed by 6/8 of a clock. A request while a pulse is pending is ignored.
// Interface: cal_pulse is the clock-aligned pulse; dll_tap is held for the DLL. The reset
// values come from the description; the split of the delay register is this design's choice.
module cal_pulse_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_req,
  input  logic [7:0] cal_width,
  input  logic [7:0] cal_delay,
  output logic       cal_pulse,
  output logic [2:0] dll_tap,
  output logic       busy
);

  typedef enum logic [1:0] {C_IDLE, C_DELAY, C_PULSE} cstate_e;

  cstate_e    st;
  logic [7:0] cnt;

  assign cal_pulse = (st == C_PULSE);
  assign busy      = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= C_IDLE;
      cnt     <= '0;
      dll_tap <= '0;
    end else begin
      case (st)
        C_IDLE: if (cal_req) begin
          dll_tap <= cal_delay[2:0];
          if (cal_delay[7:3] == 5'd0) begin
            if (cal_width != 8'd0) begin
              st  <= C_PULSE;
              cnt <= cal_width - 1'b1;
            end
          end else begin
            st  <= C_DELAY;
            cnt <= {3'b000, cal_delay[7:3]} - 1'b1;
          end
        end
        C_DELAY: begin
          if (cnt == '0) begin
            if (cal_width == 8'd0) st <= C_IDLE;
            else begin
              st  <= C_PULSE;
              cnt <= cal_width - 1'b1;
            end
          end else cnt <= cnt - 1'b1;
        end
        C_PULSE: begin
          if (cnt == '0) st <= C_IDLE;
          else cnt <= cnt - 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
