// config_regs: the configuration and status registers reached through I2C.
//
// Read/write registers: CTRL (bit 0 starts the SRAM self test, bit 1 clears the error flags
// and counters; both are one-clock pulses and read back as 0), CalPulse_WIDTH (reset 2),
// CalPulse_DELAY (reset 8'b1111_1110) and the ADC pipeline depth (reset 6). Read-only:
// STATUS {col_err, bist_fail, bist_done, sync_err[3:0]}, the sync-error count, saturating 8-bit counts
// of corrected and uncorrectable SRAM errors and of dropped events, and the 16 ID fuse bits.
// Writes take effect on the clock after reg_we; reads are combinational from reg_addr.
// The three reset values and the ID fuse read-out follow the description; the address map,
// the counters and the control bits are this design's choice (addresses in kchip_pkg).
module config_regs
  import kchip_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // register bus
  input  logic [7:0]       reg_addr,
  input  logic [7:0]       reg_wdata,
  input  logic             reg_we,
  output logic [7:0]       reg_rdata,
  // configuration out
  output cfg_t             cfg,
  output logic             bist_start,
  output logic             err_clear,
  // status in
  input  logic [NPACE-1:0] sync_err,
  input  logic             col_err,
  input  logic [7:0]       sync_err_cnt,
  input  logic             bist_done,
  input  logic             bist_fail,
  input  logic             sec_ev,
  input  logic             ded_ev,
  input  logic             ovf_ev,
  input  logic [15:0]      id_fuse
);

  logic [7:0] sec_cnt, ded_cnt, ovf_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.cal_width <= CAL_WIDTH_DEFAULT;
      cfg.cal_delay <= CAL_DELAY_DEFAULT;
      cfg.adc_pipe  <= ADC_PIPE_DEFAULT;
      bist_start    <= 1'b0;
      err_clear     <= 1'b0;
    end else begin
      bist_start <= 1'b0;
      err_clear  <= 1'b0;
      if (reg_we) begin
        case (reg_addr)
          REG_CTRL: begin
            bist_start <= reg_wdata[0];
            err_clear  <= reg_wdata[1];
          end
          REG_CAL_WIDTH: cfg.cal_width <= reg_wdata;
          REG_CAL_DELAY: cfg.cal_delay <= reg_wdata;
          REG_ADC_PIPE:  cfg.adc_pipe  <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_cnt <= '0;
      ded_cnt <= '0;
      ovf_cnt <= '0;
    end else if (err_clear) begin
      sec_cnt <= '0;
      ded_cnt <= '0;
      ovf_cnt <= '0;
    end else begin
      if (sec_ev && sec_cnt != 8'hFF) sec_cnt <= sec_cnt + 1'b1;
      if (ded_ev && ded_cnt != 8'hFF) ded_cnt <= ded_cnt + 1'b1;
      if (ovf_ev && ovf_cnt != 8'hFF) ovf_cnt <= ovf_cnt + 1'b1;
    end
  end

  always_comb begin
    case (reg_addr)
      REG_CAL_WIDTH: reg_rdata = cfg.cal_width;
      REG_CAL_DELAY: reg_rdata = cfg.cal_delay;
      REG_ADC_PIPE:  reg_rdata = cfg.adc_pipe;
      REG_STATUS:    reg_rdata = {1'b0, col_err, bist_fail, bist_done, sync_err};
      REG_SYNC_ERRS: reg_rdata = sync_err_cnt;
      REG_ECC_SEC:   reg_rdata = sec_cnt;
      REG_ECC_DED:   reg_rdata = ded_cnt;
      REG_OVF:       reg_rdata = ovf_cnt;
      REG_ID_LO:     reg_rdata = id_fuse[7:0];
      REG_ID_HI:     reg_rdata = id_fuse[15:8];
      default:       reg_rdata = 8'h00;
    endcase
  end

endmodule
