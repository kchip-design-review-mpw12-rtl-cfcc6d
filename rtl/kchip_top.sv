// kchip_top: the data concentrator chip for four PACE front-end chipsets.
//
// Four PACE analog-memory chips are read out in parallel and digitised by a quad 12-bit ADC.
// The concentrator separates the ADC's two multiplexed buses into four channels (adc_demux),
// writes each channel into its own ECC-protected Data FIFO during the PACE readout frames
// (pace_controller, following the timing of pace_emulator), and merges the four FIFOs into one
// packet stream for the optical link transmitter (gol_formatter). A copy of the PACE readout
// state machine (pace_emulator) is compared with the PACE DataValid lines to detect loss of
// synchronisation, and the column addresses of the four PACEs are compared for every event
// (error_logger). Triggers, resynchronisation and calibration requests from
// the control chips are passed on to the PACE chips; calibration requests produce a CalPulse
// with programmable delay and width (cal_pulse_gen with the cal_dll fine delay). Registers are
// reached through I2C (i2c_slave, config_regs), including a start bit for the SRAM self test
// (sram_bist), which borrows the SRAM ports of all four Data FIFOs while it runs; run it only
// while no readout is in progress, as it overwrites the SRAM contents.
//
// Interface: all inputs are synchronous to clk (40 MHz) except the ADC buses, which carry
// data on both clock edges, and the I2C lines, which are oversampled. The pads, LVDS
// receivers and ID fuses are outside this RTL: their signals are ports.
module kchip_top
  import kchip_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,  // Data FIFO depth (words per PACE)
  parameter int unsigned NSMP      = NSAMPLE,
  parameter int unsigned PACE_LAT  = 4,
  parameter int unsigned GAP       = 1,
  parameter int unsigned COL_DEPTH = 32,
  parameter logic [6:0]  I2C_ADDR  = 7'h42,
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned CW       = ADC_W + ham_p(ADC_W) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // fast timing signals from the control chips
  input  logic              l1a,
  input  logic              resync_in,
  input  logic              cal_req,
  // to / from the PACE chips
  output logic              p_lv1,
  output logic              p_resync,
  output logic              p_calpulse,
  input  logic [NPACE-1:0]  pace_dv,
  // ADC buses (after the LVDS receivers)
  input  logic [ADC_W-1:0]  adc_bus [2],
  // slow control
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_low,
  input  logic [15:0]       id_fuse,
  // optical link transmitter
  output logic [WORD_W-1:0] gol_data,
  output logic              gol_en
);

  localparam int unsigned SLOT_W = $clog2(1 + COL_W + NSMP + GAP);
  localparam int unsigned CAW    = $clog2(COL_DEPTH);

  // configuration
  cfg_t        cfg;
  logic        bist_start, err_clear;
  logic [7:0]  reg_addr, reg_wdata, reg_rdata;
  logic        reg_we;

  // readout sequence
  logic              exp_dv, exp_known, emu_busy, frame_start, addr_stb, smp_stb, smp_last;
  logic [SLOT_W-1:0] smp_idx;
  logic [5:0]        pending;

  // data path
  logic [ADC_W-1:0] adc_ch [NPACE];
  logic             fifo_we;
  logic [ADC_W-1:0] fifo_wd [NPACE];
  logic [AW:0]      fifo_count [NPACE];
  logic [NPACE-1:0] fifo_rd, fifo_valid, fifo_sec, fifo_ded, fifo_full, fifo_empty;
  logic [ADC_W-1:0] fifo_rdata [NPACE];

  // column FIFO
  logic       col_push, col_pop, col_full, col_empty;
  col_entry_t col_wentry, col_rentry;
  logic [CAW:0] col_count;

  // status
  logic [NPACE-1:0] sync_err;
  logic [7:0]       sync_err_cnt;
  logic             col_err;
  logic             sec_ev, ded_ev, ovf_ev;

  // self test
  logic            bist_busy, bist_done, bist_fail, bist_en, bist_we, bist_re;
  logic [NPACE-1:0] bist_mask;
  logic [AW-1:0]   bist_addr;
  logic [CW-1:0]   bist_wd;
  logic [CW-1:0]   bist_rd [NPACE];

  // calibration
  logic       cal_pulse_c, cal_busy, dll_locked;
  logic [2:0] dll_tap;

  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl, .sda_in, .sda_low,
    .reg_addr, .reg_wdata, .reg_we, .reg_rdata
  );

  config_regs u_regs (
    .clk, .rst_n, .reg_addr, .reg_wdata, .reg_we, .reg_rdata,
    .cfg, .bist_start, .err_clear,
    .sync_err, .col_err, .sync_err_cnt, .bist_done, .bist_fail,
    .sec_ev, .ded_ev, .ovf_ev, .id_fuse
  );

  adc_demux u_demux (.clk, .rst_n, .adc_bus, .ch(adc_ch));

  pace_emulator #(.PACE_LAT(PACE_LAT), .GAP(GAP), .NSMP(NSMP)) u_emu (
    .clk, .rst_n, .p_lv1, .resync(p_resync),
    .exp_dv, .exp_known, .busy(emu_busy), .frame_start, .addr_stb, .smp_stb, .smp_last,
    .smp_idx, .pending
  );

  pace_controller #(.DEPTH(DEPTH), .NSMP(NSMP), .COL_DEPTH(COL_DEPTH)) u_ctrl (
    .clk, .rst_n, .l1a, .resync_in, .p_lv1, .p_resync,
    .frame_start, .addr_stb, .smp_stb, .smp_last,
    .pace_dv, .adc_ch, .adc_pipe(cfg.adc_pipe),
    .fifo_count, .fifo_we, .fifo_wd,
    .col_count, .col_push, .col_entry(col_wentry), .ovf_ev
  );

  error_logger u_err (
    .clk, .rst_n, .clear(err_clear), .exp_dv, .exp_known, .pace_dv,
    .col_chk(col_push), .col_addr(col_wentry.col),
    .sync_err, .err_cnt(sync_err_cnt), .col_err
  );

  for (genvar p = 0; p < NPACE; p++) begin : g_fifo
    data_fifo #(.DEPTH(DEPTH), .K(ADC_W)) u_fifo (
      .clk, .rst_n,
      .wr_en(fifo_we), .wr_data(fifo_wd[p]), .full(fifo_full[p]),
      .rd_en(fifo_rd[p]), .rd_data(fifo_rdata[p]), .rd_valid(fifo_valid[p]),
      .rd_sec(fifo_sec[p]), .rd_ded(fifo_ded[p]), .empty(fifo_empty[p]), .count(fifo_count[p]),
      .bist_en, .bist_we, .bist_addr, .bist_wd, .bist_re, .bist_rd(bist_rd[p])
    );
  end

  sync_fifo #(.W($bits(col_entry_t)), .DEPTH(COL_DEPTH)) u_colfifo (
    .clk, .rst_n, .push(col_push), .wr_data(col_wentry), .full(col_full),
    .pop(col_pop), .rd_data(col_rentry), .empty(col_empty), .count(col_count)
  );

  gol_formatter #(.NSMP(NSMP)) u_fmt (
    .clk, .rst_n, .resync(p_resync),
    .col_empty, .col_entry(col_rentry), .col_pop,
    .fifo_rd, .fifo_data(fifo_rdata), .fifo_valid, .fifo_sec, .fifo_ded,
    .gol_data, .gol_en, .sec_ev, .ded_ev
  );

  sram_bist #(.DEPTH(DEPTH), .W(CW), .NMEM(NPACE)) u_bist (
    .clk, .rst_n, .start(bist_start), .busy(bist_busy), .done(bist_done), .fail(bist_fail),
    .fail_mask(bist_mask), .mem_en(bist_en), .mem_we(bist_we), .mem_re(bist_re),
    .mem_addr(bist_addr), .mem_wd(bist_wd), .mem_rd(bist_rd)
  );

  cal_pulse_gen u_cal (
    .clk, .rst_n, .cal_req, .cal_width(cfg.cal_width), .cal_delay(cfg.cal_delay),
    .cal_pulse(cal_pulse_c), .dll_tap, .busy(cal_busy)
  );

  cal_dll u_dll (
    .clk, .rst_n, .tap(dll_tap), .pulse_in(cal_pulse_c), .pulse_out(p_calpulse),
    .locked(dll_locked)
  );

endmodule
