// kchip_pkg: constants, types and small functions shared by the data concentrator.
//
// The concentrator reads four PACE analog-memory chips through a quad 12-bit ADC and merges
// their data into one packet stream. The numbers taken from the design description are: four
// PACE chips, 12-bit ADC words, 32 channels per PACE, 3 blocked pipeline columns per trigger,
// PACE readout at 20 MHz on a 40 MHz system clock (two clocks per readout slot), and the
// register reset values CalPulse_WIDTH = 2, CalPulse_DELAY = 8'b1111_1110 and ADC pipeline
// depth = 6. Everything else here (column-address width, frame layout, register map, CRC
// polynomial, packet layout) is this design's own choice and is documented where it is used.
package kchip_pkg;

  localparam int unsigned NPACE      = 4;   // PACE chipsets merged by one concentrator
  localparam int unsigned ADC_W      = 12;  // ADC word width
  localparam int unsigned NSTRIP     = 32;  // channels per PACE
  localparam int unsigned NCOL       = 3;   // pipeline columns read per trigger
  localparam int unsigned NSAMPLE    = NSTRIP * NCOL;  // 96 samples per PACE per event
  localparam int unsigned SLOT_CLKS  = 2;   // 40 MHz clock / 20 MHz PACE readout
  localparam int unsigned COL_W      = 8;   // PACE column address width (own choice: 192 cells)
  localparam int unsigned EVT_W      = 12;  // event counter width (own choice)
  localparam int unsigned WORD_W     = 16;  // GOL payload word width (own choice)

  // Register reset values given by the design description.
  localparam logic [7:0] CAL_WIDTH_DEFAULT = 8'd2;
  localparam logic [7:0] CAL_DELAY_DEFAULT = 8'b1111_1110;
  localparam logic [7:0] ADC_PIPE_DEFAULT  = 8'd6;

  // Register map of the I2C-accessible register file (own choice).
  typedef enum logic [7:0] {
    REG_CTRL      = 8'h00,  // [0] BIST start (self clearing), [1] clear error counters
    REG_CAL_WIDTH = 8'h01,
    REG_CAL_DELAY = 8'h02,
    REG_ADC_PIPE  = 8'h03,
    REG_STATUS    = 8'h04,  // [3:0] sync error per PACE, [4] BIST done, [5] BIST fail,
                            // [6] PACE column addresses differed
    REG_SYNC_ERRS = 8'h05,  // saturating count of sync mismatches
    REG_ECC_SEC   = 8'h06,  // saturating count of corrected single errors
    REG_ECC_DED   = 8'h07,  // saturating count of uncorrectable errors
    REG_OVF       = 8'h08,  // saturating count of events dropped for lack of FIFO space
    REG_ID_LO     = 8'h09,  // ID fuse bits [7:0]
    REG_ID_HI     = 8'h0A   // ID fuse bits [15:8]
  } reg_addr_e;

  // Configuration as seen by the datapath.
  typedef struct packed {
    logic [7:0] cal_width;  // CalPulse width in clock cycles
    logic [7:0] cal_delay;  // [7:3] coarse delay in clocks, [2:0] DLL tap
    logic [7:0] adc_pipe;   // ADC pipeline depth in clock cycles (0..15 used)
  } cfg_t;

  // One Column Address FIFO entry: the column addresses of the four PACEs for one event and
  // a flag telling that the event's samples were dropped because a Data FIFO was full.
  typedef struct packed {
    logic                   dropped;
    logic [NPACE*COL_W-1:0] col;
  } col_entry_t;

  // CRC-16-CCITT (x^16 + x^12 + x^5 + 1) over one 16-bit word, MSB first.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // Number of Hamming check bits needed for k data bits (2^p >= k + p + 1).
  function automatic int unsigned ham_p(input int unsigned k);
    int unsigned p;
    p = 1;
    while ((1 << p) < k + p + 1) p++;
    return p;
  endfunction

endpackage
