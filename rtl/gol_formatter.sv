// gol_formatter: merges the four Data FIFOs into one packet stream for the optical link.
//
// For each entry of the Column Address FIFO (one per trigger) it sends four packets, PACE 0
// to PACE 3, one 16-bit word per clock with gol_en high:
//   word 0         {4'hA, dropped, 1'b0, pace[1:0], column address[7:0]}
//   word 1         {4'h0, event number[11:0]}
//   words 2..97    {2'b00, ded, sec, sample[11:0]}   (omitted when the event was dropped)
//   last word      CRC-16-CCITT (init FFFFh) over the words before it
// If any sample of the packet had an uncorrectable SRAM error, the CRC word is replaced by
// FFFFh, as the description requires for a multiple error. The event number counts packet
// sets since reset or resync. Samples are popped from the Data FIFO one clock ahead (its read
// latency is one clock), so a packet of an accepted event takes NSMP + 3 clocks, without gaps.
// Merging into one stream and the FFFFh marker follow the description; the packet layout, the
// CRC polynomial and the event number are this design's choice.
module gol_formatter
  import kchip_pkg::*;
#(
  parameter int unsigned NSMP = NSAMPLE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             resync,
  // Column Address FIFO (first-word fall-through)
  input  logic             col_empty,
  input  col_entry_t       col_entry,
  output logic             col_pop,
  // Data FIFOs
  output logic [NPACE-1:0] fifo_rd,
  input  logic [ADC_W-1:0] fifo_data [NPACE],
  input  logic [NPACE-1:0] fifo_valid,
  input  logic [NPACE-1:0] fifo_sec,
  input  logic [NPACE-1:0] fifo_ded,
  // link
  output logic [WORD_W-1:0] gol_data,
  output logic              gol_en,
  // event pulses for the error counters
  output logic              sec_ev,
  output logic              ded_ev
);

  typedef enum logic [2:0] {S_IDLE, S_HDR0, S_HDR1, S_DATA, S_CRC} state_e;

  localparam int unsigned CW = $clog2(NSMP + 1);

  state_e          state;
  col_entry_t      ent;
  logic [1:0]      pace;
  logic [EVT_W-1:0] evt;
  logic [15:0]     crc;
  logic            bad;
  logic [CW-1:0]   issued, recvd;
  logic            issue;
  logic            v;
  logic [ADC_W-1:0] d;
  logic            s_sec, s_ded;
  logic [WORD_W-1:0] word;
  logic            word_en;

  assign v     = fifo_valid[pace];
  assign d     = fifo_data[pace];
  assign s_sec = fifo_sec[pace];
  assign s_ded = fifo_ded[pace];

  assign issue = !ent.dropped && (state == S_HDR1 || state == S_DATA) && issued != CW'(NSMP);
  always_comb begin
    fifo_rd = '0;
    fifo_rd[pace] = issue;
  end

  assign col_pop = (state == S_IDLE) && !col_empty;

  // word produced in this clock
  always_comb begin
    word    = '0;
    word_en = 1'b0;
    case (state)
      S_HDR0: begin
        word    = {4'hA, ent.dropped, 1'b0, pace, ent.col[pace*COL_W +: COL_W]};
        word_en = 1'b1;
      end
      S_HDR1: begin
        word    = {4'h0, evt};
        word_en = 1'b1;
      end
      S_DATA: begin
        word    = {2'b00, s_ded, s_sec, d};
        word_en = v;
      end
      S_CRC: begin
        word    = bad ? 16'hFFFF : crc;
        word_en = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ent      <= '0;
      pace     <= '0;
      evt      <= '0;
      crc      <= 16'hFFFF;
      bad      <= 1'b0;
      issued   <= '0;
      recvd    <= '0;
      gol_data <= '0;
      gol_en   <= 1'b0;
      sec_ev   <= 1'b0;
      ded_ev   <= 1'b0;
    end else begin
      gol_data <= word;
      gol_en   <= word_en;
      sec_ev   <= (state == S_DATA) && v && s_sec;
      ded_ev   <= (state == S_DATA) && v && s_ded;
      if (word_en && state != S_CRC) crc <= crc16_word(crc, word);
      if (issue) issued <= issued + 1'b1;
      case (state)
        S_IDLE: begin
          if (!col_empty) begin
            ent   <= col_entry;
            pace  <= '0;
            state <= S_HDR0;
          end
        end
        S_HDR0: state <= S_HDR1;
        S_HDR1: state <= ent.dropped ? S_CRC : S_DATA;
        S_DATA: begin
          if (v) begin
            recvd <= recvd + 1'b1;
            if (s_ded) bad <= 1'b1;
            if (recvd == CW'(NSMP - 1)) state <= S_CRC;
          end
        end
        S_CRC: begin
          crc    <= 16'hFFFF;
          bad    <= 1'b0;
          issued <= '0;
          recvd  <= '0;
          if (pace == 2'(NPACE - 1)) begin
            state <= S_IDLE;
            evt   <= evt + 1'b1;
          end else begin
            pace  <= pace + 1'b1;
            state <= S_HDR0;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (resync) evt <= '0;
    end
  end

endmodule
