// pace_controller: readout sequencer between the PACE chips, the ADC and the Data FIFOs.
//
// It forwards the fast timing signals from the control chips to the PACE chips (trigger as
// P_LV1, ReSync), each re-timed by one register. During a PACE readout frame it follows the
// slot strobes of pace_emulator: in the column-address slots it shifts the serial column
// address of each PACE off its DataValid line, and in the sample slots it writes the
// demultiplexed ADC word of each PACE into that PACE's Data FIFO. Because the ADC is
// pipelined, each sample strobe is delayed by the programmable ADC pipeline depth (register
// value, reset value 6 clocks) before the write. When the last sample of a frame has been
// written, one entry with the four column addresses goes into the Column Address FIFO.
//
// Overflow: at the first clock of a frame the controller checks that every Data FIFO still has
// room for a whole event (counting words already promised to earlier frames) and that the
// Column Address FIFO has room. If not, the event's samples are not written; its column entry
// is still pushed with the dropped flag set, so the packet stream keeps one packet set per
// trigger, and ovf_ev pulses. Column entries of dropped events keep arriving while the packet
// formatter is still busy with up to DEPTH/NSMP full events (about 10 at the defaults, 396
// clocks each); a frame lasts 212 clocks, so about 19 entries can pile up behind them. The
// Column Address FIFO default of 32 entries covers that. The overflow policy is this design's choice; the readout
// sequence, the column-address deserialisation and the ADC pipeline depth follow the
// description.
module pace_controller
  import kchip_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,  // Data FIFO depth in words
  parameter int unsigned NSMP      = NSAMPLE,
  parameter int unsigned COL_DEPTH = 32,
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned CAW      = $clog2(COL_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // fast timing signals from the control chips and to the PACE chips
  input  logic             l1a,
  input  logic             resync_in,
  output logic             p_lv1,
  output logic             p_resync,
  // sequence from pace_emulator
  input  logic             frame_start,
  input  logic             addr_stb,
  input  logic             smp_stb,
  input  logic             smp_last,
  // PACE and ADC data
  input  logic [NPACE-1:0] pace_dv,
  input  logic [ADC_W-1:0] adc_ch [NPACE],
  input  logic [7:0]       adc_pipe,
  // Data FIFOs
  input  logic [AW:0]      fifo_count [NPACE],
  output logic             fifo_we,
  output logic [ADC_W-1:0] fifo_wd [NPACE],
  // Column Address FIFO
  input  logic [CAW:0]     col_count,
  output logic             col_push,
  output col_entry_t       col_entry,
  output logic             ovf_ev
);

  localparam int unsigned MAXD = 16;

  typedef struct packed {
    logic take;
    logic last;
    logic drop;
  } stb_t;

  stb_t                   now_stb, del_stb;
  stb_t                   sr [MAXD];
  logic                   accept, drop_cur, room;
  logic [AW+1:0]          reserved;
  logic [COL_W-1:0]       col_sh   [NPACE];
  logic [NPACE*COL_W-1:0] col_pend;

  // fast signal distribution
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_lv1    <= 1'b0;
      p_resync <= 1'b0;
    end else begin
      p_lv1    <= l1a;
      p_resync <= resync_in;
    end
  end

  // room for one more event in every Data FIFO and in the Column Address FIFO
  always_comb begin
    room = (32'(col_count) + 2 <= COL_DEPTH);
    for (int p = 0; p < NPACE; p++)
      if (32'(fifo_count[p]) + 32'(reserved) + NSMP > DEPTH) room = 1'b0;
  end

  assign accept = frame_start && room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_cur <= 1'b0;
    else if (frame_start) drop_cur <= !room;
  end

  // strobe of the current clock, then the ADC pipeline delay line
  assign now_stb.take = smp_stb;
  assign now_stb.last = smp_last;
  assign now_stb.drop = frame_start ? !room : drop_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAXD; i++) sr[i] <= '0;
    end else begin
      sr[0] <= now_stb;
      for (int i = 1; i < MAXD; i++) sr[i] <= sr[i-1];
    end
  end

  assign del_stb = (adc_pipe[3:0] == 4'd0) ? now_stb : sr[adc_pipe[3:0] - 4'd1];

  assign fifo_we = del_stb.take && !del_stb.drop;
  always_comb
    for (int p = 0; p < NPACE; p++) fifo_wd[p] = adc_ch[p];

  // words promised to accepted frames but not yet written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reserved <= '0;
    else reserved <= reserved + (accept ? (AW+2)'(NSMP) : '0) - (AW+2)'(fifo_we);
  end

  // column address deserialisers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPACE; p++) col_sh[p] <= '0;
      col_pend <= '0;
    end else begin
      if (addr_stb)
        for (int p = 0; p < NPACE; p++) col_sh[p] <= {col_sh[p][COL_W-2:0], pace_dv[p]};
      if (smp_last)
        for (int p = 0; p < NPACE; p++) col_pend[p*COL_W +: COL_W] <= col_sh[p];
    end
  end

  assign col_push        = del_stb.take && del_stb.last;
  assign col_entry.col     = col_pend;
  assign col_entry.dropped = del_stb.drop;
  assign ovf_ev          = frame_start && !room;

  // Each frame pushes exactly one entry; the room check above and the Column Address FIFO
  // depth (see the module header) make a push into a full FIFO impossible.
  a_col_room: assert property (@(posedge clk) disable iff (!rst_n)
                               col_push |-> 32'(col_count) < COL_DEPTH)
    else $error("Column Address FIFO overflow");

endmodule
