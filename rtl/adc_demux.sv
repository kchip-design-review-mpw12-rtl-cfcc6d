// adc_demux: splits the two multiplexed ADC buses into four PACE data channels.
//
// The quad ADC sends its four 12-bit channels over two buses, each carrying two channels
// time-multiplexed on the two halves of the system clock. A register clocked on the falling
// edge catches the word each bus presents while the clock is high; the rising edge catches the
// word presented while it is low. Both are then re-timed to the rising edge, so the four
// channels come out together, one clock after the rising-edge word was on the bus.
// Channel mapping (own choice): bus 0 falling edge -> PACE 0, bus 0 rising -> PACE 1,
// bus 1 falling -> PACE 2, bus 1 rising -> PACE 3. That both clock edges are used follows the
// description; the mapping and the re-timing are this design's.
module adc_demux
  import kchip_pkg::*;
#(
  parameter int unsigned W = ADC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] adc_bus [2],    // two multiplexed ADC buses
  output logic [W-1:0] ch      [NPACE] // one word per PACE chip, valid each clock
);

  logic [W-1:0] neg_q [2];

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_q[0] <= '0;
      neg_q[1] <= '0;
    end else begin
      neg_q[0] <= adc_bus[0];
      neg_q[1] <= adc_bus[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPACE; i++) ch[i] <= '0;
    end else begin
      ch[0] <= neg_q[0];
      ch[1] <= adc_bus[0];
      ch[2] <= neg_q[1];
      ch[3] <= adc_bus[1];
    end
  end

endmodule
