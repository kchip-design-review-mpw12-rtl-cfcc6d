// adc_model: behavioural model of the quad ADC and its two multiplexed output buses.
// Each channel is sampled every clock and comes out PIPE clocks later. Bus 0 carries
// channel 0 while the clock is high and channel 1 while it is low; bus 1 likewise carries
// channels 2 and 3. With PIPE = 5, plus one clock in the concentrator's demultiplexer, a
// sample reaches the concentrator's datapath 6 clocks after the PACE output it belongs to,
// matching the ADC pipeline depth register's reset value.
module adc_model #(
  parameter int PIPE = 5
) (
  input  logic        clk,
  input  logic [11:0] ain [4],
  output logic [11:0] bus [2]
);
  logic [11:0] pipe_q [PIPE][4];

  initial begin
    bus[0] = 0; bus[1] = 0;
    for (int s = 0; s < PIPE; s++) for (int c = 0; c < 4; c++) pipe_q[s][c] = 0;
  end

  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      for (int s = PIPE - 1; s > 0; s--) pipe_q[s][c] = pipe_q[s-1][c];
      pipe_q[0][c] = ain[c];
    end
  end

  // ain changes right after the rising edge (non-blocking); the value of clock c is taken
  // at the next edge, so pipe_q[PIPE-1] after edge c+PIPE holds the value of clock c
  always @(posedge clk) begin
    #1;
    bus[0] = pipe_q[PIPE-1][0];
    bus[1] = pipe_q[PIPE-1][2];
  end
  always @(negedge clk) begin
    #1;
    bus[0] = pipe_q[PIPE-1][1];
    bus[1] = pipe_q[PIPE-1][3];
  end
endmodule
