// pace_model: behavioural model of one PACE chip's readout, for the top-level testbench.
// On each clock in which p_lv1 is high it queues a trigger; the readout frame of that trigger
// starts LAT+1 clocks later, or when the previous frame and its one-slot gap are over. A
// frame, in 2-clock slots: DataValid high; the 8-bit column address on DataValid, MSB first;
// 96 slots with DataValid high and one analog sample (an integer standing for the voltage)
// per slot; one slot low. Each trigger blocks three columns, the first at 3 * trigger number
// mod 192. Sample values are value(pace, column, index), known to the testbench. skip_next
// makes the chip ignore one trigger (a lost trigger, for the sync-error test); resync empties
// the queue and aborts the frame.
module pace_model #(
  parameter int PACE_ID = 0,
  parameter int LAT     = 4,
  parameter int NSMP    = 96
) (
  input  logic        clk,
  input  logic        p_lv1,
  input  logic        resync,
  input  logic        skip_next,
  output logic        dv,
  output logic [11:0] analog,
  output int          queued_in_frame  // triggers that arrived during a frame
);
  localparam int COLW = 8;
  localparam int FRAME = (1 + COLW + NSMP + 1) * 2;

  int cyc = 0;
  int tq [$];
  int ntrig = 0;
  int start = -100000;
  int col = 0;
  int skipped = 0;
  logic skip_arm = 0;

  function automatic logic [11:0] value(input int p, input int c, input int i);
    return 12'(c * 97 + i * 13 + p * 411 + 7);
  endfunction

  initial begin
    dv = 0; analog = 0; queued_in_frame = 0;
  end

  always @(posedge clk) begin
    int o, slot;
    if (skip_next) skip_arm = 1;
    cyc++;
    if (resync) begin
      tq.delete();
      start = -100000;
      ntrig = 0;
    end else if (p_lv1) begin
      if (skip_arm) skip_arm = 0;
      else begin
        tq.push_back(cyc + LAT);
        if (cyc - start < FRAME) queued_in_frame++;
      end
    end
    if (cyc - start >= FRAME && tq.size() > 0 && tq[0] <= cyc) begin
      void'(tq.pop_front());
      start = cyc;
      col = (3 * ntrig) % 192;
      ntrig++;
    end
    o = cyc - start;
    slot = o / 2;
    if (o >= 0 && o < FRAME) begin
      if (slot == 0) dv <= 1;
      else if (slot <= COLW) dv <= col[COLW - slot];
      else if (slot <= COLW + NSMP) dv <= 1;
      else dv <= 0;
      analog <= (slot > COLW && slot <= COLW + NSMP) ? value(PACE_ID, col, slot - COLW - 1) : 12'd0;
    end else begin
      dv <= 0;
      analog <= 0;
    end
  end
endmodule
