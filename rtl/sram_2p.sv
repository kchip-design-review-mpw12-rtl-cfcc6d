// sram_2p: two-port SRAM of one Data FIFO (one write port, one read port).
//
// Stands for the SRAM macro cell of the chip, written as a plain array so that synthesis can
// map it to a memory. Write: when we is high the word wd is stored at address wa on the rising
// clock edge. Read: when re is high the word at ra appears on rd one clock later (synchronous
// read, rd holds its value otherwise). A read and a write of the same address in one cycle
// return the old word. The RA/WA address-bus names follow the description; the depth and the
// read timing are this design's own choice.
module sram_2p #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 18,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic          re,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  rd
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  always_ff @(posedge clk) begin
    if (re) rd <= mem[ra];
  end

endmodule
