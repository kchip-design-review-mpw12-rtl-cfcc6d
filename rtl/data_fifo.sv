// data_fifo: one of the four Data FIFOs, holding the ADC samples of one PACE chip.
//
// Each 12-bit sample is Hamming SEC-DED encoded (hamming_enc) on the way in and decoded
// (hamming_dec) on the way out, so that a single upset bit in the SRAM is corrected and a
// double upset is flagged. Storage is one sram_2p; read and write pointers wrap around it and
// an occupancy counter gives full/empty and the free space the readout controller checks
// before it accepts an event.
//
// Interface and timing: wr_en writes wr_data at the rising edge (ignored when full). rd_en
// pops one word (ignored when empty); the decoded word appears on rd_data with rd_valid one
// clock later, together with rd_sec (corrected) and rd_ded (uncorrectable). While bist_en is
// high the SRAM ports belong to the self-test controller, which writes and reads raw codewords;
// the FIFO pointers are left untouched. The ECC and the self-test access follow the
// description; depth, pointer scheme and read latency are this design's choices.
module data_fifo
  import kchip_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned K     = ADC_W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned N    = K + ham_p(K) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side
  input  logic          wr_en,
  input  logic [K-1:0]  wr_data,
  output logic          full,
  // read side
  input  logic          rd_en,
  output logic [K-1:0]  rd_data,
  output logic          rd_valid,
  output logic          rd_sec,
  output logic          rd_ded,
  output logic          empty,
  output logic [AW:0]   count,
  // self-test access to the raw SRAM
  input  logic          bist_en,
  input  logic          bist_we,
  input  logic [AW-1:0] bist_addr,
  input  logic [N-1:0]  bist_wd,
  input  logic          bist_re,
  output logic [N-1:0]  bist_rd
);

  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;
  logic [N-1:0]  enc_cw, ram_rd;
  logic          ram_we, ram_re;
  logic [AW-1:0] ram_wa, ram_ra;
  logic [N-1:0]  ram_wd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full && !bist_en;
  assign do_rd = rd_en && !empty && !bist_en;

  hamming_enc #(.K(K)) u_enc (.d(wr_data), .cw(enc_cw));

  always_comb begin
    if (bist_en) begin
      ram_we = bist_we;
      ram_wa = bist_addr;
      ram_wd = bist_wd;
      ram_re = bist_re;
      ram_ra = bist_addr;
    end else begin
      ram_we = do_wr;
      ram_wa = wptr;
      ram_wd = enc_cw;
      ram_re = do_rd;
      ram_ra = rptr;
    end
  end

  sram_2p #(.DEPTH(DEPTH), .W(N)) u_ram (
    .clk(clk), .we(ram_we), .wa(ram_wa), .wd(ram_wd), .re(ram_re), .ra(ram_ra), .rd(ram_rd)
  );

  assign bist_rd = ram_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  hamming_dec #(.K(K)) u_dec (.cw(ram_rd), .d(rd_data), .sec(rd_sec), .ded(rd_ded));

endmodule
