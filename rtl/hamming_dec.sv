// hamming_dec: Hamming SEC-DED decoder for words read from the Data FIFO SRAMs.
//
// Counterpart of hamming_enc (same codeword layout: overall parity in bit 0, check bit j at
// position 2^j). The syndrome is the XOR of the indices of all set bits among positions
// 1..K+P. With odd overall parity the word holds one error: a non-zero syndrome names the bit
// to flip, a zero syndrome means the parity bit itself flipped. Even overall parity with a
// non-zero syndrome, or a syndrome pointing outside the word, is an uncorrectable multiple
// error (ded). The downstream packet formatter marks such a packet by setting its CRC field to
// FFFFh, as the design description requires. Purely combinational.
module hamming_dec
  import kchip_pkg::*;
#(
  parameter int unsigned K = 12,
  localparam int unsigned P = ham_p(K),
  localparam int unsigned N = K + P + 1
) (
  input  logic [N-1:0] cw,
  output logic [K-1:0] d,     // corrected data
  output logic         sec,   // a single error was corrected
  output logic         ded    // an uncorrectable (double or worse) error was detected
);

  always_comb begin
    int unsigned syn;
    int unsigned di;
    logic        par;
    logic [N-1:0] c;
    c   = cw;
    syn = 0;
    for (int unsigned pos = 1; pos < N; pos++)
      if (c[pos]) syn ^= pos;
    par = ^c;
    sec = 1'b0;
    ded = 1'b0;
    if (par) begin
      if (syn < N) begin
        sec = 1'b1;
        if (syn != 0) c[syn] = ~c[syn];
      end else begin
        ded = 1'b1;
      end
    end else if (syn != 0) begin
      ded = 1'b1;
    end
    d  = '0;
    di = 0;
    for (int unsigned pos = 1; pos < N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        d[di] = c[pos];
        di++;
      end
    end
  end

endmodule
