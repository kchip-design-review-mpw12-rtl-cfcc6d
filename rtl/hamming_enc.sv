// hamming_enc: Hamming SEC-DED encoder for the words stored in the Data FIFO SRAMs.
//
// The SRAMs are protected against single event upsets by a Hamming code that corrects one and
// detects two bit errors per word. The code layout is this design's choice: bit 0 of the
// codeword is an overall parity bit; bits 1..K+P are a classic Hamming code in which check bit j
// sits at position 2^j and the data bits fill the other positions in ascending order. For the
// default K = 12 data bits there are P = 5 check bits and an 18-bit codeword.
// Purely combinational.
module hamming_enc
  import kchip_pkg::*;
#(
  parameter int unsigned K = 12,
  localparam int unsigned P = ham_p(K),
  localparam int unsigned N = K + P + 1
) (
  input  logic [K-1:0] d,
  output logic [N-1:0] cw
);

  always_comb begin
    int unsigned di;
    logic [N-1:0] c;
    c  = '0;
    di = 0;
    // place the data bits at the non power-of-two positions
    for (int unsigned pos = 1; pos < N; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = d[di];
        di++;
      end
    end
    // check bit at 2^j covers every position whose index has bit j set
    for (int unsigned j = 0; j < P; j++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos < N; pos++)
        if (((pos >> j) & 1) == 1 && pos != (1 << j)) par ^= c[pos];
      c[1 << j] = par;
    end
    c[0] = ^c[N-1:1];
    cw   = c;
  end

endmodule
