// tb_hamming: self-checking test of hamming_enc.
// For 0, all-ones, one-hot and random data words it checks, with its own arithmetic, that the
// data bits sit at the non power-of-two positions, that every Hamming check equation (XOR of
// all positions with index bit j set) is zero, and that the overall parity is even.
module tb_hamming;
  import kchip_pkg::*;
  localparam int unsigned K = 12;
  localparam int unsigned P = 5;
  localparam int unsigned N = K + P + 1;

  logic [K-1:0] d;
  logic [N-1:0] cw;
  int checks = 0, failures = 0;

  hamming_enc #(.K(K)) dut (.d(d), .cw(cw));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic try_word(input logic [K-1:0] v);
    int unsigned di;
    logic ok_data, ok_par;
    d = v;
    #1;
    ok_data = 1'b1;
    di = 0;
    for (int pos = 1; pos < N; pos++)
      if (pos != 1 && pos != 2 && pos != 4 && pos != 8 && pos != 16) begin
        if (cw[pos] != v[di]) ok_data = 1'b0;
        di++;
      end
    check(ok_data, $sformatf("data placement for %h: cw=%h", v, cw));
    for (int j = 0; j < P; j++) begin
      ok_par = 1'b0;
      for (int pos = 1; pos < N; pos++) if (pos[j]) ok_par ^= cw[pos];
      check(ok_par == 1'b0, $sformatf("check equation %0d for %h: cw=%h", j, v, cw));
    end
    check((^cw) == 1'b0, $sformatf("overall parity for %h", v));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try_word('0);
    check(cw == '0, "all-zero data gives all-zero codeword");
    try_word('1);
    for (int i = 0; i < K; i++) try_word(K'(1) << i);
    repeat (200) try_word(K'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
