// tb_hamming_dec: self-checking test of hamming_dec (with hamming_enc as the encoder).
// Random words are encoded, then 0, 1 or 2 distinct codeword bits are flipped. Expected:
// no flag and the same data with no error; sec and corrected data with one error (any of
// the 18 positions); ded with two errors.
module tb_hamming_dec;
  localparam int unsigned K = 12;
  localparam int unsigned N = 18;

  logic [K-1:0] d, dout;
  logic [N-1:0] cw, cw_err;
  logic         sec, ded;
  int checks = 0, failures = 0;

  hamming_enc #(.K(K)) u_enc (.d(d), .cw(cw));
  hamming_dec #(.K(K)) dut (.cw(cw_err), .d(dout), .sec(sec), .ded(ded));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b1, b2;
    repeat (100) begin
      d = K'($urandom);
      #1;
      cw_err = cw;
      #1;
      check(dout == d && !sec && !ded, $sformatf("clean word %h -> %h sec=%b ded=%b", d, dout, sec, ded));
      for (b1 = 0; b1 < N; b1++) begin
        cw_err = cw ^ (N'(1) << b1);
        #1;
        check(dout == d && sec && !ded, $sformatf("single error bit %0d on %h -> %h sec=%b ded=%b", b1, d, dout, sec, ded));
      end
      b1 = $urandom_range(N - 1);
      b2 = (b1 + 1 + $urandom_range(N - 2)) % N;
      cw_err = cw ^ (N'(1) << b1) ^ (N'(1) << b2);
      #1;
      check(ded && !sec, $sformatf("double error bits %0d,%0d on %h: sec=%b ded=%b", b1, b2, d, sec, ded));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
