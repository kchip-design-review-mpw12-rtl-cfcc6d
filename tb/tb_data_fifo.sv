// tb_data_fifo: self-checking test of data_fifo (DEPTH reduced to 16).
// 1) fill to full with random words (a write while full must be dropped), drain, compare
//    order and data, check empty and count; 2) random simultaneous traffic against a queue
//    model; 3) through the self-test port, overwrite stored codewords with one and with two
//    flipped bits and check that the read returns the corrected word with rd_sec, and flags
//    rd_ded for the double error.
module tb_data_fifo;
  import kchip_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned K = 12;
  localparam int unsigned N = 18;

  logic clk = 0, rst_n;
  logic wr_en, full, rd_en, rd_valid, rd_sec, rd_ded, empty;
  logic [K-1:0] wr_data, rd_data;
  logic [4:0] count;
  logic bist_en, bist_we, bist_re;
  logic [3:0] bist_addr;
  logic [N-1:0] bist_wd, bist_rd;
  logic [K-1:0] ref_d;
  logic [N-1:0] ref_cw;
  logic [K-1:0] q [$];
  int checks = 0, failures = 0;
  bit ecc_phase = 0;

  data_fifo #(.DEPTH(DEPTH), .K(K)) dut (.*);
  hamming_enc #(.K(K)) u_ref (.d(ref_d), .cw(ref_cw));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // compare every word that comes out with the model
  logic [K-1:0] exp_q [$];
  always @(posedge clk) begin
    #1;
    if (rd_valid && !bist_en && !ecc_phase) begin
      if (exp_q.size() == 0) check(0, "unexpected read data");
      else begin
        logic [K-1:0] e;
        e = exp_q.pop_front();
        check(rd_data == e && !rd_ded, $sformatf("read %h expected %h", rd_data, e));
      end
    end
  end

  task automatic cycle(input bit w, input bit r, input logic [K-1:0] v);
    @(negedge clk);
    wr_en = w; rd_en = r; wr_data = v;
    if (r && q.size() > 0) exp_q.push_back(q[0]);
    @(posedge clk);
    if (r && q.size() > 0) void'(q.pop_front());
    if (w && q.size() + ((r && q.size() > 0) ? 1 : 0) < DEPTH + 1 && !(q.size() == DEPTH)) q.push_back(v);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    bist_en = 0; bist_we = 0; bist_re = 0; bist_addr = 0; bist_wd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1) fill and drain
    for (int i = 0; i < DEPTH; i++) cycle(1, 0, K'($urandom));
    @(negedge clk);
    check(full && count == 5'(DEPTH), "full after DEPTH writes");
    cycle(1, 0, 12'hABC);   // dropped
    check(q.size() == DEPTH, "model");
    for (int i = 0; i < DEPTH; i++) cycle(0, 1, '0);
    cycle(0, 0, '0);
    @(negedge clk);
    check(empty && count == 0, "empty after drain");
    check(exp_q.size() == 0, "all words read");
    // 2) random traffic
    for (int i = 0; i < 2000; i++) begin
      bit w, r;
      @(negedge clk);
      check(count == 5'(q.size()), $sformatf("count %0d vs model %0d", count, q.size()));
      w = 1'($urandom);
      r = 1'($urandom);
      begin
        bit dw, dr;
        logic [K-1:0] v;
        v = K'($urandom);
        dw = w && q.size() < DEPTH;
        dr = r && q.size() > 0;
        wr_en = w; rd_en = r; wr_data = v;
        if (dr) exp_q.push_back(q[0]);
        @(posedge clk);
        if (dr) void'(q.pop_front());
        if (dw) q.push_back(v);
      end
    end
    // drain
    while (q.size() > 0) begin
      @(negedge clk);
      wr_en = 0; rd_en = 1;
      exp_q.push_back(q[0]);
      @(posedge clk);
      void'(q.pop_front());
    end
    @(negedge clk);
    rd_en = 0;
    @(negedge clk);
    check(empty, "empty after random traffic");
    // 3) error correction: write two words, corrupt them through the raw port, read them
    begin
      int wp;
      logic [K-1:0] a, b;
      wp = 0;
      ecc_phase = 1;
      // the write pointer position equals the number of words written so far modulo DEPTH;
      // find it by writing two words and reading the raw memory for them
      a = 12'h5A3; b = 12'h0F1;
      @(negedge clk); wr_en = 1; wr_data = a;
      @(negedge clk); wr_en = 1; wr_data = b;
      @(negedge clk); wr_en = 0;
      ref_d = a; #1;
      // search the raw memory for the codeword of a followed by b
      for (int adr = 0; adr < DEPTH; adr++) begin
        @(negedge clk); bist_en = 1; bist_re = 1; bist_addr = 4'(adr);
        @(negedge clk); bist_re = 0;
        if (bist_rd == ref_cw) wp = adr;
      end
      // flip one bit of a and two bits of b
      ref_d = a; #1;
      @(negedge clk); bist_we = 1; bist_addr = 4'(wp); bist_wd = ref_cw ^ 18'h00100;
      ref_d = b; #1;
      @(negedge clk); bist_we = 1; bist_addr = 4'(wp + 1); bist_wd = ref_cw ^ 18'h02004;
      @(negedge clk); bist_we = 0; bist_en = 0; rd_en = 1;
      @(posedge clk); #1;
      check(rd_valid && rd_data == a && rd_sec && !rd_ded,
            $sformatf("single error corrected: %h sec=%b ded=%b", rd_data, rd_sec, rd_ded));
      @(posedge clk); #1;
      check(rd_valid && rd_ded, $sformatf("double error detected: ded=%b", rd_ded));
      @(negedge clk); rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
