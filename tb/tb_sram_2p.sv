// tb_sram_2p: self-checking test of sram_2p against a reference array.
// Random writes and reads for 2000 clocks; each read result is compared one clock later with
// the reference (which holds the value before a same-clock write). Also checks that rd holds
// when re is low.
module tb_sram_2p;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned W     = 18;

  logic clk = 0;
  logic we, re;
  logic [5:0] wa, ra;
  logic [W-1:0] wd, rd;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] exp_rd;
  int checks = 0, failures = 0;

  sram_2p #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pend;
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    // initialise every word so that reads are defined
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wa = 6'(a); wd = W'($urandom);
      ref_mem[a] = wd;
    end
    @(negedge clk);
    we = 0;
    pend = 0;
    repeat (2000) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rd != exp_rd) begin
          failures++;
          $display("FAIL: read %h expected %h", rd, exp_rd);
        end
      end
      we = 1'($urandom);
      re = 1'($urandom);
      wa = 6'($urandom);
      ra = ($urandom % 4 == 0) ? wa : 6'($urandom);
      wd = W'($urandom);
      if (re) exp_rd = ref_mem[ra];
      pend = re || pend;
      if (we) ref_mem[wa] = wd;
    end
    // hold check
    @(negedge clk);
    we = 0; re = 0;
    exp_rd = rd;
    repeat (3) @(negedge clk);
    checks++;
    if (rd != exp_rd) begin
      failures++;
      $display("FAIL: rd changed without re");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
