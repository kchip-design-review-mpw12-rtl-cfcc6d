// tb_sram_bist: self-checking test of sram_bist on two small memories (DEPTH 32).
// Memory 0 is fault free. Memory 1 is a sram_2p whose read data can be given a fault by the
// testbench: (a) bit 3 of word 5 stuck at 1, (b) bit 0 of word 20 stuck at 0, (c) no fault.
// Each run must end with done, take exactly 15*DEPTH busy clocks, and flag exactly the
// faulty memory in fail_mask (nothing in case c).
module tb_sram_bist;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned W = 18;
  localparam int unsigned NMEM = 2;

  logic clk = 0, rst_n, start, busy, done, fail;
  logic [NMEM-1:0] fail_mask;
  logic mem_en, mem_we, mem_re;
  logic [4:0] mem_addr;
  logic [W-1:0] mem_wd;
  logic [W-1:0] mem_rd [NMEM];
  logic [W-1:0] raw1;
  logic [4:0] ra_q;
  int fault_kind;
  int checks = 0, failures = 0;

  sram_bist #(.DEPTH(DEPTH), .W(W), .NMEM(NMEM)) dut (.*);

  sram_2p #(.DEPTH(DEPTH), .W(W)) m0 (.clk, .we(mem_we), .wa(mem_addr), .wd(mem_wd),
                                      .re(mem_re), .ra(mem_addr), .rd(mem_rd[0]));
  sram_2p #(.DEPTH(DEPTH), .W(W)) m1 (.clk, .we(mem_we), .wa(mem_addr), .wd(mem_wd),
                                      .re(mem_re), .ra(mem_addr), .rd(raw1));

  always_ff @(posedge clk) if (mem_re) ra_q <= mem_addr;

  always_comb begin
    mem_rd[1] = raw1;
    if (fault_kind == 1 && ra_q == 5'd5)  mem_rd[1][3] = 1'b1;
    if (fault_kind == 2 && ra_q == 5'd20) mem_rd[1][0] = 1'b0;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(input int fk, input logic [NMEM-1:0] exp_mask);
    int busy_clks;
    fault_kind = fk;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    busy_clks = 1;
    while (!done) begin
      @(negedge clk);
      if (busy) busy_clks++;
    end
    check(busy_clks == 15 * DEPTH, $sformatf("test length %0d clocks, expected %0d", busy_clks, 15 * DEPTH));
    check(fail_mask == exp_mask && fail == (exp_mask != 0),
          $sformatf("fault %0d: fail_mask %b expected %b", fk, fail_mask, exp_mask));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; fault_kind = 0; ra_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    run(1, 2'b10);
    run(2, 2'b10);
    run(0, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
