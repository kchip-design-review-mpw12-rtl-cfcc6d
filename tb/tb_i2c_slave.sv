// tb_i2c_slave: self-checking test of i2c_slave with a bit-banged I2C master.
// The master runs at 3.33 Mbit/s (300 ns per bit on a 40 MHz system clock). The slave's
// register side is a 256-byte array in the testbench. Checks: ACK of its own address and of
// every written byte, the write pulses with pointer auto-increment, a random read after a
// repeated start with ACK/NACK from the master, and NACK (no response) for another address.
module tb_i2c_slave;
  localparam logic [6:0] DEV = 7'h42;
  localparam realtime TQ = 75ns;  // quarter of the SCL period

  logic clk = 0, rst_n;
  logic scl, sda_m, sda_low, sda_in;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we;
  logic [7:0] regs [256];
  int checks = 0, failures = 0;

  i2c_slave #(.DEV_ADDR(DEV)) dut (.clk, .rst_n, .scl, .sda_in, .sda_low,
                                   .reg_addr, .reg_wdata, .reg_we, .reg_rdata);

  assign sda_in = sda_m & !sda_low;       // open-drain bus
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) if (reg_we) regs[reg_addr] <= reg_wdata;

  always #12.5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic i2c_start();
    sda_m = 1; #TQ; scl = 1; #TQ; sda_m = 0; #TQ; scl = 0; #TQ;
  endtask
  task automatic i2c_stop();
    sda_m = 0; #TQ; scl = 1; #TQ; sda_m = 1; #(2 * TQ);
  endtask
  task automatic put_bit(input logic b);
    sda_m = b; #TQ; scl = 1; #(2 * TQ); scl = 0; #TQ;
  endtask
  task automatic get_bit(output logic b);
    sda_m = 1; #TQ; scl = 1; #TQ; b = sda_in; #TQ; scl = 0; #TQ;
  endtask
  task automatic put_byte(input logic [7:0] v, output logic ack);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(a);
    ack = !a;
  endtask
  task automatic get_byte(output logic [7:0] v, input logic ack);
    for (int i = 7; i >= 0; i--) get_bit(v[i]);
    put_bit(!ack);
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack;
    logic [7:0] v, base;
    logic [7:0] wr [4];
    rst_n = 0; scl = 1; sda_m = 1;
    for (int i = 0; i < 256; i++) regs[i] = 8'($urandom);
    #100ns rst_n = 1;
    #500ns;
    repeat (4) begin
      // write 4 bytes from a random pointer
      base = 8'($urandom);
      for (int i = 0; i < 4; i++) wr[i] = 8'($urandom);
      i2c_start();
      put_byte({DEV, 1'b0}, ack); check(ack, "address ACK (write)");
      put_byte(base, ack);        check(ack, "pointer ACK");
      for (int i = 0; i < 4; i++) begin
        put_byte(wr[i], ack); check(ack, "data ACK");
      end
      i2c_stop();
      #200ns;
      for (int i = 0; i < 4; i++)
        check(regs[8'(base + i)] == wr[i], $sformatf("reg %h = %h expected %h", 8'(base + i), regs[8'(base + i)], wr[i]));
      // read them back plus one more after a repeated start
      i2c_start();
      put_byte({DEV, 1'b0}, ack); check(ack, "address ACK");
      put_byte(base, ack);        check(ack, "pointer ACK");
      i2c_start();
      put_byte({DEV, 1'b1}, ack); check(ack, "address ACK (read)");
      for (int i = 0; i < 5; i++) begin
        get_byte(v, i < 4);
        check(v == regs[8'(base + i)], $sformatf("read %h = %h expected %h", 8'(base + i), v, regs[8'(base + i)]));
      end
      i2c_stop();
    end
    // another device address: no ACK, no write
    begin
      logic [7:0] prev;
      prev = regs[8'h10];
      i2c_start();
      put_byte({7'h21, 1'b0}, ack); check(!ack, "no ACK for a foreign address");
      put_byte(8'h10, ack);
      put_byte(~prev, ack);
      i2c_stop();
      #200ns;
      check(regs[8'h10] == prev, "foreign transfer does not write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
