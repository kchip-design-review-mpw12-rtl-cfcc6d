// tb_adc_demux: self-checking test of adc_demux.
// Each clock the bus words for the high half (captured by the falling edge) and for the low
// half (captured by the next rising edge) are random. After that rising edge the four
// channels must show: ch0 = bus0 high-half word, ch1 = bus0 low-half word, ch2 and ch3 the
// same for bus 1.
module tb_adc_demux;
  import kchip_pkg::*;
  logic clk = 0;
  logic rst_n;
  logic [ADC_W-1:0] adc_bus [2];
  logic [ADC_W-1:0] ch [NPACE];
  logic [ADC_W-1:0] hi0, hi1, lo0, lo1;
  int checks = 0, failures = 0;

  adc_demux dut (.clk, .rst_n, .adc_bus, .ch);

  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    adc_bus[0] = '0; adc_bus[1] = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    repeat (500) begin
      @(posedge clk);
      #3;
      hi0 = ADC_W'($urandom); hi1 = ADC_W'($urandom);
      adc_bus[0] = hi0; adc_bus[1] = hi1;
      @(negedge clk);
      #3;
      lo0 = ADC_W'($urandom); lo1 = ADC_W'($urandom);
      adc_bus[0] = lo0; adc_bus[1] = lo1;
      @(posedge clk);
      #1;
      checks++;
      if (ch[0] != hi0 || ch[1] != lo0 || ch[2] != hi1 || ch[3] != lo1) begin
        failures++;
        $display("FAIL: ch=%h %h %h %h expected %h %h %h %h", ch[0], ch[1], ch[2], ch[3],
                 hi0, lo0, hi1, lo1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
