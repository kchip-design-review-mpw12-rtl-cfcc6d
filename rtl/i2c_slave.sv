// i2c_slave: I2C interface to the internal registers.
//
// SCL and SDA are sampled with the system clock through two-stage synchronisers; start, stop
// and SCL edges are detected from the synchronised levels (at 40 MHz an SCL period at the
// 3.33 Mbit/s the description quotes is 12 clocks, enough for this oversampling). Protocol:
//   write: S, {DEV_ADDR, 0}, A, pointer, A, data, A, data, A ... P   (pointer auto-increments)
//   read:  S, {DEV_ADDR, 0}, A, pointer, A, Sr, {DEV_ADDR, 1}, A, data, A, data, ..., NA, P
// A read without a pointer byte continues from the last pointer. SDA is open drain: sda_low
// high means pull SDA low. Register side: reg_addr is the pointer, reg_we pulses for one clock
// with reg_wdata, reg_rdata is read combinationally when a byte is loaded for sending.
// The I2C access to all registers follows the description; the device address, the pointer
// protocol and the oversampling are this design's choice.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h42
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_low,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  output logic       reg_we,
  input  logic [7:0] reg_rdata
);

  typedef enum logic [3:0] {
    I_IDLE, I_ADDR, I_ADDR_ACK, I_PTR, I_PTR_ACK, I_WDATA, I_WDATA_ACK, I_RDATA, I_RDATA_ACK
  } istate_e;

  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c, sda_v;
  istate_e    st;
  logic [7:0] sh;
  logic [3:0] bitcnt;
  logic       rw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111;
      sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign sda_v    = sda_s[1];
  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c   = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= I_IDLE;
      sh        <= '0;
      bitcnt    <= '0;
      rw        <= 1'b0;
      sda_low   <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_we    <= 1'b0;
    end else begin
      reg_we <= 1'b0;
      if (start_c) begin
        st      <= I_ADDR;
        bitcnt  <= '0;
        sda_low <= 1'b0;
      end else if (stop_c) begin
        st      <= I_IDLE;
        sda_low <= 1'b0;
      end else if (scl_rise) begin
        case (st)
          I_ADDR, I_PTR, I_WDATA: begin
            sh     <= {sh[6:0], sda_v};
            bitcnt <= bitcnt + 1'b1;
          end
          I_RDATA_ACK: begin
            if (sda_v) st <= I_IDLE;              // master NACK: stop sending
            else       reg_addr <= reg_addr + 1'b1;
          end
          default: ;
        endcase
      end else if (scl_fall) begin
        case (st)
          I_ADDR: if (bitcnt == 4'd8) begin
            if (sh[7:1] == DEV_ADDR) begin
              sda_low <= 1'b1;
              rw      <= sh[0];
              st      <= I_ADDR_ACK;
            end else begin
              st <= I_IDLE;
            end
          end
          I_PTR: if (bitcnt == 4'd8) begin
            reg_addr <= sh;
            sda_low  <= 1'b1;
            st       <= I_PTR_ACK;
          end
          I_WDATA: if (bitcnt == 4'd8) begin
            reg_wdata <= sh;
            reg_we    <= 1'b1;
            sda_low   <= 1'b1;
            st        <= I_WDATA_ACK;
          end
          I_ADDR_ACK, I_RDATA_ACK: begin
            if (st == I_RDATA_ACK || rw) begin
              sh      <= reg_rdata;
              sda_low <= !reg_rdata[7];
              bitcnt  <= 4'd1;
              st      <= I_RDATA;
            end else begin
              sda_low <= 1'b0;
              bitcnt  <= '0;
              st      <= I_PTR;
            end
          end
          I_PTR_ACK: begin
            sda_low <= 1'b0;
            bitcnt  <= '0;
            st      <= I_WDATA;
          end
          I_WDATA_ACK: begin
            sda_low  <= 1'b0;
            bitcnt   <= '0;
            reg_addr <= reg_addr + 1'b1;
            st       <= I_WDATA;
          end
          I_RDATA: begin
            if (bitcnt == 4'd8) begin
              sda_low <= 1'b0;
              st      <= I_RDATA_ACK;
            end else begin
              sh      <= {sh[6:0], 1'b0};
              sda_low <= !sh[6];
              bitcnt  <= bitcnt + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
