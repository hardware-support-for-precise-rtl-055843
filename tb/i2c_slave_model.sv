// i2c_slave_model: behavioural I2C register device for testbenches (a
// stand-in for a transceiver's service-data memory or a synthesizer's
// control registers). 256 byte registers; the first byte written after the
// address sets the register pointer, further bytes are written with
// auto-increment; reads return registers from the pointer on. It
// acknowledges only its own 7-bit address. sda_s is its open-drain output
// (0 pulls low).
`timescale 1ns/1ps
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic scl,
  input  logic sda,
  output logic sda_s
);
  typedef enum {IDLE, ADDR_RX, WRITE_RX, READ_TX} st_e;
  st_e        st = IDLE;
  logic [7:0] regs [256];
  logic [7:0] ptr = 0, sh = 0, tx = 0;
  int         bitcnt = 0;
  bit         first = 0, acking = 0, m_ack = 0;
  int         n_start = 0, n_stop = 0, n_nack = 0;

  initial begin
    sda_s = 1'b1;
    foreach (regs[i]) regs[i] = 8'(i * 3 + 1);
  end

  always @(negedge sda) if (scl) begin
    st = ADDR_RX; bitcnt = 0; acking = 0; sda_s = 1'b1; n_start++;
  end
  always @(posedge sda) if (scl) begin
    st = IDLE; sda_s = 1'b1; n_stop++;
  end

  always @(posedge scl) begin
    if (st == ADDR_RX || st == WRITE_RX) begin
      if (bitcnt < 8) sh = {sh[6:0], sda};
      bitcnt++;
    end else if (st == READ_TX) begin
      if (bitcnt == 8) m_ack = !sda;
      bitcnt++;
    end
  end

  always @(negedge scl) begin
    if (st == ADDR_RX || st == WRITE_RX) begin
      if (bitcnt == 8) begin
        // acknowledge slot
        if (st == WRITE_RX || sh[7:1] == ADDR) sda_s = 1'b0;
        else begin n_nack++; st = IDLE; end
      end else if (bitcnt == 9) begin
        sda_s = 1'b1;
        bitcnt = 0;
        if (st == ADDR_RX) begin
          if (sh[0]) begin
            st = READ_TX; tx = regs[ptr]; ptr++; sda_s = tx[7];
          end else begin
            st = WRITE_RX; first = 1;
          end
        end else begin
          if (first) ptr = sh;
          else begin regs[ptr] = sh; ptr++; end
          first = 0;
        end
      end
    end else if (st == READ_TX) begin
      if (bitcnt < 8) sda_s = tx[7 - bitcnt];
      else if (bitcnt == 8) sda_s = 1'b1;
      else begin
        bitcnt = 0;
        if (m_ack) begin tx = regs[ptr]; ptr++; sda_s = tx[7]; end
        else st = IDLE;
      end
    end
  end
endmodule
