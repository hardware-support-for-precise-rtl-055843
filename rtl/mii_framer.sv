// mii_framer: listens to one direction of an MII (PHY <-> MAC) nibble
// stream and turns it into frame events and bytes.
// While dv is high the PHY delivers one nibble per clock, low nibble first.
// The framer waits for the preamble (nibble 0x5, at least one) followed by
// the 0xD nibble that completes the start-of-frame delimiter 0xD5; the clock
// in which that nibble is seen is the timestamp event (sfd is high for that
// one cycle). From then on every two nibbles form one byte (byte_valid
// pulses on the high nibble). frame_end pulses in the cycle dv falls after
// a delimited frame; frame_err reports that er was seen during the frame.
// A dv burst without a valid delimiter is ignored. The MII nibble order and
// the delimiter are those of IEEE 802.3; the event definition (the SFD
// nibble) follows the timestamper description.
`timescale 1ns/1ps
module mii_framer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dv,         // RX_DV or TX_EN
  input  logic       er,         // RX_ER or TX_ER
  input  logic [3:0] d,          // RXD or TXD
  output logic       sfd,        // start-of-frame delimiter event
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_end,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_DROP} state_e;
  state_e     state;
  logic       hi_nib;   // next data nibble is the high one
  logic [3:0] lo_q;
  logic       err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      hi_nib     <= 1'b0;
      lo_q       <= '0;
      err_q      <= 1'b0;
      sfd        <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
      frame_end  <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sfd        <= 1'b0;
      byte_valid <= 1'b0;
      frame_end  <= 1'b0;
      unique case (state)
        S_IDLE: if (dv) state <= (d == 4'h5) ? S_PRE : S_DROP;
        S_PRE: begin
          if (!dv)              state <= S_IDLE;
          else if (d == 4'hD) begin
            state  <= S_DATA;
            sfd    <= 1'b1;
            hi_nib <= 1'b0;
            err_q  <= er;
          end else if (d != 4'h5) state <= S_DROP;
        end
        S_DATA: begin
          if (!dv) begin
            state     <= S_IDLE;
            frame_end <= 1'b1;
            frame_err <= err_q;
          end else begin
            err_q  <= err_q | er;
            hi_nib <= !hi_nib;
            if (!hi_nib) lo_q <= d;
            else begin
              byte_valid <= 1'b1;
              byte_data  <= {d, lo_q};
            end
          end
        end
        S_DROP: if (!dv) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
