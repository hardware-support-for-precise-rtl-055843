// ptp_msg_composer: the packet logic of the timestamper. At the SFD event
// it copies the free-running counter into a holding register; when the
// analyzer's verdict for that frame arrives and it is a match, it composes a
// ts_record_t (direction, messageType, sequenceId, timestamp) and presents
// it for one cycle on rec_valid. A non-matching frame discards the held
// timestamp. The held value is the counter as seen in the cycle after the
// delimiter nibble, a fixed offset that the higher logic may subtract.
// What the record contains is this design's choice; the capture at the SFD
// and the composition on a match follow the timestamper description.
`timescale 1ns/1ps
module ptp_msg_composer
  import ts_pkg::*;
#(
  parameter bit DIR = 1'b0   // 0: receive channel, 1: transmit channel
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] count,
  input  logic            sfd,
  input  logic            res_valid,
  input  logic            res_match,
  input  ptp_info_t       res_info,
  output logic            rec_valid,
  output ts_record_t      rec,
  output logic [15:0]     n_matched,   // frames timestamped
  output logic [15:0]     n_ignored    // frames that did not match
);
  logic [TS_W-1:0] ts_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_hold   <= '0;
      rec_valid <= 1'b0;
      rec       <= '0;
      n_matched <= '0;
      n_ignored <= '0;
    end else begin
      rec_valid <= 1'b0;
      if (sfd) ts_hold <= count;
      if (res_valid) begin
        if (res_match) begin
          rec_valid    <= 1'b1;
          rec.dir      <= DIR;
          rec.rsvd     <= '0;
          rec.msg_type <= res_info.msg_type;
          rec.rsvd2    <= '0;
          rec.seq_id   <= res_info.seq_id;
          rec.ts       <= ts_hold;
          n_matched    <= n_matched + 16'd1;
        end else begin
          n_ignored    <= n_ignored + 16'd1;
        end
      end
    end
  end
endmodule
