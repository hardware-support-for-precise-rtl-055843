// time_meas_device: FPGA time-measurement device with carry-chain
// interpolation, one of a pair that exchanges PPS (pulse per second)
// signals over a DWDM link to compare reference clocks at a distance.
// A coarse free_counter counts reference-clock periods. Each of NCH hit
// inputs has its own tapped delay line (tdl_carry_chain), catch_register
// and pipelined priority encoder (prio_encoder_pipe); a hit yields the
// coarse count and the fine count of delay elements, i.e. its time to
// within tau. Channel 0 is the START (local PPS), channel 1 the STOP
// (received PPS); interval_calc forms their difference in picoseconds.
// Every timestamp is also stored and sent as a record {channel, fine,
// coarse} through output_logic as three 32-bit words. The i2c_master
// serves the transceivers and the synthesizer. Hit to record: 4 clocks of
// catch and encoder plus 2 of merging. The block structure follows the
// device's block diagram; sizes, record format and interfaces are this
// design's choices. The delay lines are behavioural models, so this module
// simulates but is not a synthesis source for them.
`timescale 1ns/1ps
module time_meas_device #(
  parameter int unsigned NCH        = 2,
  parameter int unsigned NTAPS      = 256,
  parameter int unsigned G          = 16,
  parameter int unsigned TAU_PS     = 25,
  parameter int unsigned T_REF_PS   = 5000,   // 200 MHz reference
  parameter int unsigned CW         = 48,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned QDIV       = 500     // 200 MHz / 400 kHz
) (
  input  logic            clk,       // reference clock
  input  logic            rst_n,
  input  logic [NCH-1:0]  hit,       // asynchronous events (PPS)
  // measured interval, STOP - START
  output logic            iv_valid,
  output logic signed [63:0] iv_ps,
  // timestamp record stream
  output logic [31:0]     out_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic            out_last,
  output logic [15:0]     n_overflow,
  // I2C service port
  input  logic            i2c_cmd_valid,
  output logic            i2c_cmd_ready,
  input  logic            i2c_cmd_read,
  input  logic [6:0]      i2c_cmd_dev,
  input  logic [7:0]      i2c_cmd_reg,
  input  logic [7:0]      i2c_cmd_wdata,
  output logic            i2c_done,
  output logic            i2c_ack_err,
  output logic [7:0]      i2c_rdata,
  output logic            scl_o,
  output logic            sda_o,
  input  logic            sda_i
);
  localparam int unsigned FW    = $clog2(NTAPS + 1);
  localparam int unsigned REC_W = 8 + 16 + CW;

  logic [CW-1:0] coarse_now;
  free_counter #(.W(CW), .INC(1)) u_coarse (
    .clk, .rst_n, .en(1'b1), .count(coarse_now));

  logic [NCH-1:0] ts_v;
  logic [FW-1:0]  ts_f [NCH];
  logic [CW-1:0]  ts_c [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [NTAPS-1:0] taps, code;
    logic [CW-1:0]    cc, cc_d1, cc_d2;
    logic             hv;
    tdl_carry_chain #(.NTAPS(NTAPS), .TAU_PS(TAU_PS)) u_tdl (.hit(hit[c]), .taps);
    catch_register #(.NTAPS(NTAPS), .CW(CW)) u_catch (
      .clk, .rst_n, .taps, .coarse_in(coarse_now),
      .hit_valid(hv), .code, .coarse(cc));
    prio_encoder_pipe #(.N(NTAPS), .G(G)) u_enc (
      .clk, .rst_n, .in_valid(hv), .code, .out_valid(ts_v[c]), .fine(ts_f[c]));
    // align the coarse count with the encoder's two-stage latency
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin cc_d1 <= '0; cc_d2 <= '0; end
      else        begin cc_d1 <= cc;  cc_d2 <= cc_d1; end
    assign ts_c[c] = cc_d2;
  end

  interval_calc #(.CW(CW), .FW(FW), .T_REF_PS(T_REF_PS), .TAU_PS(TAU_PS)) u_iv (
    .clk, .rst_n,
    .start_valid(ts_v[0]), .start_coarse(ts_c[0]), .start_fine(ts_f[0]),
    .stop_valid(ts_v[1]),  .stop_coarse(ts_c[1]),  .stop_fine(ts_f[1]),
    .iv_valid, .iv_ps);

  // merge the channels' timestamps into the output logic, lowest first
  logic [NCH-1:0]   pend;
  logic [REC_W-1:0] pend_r [NCH];
  logic             mrg_valid;
  logic [REC_W-1:0] mrg_rec;
  logic [15:0]      n_ovf_merge, n_ovf_fifo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0; mrg_valid <= 1'b0; mrg_rec <= '0; n_ovf_merge <= '0;
      for (int c = 0; c < NCH; c++) pend_r[c] <= '0;
    end else begin
      logic [NCH-1:0] freed;
      freed = '0;
      for (int c = NCH - 1; c >= 0; c--)
        if (pend[c]) freed = NCH'(1) << c;   // lowest pending wins
      mrg_valid <= 1'b0;
      for (int c = 0; c < NCH; c++)
        if (freed[c]) begin mrg_valid <= 1'b1; mrg_rec <= pend_r[c]; pend[c] <= 1'b0; end
      for (int c = 0; c < NCH; c++)
        if (ts_v[c]) begin
          if (!pend[c] || freed[c]) begin
            pend[c]   <= 1'b1;
            pend_r[c] <= {8'(c), 16'(ts_f[c]), ts_c[c]};
          end else n_ovf_merge <= n_ovf_merge + 16'd1;
        end
    end
  end

  output_logic #(.REC_W(REC_W), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .rec_valid(mrg_valid), .rec(mrg_rec),
    .out_data, .out_valid, .out_ready, .out_last,
    .n_overflow(n_ovf_fifo), .level());
  assign n_overflow = n_ovf_merge + n_ovf_fifo;

  i2c_master #(.QDIV(QDIV)) u_i2c (
    .clk, .rst_n, .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready),
    .cmd_read(i2c_cmd_read), .cmd_dev(i2c_cmd_dev), .cmd_reg(i2c_cmd_reg),
    .cmd_wdata(i2c_cmd_wdata), .done(i2c_done), .ack_err(i2c_ack_err),
    .rdata(i2c_rdata), .scl_o, .sda_o, .sda_i);
endmodule
