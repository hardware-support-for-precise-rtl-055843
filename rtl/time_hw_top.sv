// time_hw_top: the two pieces of time-distribution hardware side by side,
// each with its own ports: the IEEE 1588 timestamper (on an MII link) and
// the interpolating time-measurement device (PPS hits, interval output,
// record stream and I2C port towards the daughter card's transceivers and
// frequency synthesizer). They share only the reset: the timestamper runs
// on its MII clock (25 MHz for 100 Mb/s, which is also its reference, 40 ns
// per tick) and the measurement device on its 200 MHz reference clock.
`timescale 1ns/1ps
module time_hw_top
  import ts_pkg::*;
(
  input  logic        rst_n,
  // --- IEEE 1588 timestamper ---
  input  logic        ts_clk,
  input  match_cfg_t  ts_cfg,
  input  logic        rx_dv,
  input  logic        rx_er,
  input  logic [3:0]  rxd,
  input  logic        tx_en,
  input  logic        tx_er,
  input  logic [3:0]  txd,
  output logic [TS_W-1:0] ts_time,
  output logic [31:0] ts_out_data,
  output logic        ts_out_valid,
  input  logic        ts_out_ready,
  output logic        ts_out_last,
  output logic [15:0] ts_n_rx_matched,
  output logic [15:0] ts_n_tx_matched,
  output logic [15:0] ts_n_ignored,
  output logic [15:0] ts_n_overflow,
  // --- time-measurement device ---
  input  logic        tm_clk,
  input  logic [1:0]  pps_hit,
  output logic        tm_iv_valid,
  output logic signed [63:0] tm_iv_ps,
  output logic [31:0] tm_out_data,
  output logic        tm_out_valid,
  input  logic        tm_out_ready,
  output logic        tm_out_last,
  output logic [15:0] tm_n_overflow,
  input  logic        i2c_cmd_valid,
  output logic        i2c_cmd_ready,
  input  logic        i2c_cmd_read,
  input  logic [6:0]  i2c_cmd_dev,
  input  logic [7:0]  i2c_cmd_reg,
  input  logic [7:0]  i2c_cmd_wdata,
  output logic        i2c_done,
  output logic        i2c_ack_err,
  output logic [7:0]  i2c_rdata,
  output logic        scl_o,
  output logic        sda_o,
  input  logic        sda_i
);
  ptp_timestamper u_ts (
    .clk(ts_clk), .rst_n, .cfg(ts_cfg),
    .rx_dv, .rx_er, .rxd, .tx_en, .tx_er, .txd,
    .time_now(ts_time),
    .out_data(ts_out_data), .out_valid(ts_out_valid), .out_ready(ts_out_ready),
    .out_last(ts_out_last),
    .n_rx_matched(ts_n_rx_matched), .n_tx_matched(ts_n_tx_matched),
    .n_ignored(ts_n_ignored), .n_overflow(ts_n_overflow));

  time_meas_device u_tm (
    .clk(tm_clk), .rst_n, .hit(pps_hit),
    .iv_valid(tm_iv_valid), .iv_ps(tm_iv_ps),
    .out_data(tm_out_data), .out_valid(tm_out_valid), .out_ready(tm_out_ready),
    .out_last(tm_out_last), .n_overflow(tm_n_overflow),
    .i2c_cmd_valid, .i2c_cmd_ready, .i2c_cmd_read, .i2c_cmd_dev, .i2c_cmd_reg,
    .i2c_cmd_wdata, .i2c_done, .i2c_ack_err, .i2c_rdata, .scl_o, .sda_o, .sda_i);
endmodule
