// interval_calc: turns a START and a STOP timestamp of the interpolating
// counter into a time interval. A timestamp is (coarse n, fine f): n is the
// reference-clock count sampled at the clock edge after the event and f the
// number of delay elements the event had passed at that edge, so the event
// lies f*tau before the edge. The interval is
//   T = (n_STOP - n_START) * T_REF_PS - (f_STOP - f_START) * TAU_PS   [ps],
// the coarse count n*T_ref refined by the tapped-delay-line reading. A
// START timestamp is held until the next STOP timestamp arrives (both may
// arrive in the same clock); the interval follows one clock later
// (iv_valid). A STOP without a preceding START is ignored. tau is the
// nominal element delay (no calibration of the line). The formula follows
// the coarse counter and tapped-delay-line methods; the channel roles and
// the uncalibrated tau are this design's choices.
`timescale 1ns/1ps
module interval_calc #(
  parameter int unsigned CW       = 48,
  parameter int unsigned FW       = 9,
  parameter int unsigned T_REF_PS = 5000,
  parameter int unsigned TAU_PS   = 25
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_valid,
  input  logic [CW-1:0]       start_coarse,
  input  logic [FW-1:0]       start_fine,
  input  logic                stop_valid,
  input  logic [CW-1:0]       stop_coarse,
  input  logic [FW-1:0]       stop_fine,
  output logic                iv_valid,
  output logic signed [63:0]  iv_ps
);
  logic          have_start;
  logic [CW-1:0] c0, cs;
  logic [FW-1:0] f0, fs;

  // the START in force: a new one, else the held one
  assign cs = start_valid ? start_coarse : c0;
  assign fs = start_valid ? start_fine   : f0;

  logic signed [63:0] dn, df;
  assign dn = 64'(signed'({1'b0, stop_coarse}) - signed'({1'b0, cs}));
  assign df = 64'(signed'({1'b0, stop_fine})   - signed'({1'b0, fs}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_start <= 1'b0; c0 <= '0; f0 <= '0;
      iv_valid <= 1'b0; iv_ps <= '0;
    end else begin
      iv_valid <= 1'b0;
      if (start_valid) begin
        c0 <= start_coarse; f0 <= start_fine;
      end
      if (stop_valid && (have_start || start_valid)) begin
        have_start <= 1'b0;
        iv_valid   <= 1'b1;
        iv_ps      <= dn * 64'(T_REF_PS) - df * 64'(TAU_PS);
      end else if (start_valid) have_start <= 1'b1;
    end
  end
endmodule
