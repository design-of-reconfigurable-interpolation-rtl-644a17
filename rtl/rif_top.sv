// rif_top: reconfigurable multirate filter top level.
//
// Two independent filters share nothing but the clock and reset: the
// reconfigurable interpolation filter (up-sampling by 2, 4 or 8, one input
// every L clocks, one output every clock) and the decimation filter (one
// input every clock, one output every M clocks). Each has its own factor
// select and its own ports; see interp_filter and decim_filter for the
// timing. rst is synchronous, active high.
module rif_top
  import rif_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  // interpolation filter
  input  logic [3:0]               intp_sel,
  input  logic signed [DATA_W-1:0] in,
  output logic                     in_strobe,
  output logic signed [OUT_W-1:0]  y,
  output logic [2:0]               y_phase,
  output logic                     y_valid,
  // decimation filter
  input  logic [3:0]               dec_sel,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [25:0]       dout,
  output logic                     dout_valid
);

  interp_filter u_interp (
    .clk       (clk),
    .rst       (rst),
    .intp_sel  (intp_sel),
    .in        (in),
    .in_strobe (in_strobe),
    .y         (y),
    .y_phase   (y_phase),
    .y_valid   (y_valid)
  );

  decim_filter #(.DOW(26)) u_decim (
    .clk        (clk),
    .rst        (rst),
    .dec_sel    (dec_sel),
    .din        (din),
    .dout       (dout),
    .dout_valid (dout_valid)
  );

endmodule
