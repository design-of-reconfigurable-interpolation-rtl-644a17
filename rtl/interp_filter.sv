// interp_filter: reconfigurable interpolation filter, up-sampling by 2, 4 or 8.
//
// One input sample "in" is taken every L clocks and L output samples leave,
// one per clock, on y: the clock is the output sample clock. intp_sel
// (0010, 0100, 1000) picks L and with it the coefficient vector. rate_gen
// counts output phases and makes the input-rate strobes; the vector
// generation unit (vgu) keeps the last NVEC input samples of each rate; the
// coefficient selection unit (csu) gives the coefficient vector of the
// selected factor; the arithmetic unit (arith_unit) computes the polyphase
// output y(nL+p) = sum_k h(kL+p) x(n-k) for phase p = 0..L-1.
// Timing: in is sampled on the clock edge that ends a cycle with in_strobe
// high. y takes the outputs of that sample, phases 0..L-1, on the 1st to
// L-th rising edge after that edge, one per clock; y_phase gives the phase
// of the sample on y, and y_valid rises with the first output after reset.
// rst is synchronous, active high. The three units and the select are the
// document's; the strobe/valid handshake is this design's.
module interp_filter
  import rif_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic [3:0]              intp_sel,
  input  logic signed [DATA_W-1:0] in,
  output logic                    in_strobe,
  output logic signed [OUT_W-1:0] y,
  output logic [2:0]              y_phase,
  output logic                    y_valid
);

  logic                    ce2, ce4, ce8;
  logic [2:0]              phase;
  logic signed [DATA_W-1:0] dg   [NVEC];
  coef_t                   coef [NTAPS];
  logic                    have_sample;

  rate_gen u_rate (
    .clk       (clk),
    .rst       (rst),
    .intp_sel  (intp_sel),
    .ce2       (ce2),
    .ce4       (ce4),
    .ce8       (ce8),
    .phase     (phase),
    .in_strobe (in_strobe)
  );

  vgu u_vgu (
    .clk      (clk),
    .rst      (rst),
    .ce2      (ce2),
    .ce4      (ce4),
    .ce8      (ce8),
    .intp_sel (intp_sel),
    .xin      (in),
    .dg       (dg)
  );

  csu u_csu (
    .clk      (clk),
    .rst      (rst),
    .intp_sel (intp_sel),
    .coef     (coef)
  );

  arith_unit u_au (
    .clk      (clk),
    .rst      (rst),
    .load     (in_strobe),
    .intp_sel (intp_sel),
    .coef     (coef),
    .dg       (dg),
    .y        (y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      have_sample <= 1'b0;
      y_valid     <= 1'b0;
      y_phase     <= '0;
    end else begin
      if (in_strobe) have_sample <= 1'b1;
      y_valid <= have_sample;
      y_phase <= phase;
    end
  end

endmodule
