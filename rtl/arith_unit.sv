// arith_unit: arithmetic unit of the interpolation filter.
//
// The coefficient vector from the coefficient selection unit enters a PISO
// register that hands out, in output phase p, the coefficients of polyphase
// sub-filter p (h(p), h(p+L), ...). NVEC shift-and-add multipliers form
// out[k] = dg[k] * cs[k], where dg[k] = x(n-k) comes from the vector
// generation unit, and a binary adder tree (8 -> 4 -> 2 -> 1) sums them:
//   y(nL + p) = sum_k h(kL + p) * x(n - k).
// The sum is registered into y, so y is the output sample of the phase
// presented one clock earlier; a new output leaves every clock. load (high
// in the last phase of an input period) reloads the PISO. rst is
// synchronous, active high. The PISO, multipliers and adders are the
// document's; eight parallel multipliers and the registered output are this
// design's reading. The coefficient tables keep |y| below 2^(OW-1) for any
// DW-bit input, which an assertion checks.
module arith_unit
  import rif_pkg::*;
#(
  parameter int DW = DATA_W,
  parameter int CW = COEF_W,
  parameter int NT = NTAPS,
  parameter int NV = NVEC,
  parameter int OW = OUT_W,
  localparam int PW = DW + CW - 1,
  localparam int LV = $clog2(NV),
  localparam int NP = 1 << LV,
  localparam int SW = PW + LV
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [3:0]           intp_sel,
  input  logic signed [CW-1:0] coef [NT],
  input  logic signed [DW-1:0] dg   [NV],
  output logic signed [OW-1:0] y
);

  logic signed [CW-1:0] cs  [NV];
  logic signed [PW-1:0] out [NV];
  logic signed [SW-1:0] q   [LV+1][NP];
  logic signed [SW-1:0] sum;

  piso #(.NT(NT), .NV(NV), .CW(CW)) u_piso (
    .clk      (clk),
    .rst      (rst),
    .load     (load),
    .intp_sel (intp_sel),
    .cin      (coef),
    .cs       (cs)
  );

  for (genvar k = 0; k < NV; k++) begin : g_mult
    shift_add_mult #(.DW(DW), .CW(CW)) u_mult (
      .x (dg[k]),
      .c (cs[k]),
      .p (out[k])
    );
  end

  // adder tree
  always_comb begin
    for (int j = 0; j < NP; j++) q[0][j] = (j < NV) ? SW'(out[j]) : '0;
    for (int l = 1; l <= LV; l++) begin
      for (int j = 0; j < NP; j++) begin
        if (j < (NP >> l)) q[l][j] = q[l-1][2*j] + q[l-1][2*j+1];
        else               q[l][j] = '0;
      end
    end
    sum = q[LV][0];
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= OW'(sum);
  end

  a_out_fits: assert property (@(posedge clk) disable iff (rst)
    (sum <= SW'((64'sd1 <<< (OW-1)) - 1)) && (sum >= -SW'(64'sd1 <<< (OW-1))))
    else $error("arith_unit: output sum exceeds %0d bits", OW);

endmodule
