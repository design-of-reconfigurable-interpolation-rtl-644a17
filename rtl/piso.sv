// piso: parallel-in serial-out coefficient register of the arithmetic unit.
//
// The full coefficient vector is loaded in parallel (load high on the clock
// edge that ends an input period) and then rotated by one tap per clock. For
// rate factor L, output cs[k] is register position k*L, so after p rotations
// it carries tap k*L + p: in output phase p the NVEC outputs are exactly the
// coefficients of polyphase sub-filter p, h(p), h(p+L), h(p+2L), ... Outputs
// k >= NT/L are zero, since sub-filters of factors 4 and 8 have only 4 and 2
// taps. So the L sub-filters are served serially, one per output clock, from
// a single parallel load. The block's name and place are the document's;
// that it serialises sub-filter coefficient sets this way is this design's
// reading. rst (synchronous, active high) clears the register.
module piso
  import rif_pkg::*;
#(
  parameter int NT = NTAPS,
  parameter int NV = NVEC,
  parameter int CW = COEF_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic [3:0]           intp_sel,
  input  logic signed [CW-1:0] cin [NT],
  output logic signed [CW-1:0] cs  [NV]
);

  logic signed [CW-1:0] r [NT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NT; i++) r[i] <= '0;
    end else if (load) begin
      r <= cin;
    end else begin
      for (int i = 0; i < NT; i++) r[i] <= r[(i + 1) % NT];
    end
  end

  always_comb begin
    int unsigned l;
    l = factor_of(intp_sel);
    for (int k = 0; k < NV; k++) begin
      if (k * l < NT) cs[k] = r[(k * l) % NT];
      else            cs[k] = '0;
    end
  end

endmodule
