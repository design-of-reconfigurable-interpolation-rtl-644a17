// shift_add_mult: multiplier-less product of a data sample and a coded
// coefficient.
//
// The two's-complement coefficient c is first coded as a sign and a
// (CW-1)-bit magnitude. The magnitude is split into NDIG two-bit digits; for
// digit i multiplexer M_i picks 0, a, 2a or 3a with a = x * 4^i (x shifted
// left by 2i), so each multiplexer covers the two neighbouring powers of two
// of its digit, M0 the least significant. The NDIG multiplexer outputs are
// summed by a binary adder tree (8 -> 4 -> 2 -> 1) and the sum, |c| * x, is
// passed straight or through a two's complement stage by a final
// multiplexer steered by the sign. The result p = x * c is exact and
// combinational (no clock). Multiplexers over shifted data, the adder tree
// and the two's-complement output multiplexer are the document's; the digit
// coding with a 3a input, integer weights (the document scales the same sum
// as a fraction) and the clamp of the most negative coefficient to
// -(2^(CW-1)-1) are this design's.
module shift_add_mult
  import rif_pkg::*;
#(
  parameter int DW = DATA_W,
  parameter int CW = COEF_W,
  localparam int PW = DW + CW - 1,
  localparam int NDIG = (CW - 1 + 1) / 2,
  localparam int LV = $clog2(NDIG),
  localparam int NP = 1 << LV
) (
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] c,
  output logic signed [PW-1:0] p
);

  logic                 sgn;
  logic        [CW-2:0] mag;
  logic signed [PW-1:0] pp  [NDIG];
  logic signed [PW-1:0] tr  [LV+1][NP];
  logic signed [PW-1:0] sum;

  // coefficient coding: sign and magnitude
  always_comb begin
    sgn  = c[CW-1];
    if (c == {1'b1, {(CW-1){1'b0}}}) mag = '1;          // clamp most negative value
    else if (sgn)                     mag = ~c[CW-2:0] + (CW-1)'(1); // |c|
    else                              mag = c[CW-2:0];
  end

  // multiplexers M0..M(NDIG-1)
  always_comb begin
    logic signed [PW-1:0] a;
    logic        [1:0]    dig;
    for (int i = 0; i < NDIG; i++) begin
      a   = PW'(x) <<< (2 * i);
      dig = 2'(mag >> (2 * i));
      case (dig)
        2'd0: pp[i] = '0;
        2'd1: pp[i] = a;
        2'd2: pp[i] = a <<< 1;
        2'd3: pp[i] = a + (a <<< 1);
      endcase
    end
  end

  // adder tree: level 0 holds the multiplexer outputs, each level adds pairs
  always_comb begin
    for (int j = 0; j < NP; j++) tr[0][j] = (j < NDIG) ? pp[j] : '0;
    for (int l = 1; l <= LV; l++) begin
      for (int j = 0; j < NP; j++) begin
        if (j < (NP >> l)) tr[l][j] = tr[l-1][2*j] + tr[l-1][2*j+1];
        else               tr[l][j] = '0;
      end
    end
    sum = tr[LV][0];
  end

  // two's complement stage and sign multiplexer
  assign p = sgn ? -sum : sum;

endmodule
