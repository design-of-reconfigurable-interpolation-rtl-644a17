// dff: W-bit D flip-flop register with clock enable and synchronous reset.
//
// The vector generation unit builds its delay chains from these registers.
// On a rising clock edge q takes d when en is high; rst (active high,
// synchronous) clears q to zero and takes priority over en. Output q is
// available one clock after the edge that captured it. The register itself
// is the document's; the enable and the synchronous clear are this design's
// choice, the enable standing in for the divided clocks the document draws.
module dff #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
