// vgu: vector generation unit.
//
// Three delay chains of NVEC registers each take the input sample xin, one
// at each of the three input rates (strobes ce2, ce4, ce8 = CLK2, CLK4,
// CLK8). Register DFF[0] of a chain takes xin and DFF[i] takes DFF[i-1], so
// after a shift DFF[i] holds the input sample i input periods old. The NVEC
// register outputs of every chain are brought out as a bus and a 3:1
// multiplexer, steered by intp_sel, passes the bus of the selected factor to
// dg[0..NVEC-1] (DG[7:0]); dg[i] = x(n-i). dg is a register output, so it
// changes one clock after the strobe edge and stays for L clocks. Three
// chains, eight registers each and the 3:1 multiplexer follow the
// document's figure; shifting through the chain (rather than loading all
// registers from xin), the enables and the reset are this design's reading.
module vgu
  import rif_pkg::*;
#(
  parameter int DW = DATA_W,
  parameter int NV = NVEC
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce2,
  input  logic                 ce4,
  input  logic                 ce8,
  input  logic [3:0]           intp_sel,
  input  logic signed [DW-1:0] xin,
  output logic signed [DW-1:0] dg [NV]
);

  // chain 0: factor 2, chain 1: factor 4, chain 2: factor 8
  logic [DW-1:0] d [3][NV];
  logic [DW-1:0] q [3][NV];
  logic          ce [3];

  assign ce[0] = ce2;
  assign ce[1] = ce4;
  assign ce[2] = ce8;

  for (genvar c = 0; c < 3; c++) begin : g_chain
    assign d[c][0] = xin;
    for (genvar i = 1; i < NV; i++) begin : g_link
      assign d[c][i] = q[c][i-1];
    end
    for (genvar i = 0; i < NV; i++) begin : g_reg
      dff #(.W(DW)) u_dff (
        .clk (clk),
        .rst (rst),
        .en  (ce[c]),
        .d   (d[c][i]),
        .q   (q[c][i])
      );
    end
  end

  // MUX 3:1
  always_comb begin
    for (int i = 0; i < NV; i++) begin
      case (factor_of(intp_sel))
        4:       dg[i] = q[1][i];
        8:       dg[i] = q[2][i];
        default: dg[i] = q[0][i];
      endcase
    end
  end

endmodule
