// rate_gen: derives the slow input-rate strobes CLK2, CLK4 and CLK8 and the
// output phase from the single output-rate clock.
//
// A free-running 3-bit counter counts output-rate cycles. ce2, ce4 and ce8
// are one-cycle strobes in the last cycle of every 2, 4 and 8 cycles
// (counter mod L = L-1); the delay chain of factor L shifts on that edge, so
// it runs at 1/L of the output rate, which is what the divided clocks
// "CLK 2/4/8" of the vector generation unit do. For the factor picked by
// intp_sel, phase = counter mod L numbers the L output samples produced from
// one input sample, and in_strobe is that factor's strobe: the input sample
// is taken on the clock edge that ends an in_strobe cycle. rst (synchronous,
// active high) clears the counter. The named clocks are the document's; a
// counter with clock enables instead of divided clocks is this design's choice.
module rate_gen
  import rif_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] intp_sel,
  output logic       ce2,
  output logic       ce4,
  output logic       ce8,
  output logic [2:0] phase,
  output logic       in_strobe
);

  logic [2:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 3'd1;
  end

  always_comb begin
    ce2 = (cnt[0]   == 1'b1);
    ce4 = (cnt[1:0] == 2'b11);
    ce8 = (cnt      == 3'b111);
    case (factor_of(intp_sel))
      4:       begin phase = {1'b0, cnt[1:0]};  in_strobe = ce4; end
      8:       begin phase = cnt;               in_strobe = ce8; end
      default: begin phase = {2'b00, cnt[0]};   in_strobe = ce2; end
    endcase
  end

endmodule
