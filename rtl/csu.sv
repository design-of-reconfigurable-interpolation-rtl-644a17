// csu: coefficient selection unit.
//
// A read-only table holding one NTAPS-long coefficient vector for each rate
// factor (2, 4 and 8). Every clock the vector named by intp_sel is read and
// registered, so a new selection reaches coef[0..NTAPS-1] one clock after
// intp_sel changes ("selected in one cycle"). coef[k] is tap k, two's
// complement, COEF_W bits. rst (synchronous, active high) clears the output
// register. The vectors themselves are in rif_pkg. A table (ROM) rather than
// a tree of multiplexers follows the document; the factor-4 vector is the
// document's, the factor-2 vector is the document's floating-point design
// quantised by this design, and the factor-8 vector is this design's own.
module csu
  import rif_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] intp_sel,
  output coef_t      coef [NTAPS]
);

  coef_vec_t rom_word;

  always_comb begin
    case (factor_of(intp_sel))
      4:       rom_word = COEFS_L4;
      8:       rom_word = COEFS_L8;
      default: rom_word = COEFS_L2;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) coef[k] <= '0;
    end else begin
      coef <= rom_word;
    end
  end

endmodule
