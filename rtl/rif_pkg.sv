// rif_pkg: types and constants shared by the reconfigurable interpolation
// filter and the decimation filter.
//
// Sizes: 16-bit input samples, 16 filter taps, 17-bit two's-complement
// coefficients (sign plus a 16-bit magnitude), 8 data vectors out of the
// vector generation unit and a 24-bit filter output. The rate factor is
// carried on a 4-bit select whose value is the factor itself (0010 = 2,
// 0100 = 4, 1000 = 8). The three coefficient vectors held by the coefficient
// selection unit are defined here as constants so that the ROM and the
// testbenches use one copy.
package rif_pkg;

  localparam int DATA_W = 16;   // input sample width
  localparam int COEF_W = 17;   // coefficient width, two's complement
  localparam int NTAPS  = 16;   // filter length
  localparam int NVEC   = 8;    // data vectors out of the VGU (= registers per chain)
  localparam int OUT_W  = 24;   // interpolation filter output width

  // Rate factor select, value equals the factor.
  typedef enum logic [3:0] {
    INTP2 = 4'b0010,
    INTP4 = 4'b0100,
    INTP8 = 4'b1000
  } intp_sel_e;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Factor as a number; any code other than 4 or 8 is treated as factor 2.
  function automatic int unsigned factor_of(input logic [3:0] sel);
    case (sel)
      4'b0100: return 4;
      4'b1000: return 8;
      default: return 2;
    endcase
  endfunction

  // Coefficient vectors, tap 0 first.
  // Factor 2: 11-tap half-band-like design (order 10) quantised as
  //   round(h * 256), padded with zeros to 16 taps.
  // Factor 4: 16-tap symmetric vector.
  // Factor 8: first-order (linear) interpolator, h(k) = 4*(8-|k-7|), k = 0..14.
  typedef coef_t coef_vec_t [NTAPS];

  localparam coef_vec_t COEFS_L2 = '{
    17'sd15, -17'sd25, -17'sd30, 17'sd10, 17'sd79, 17'sd114, 17'sd79, 17'sd10,
    -17'sd30, -17'sd25, 17'sd15, 17'sd0, 17'sd0, 17'sd0, 17'sd0, 17'sd0};

  localparam coef_vec_t COEFS_L4 = '{
    -17'sd12, 17'sd8, 17'sd16, 17'sd4, -17'sd19, -17'sd10, 17'sd47, 17'sd106,
    17'sd106, 17'sd47, -17'sd10, -17'sd19, 17'sd4, 17'sd16, 17'sd8, -17'sd12};

  localparam coef_vec_t COEFS_L8 = '{
    17'sd4, 17'sd8, 17'sd12, 17'sd16, 17'sd20, 17'sd24, 17'sd28, 17'sd32,
    17'sd28, 17'sd24, 17'sd20, 17'sd16, 17'sd12, 17'sd8, 17'sd4, 17'sd0};

endpackage
