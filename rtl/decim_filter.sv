// decim_filter: decimation filter, down-sampling by 2, 4 or 8.
//
// One input sample din is taken every clock into a NTAPS-long delay line
// built from the same registers as the vector generation unit. A counter
// counts input samples modulo M (M picked by dec_sel, coded like the
// interpolation factor: 0010, 0100, 1000); in every M-th clock the FIR sum
//   dout = sum_k h(k) * x(m - k),  k = 0..NTAPS-1,
// over the delay line is formed by NTAPS shift-and-add multipliers and an
// adder tree and registered, with dout_valid high for that one clock. So an
// output leaves every M clocks, M times slower than the input: x(m) is the
// newest sample in the line, the one taken on the clock edge before.
// The coefficient vector is the one the coefficient selection unit holds
// for factor M. rst is synchronous, active high, and clears the line.
// That a decimation filter exists is the document's; its structure, the
// one-sample-per-clock input and the DOW-bit output are this design's.
module decim_filter
  import rif_pkg::*;
#(
  parameter int DOW = 26,
  localparam int PW = DATA_W + COEF_W - 1,
  localparam int LV = $clog2(NTAPS),
  localparam int SW = PW + LV
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [3:0]               dec_sel,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DOW-1:0]    dout,
  output logic                     dout_valid
);

  logic [DATA_W-1:0]        d    [NTAPS];
  logic [DATA_W-1:0]        t    [NTAPS];
  coef_t                    coef [NTAPS];
  logic signed [PW-1:0]     prod [NTAPS];
  logic signed [SW-1:0]     q    [LV+1][NTAPS];
  logic signed [SW-1:0]     sum;
  logic [2:0]               cnt;
  logic                     fire;

  csu u_csu (
    .clk      (clk),
    .rst      (rst),
    .intp_sel (dec_sel),
    .coef     (coef)
  );

  assign d[0] = din;
  for (genvar k = 1; k < NTAPS; k++) begin : g_link
    assign d[k] = t[k-1];
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    dff #(.W(DATA_W)) u_dff (
      .clk (clk),
      .rst (rst),
      .en  (1'b1),
      .d   (d[k]),
      .q   (t[k])
    );
    shift_add_mult u_mult (
      .x (signed'(t[k])),
      .c (coef[k]),
      .p (prod[k])
    );
  end

  // adder tree
  always_comb begin
    for (int j = 0; j < NTAPS; j++) q[0][j] = SW'(prod[j]);
    for (int l = 1; l <= LV; l++) begin
      for (int j = 0; j < NTAPS; j++) begin
        if (j < (NTAPS >> l)) q[l][j] = q[l-1][2*j] + q[l-1][2*j+1];
        else                  q[l][j] = '0;
      end
    end
    sum = q[LV][0];
  end

  // sample counter modulo M
  always_comb begin
    case (factor_of(dec_sel))
      4:       fire = (cnt[1:0] == 2'b11);
      8:       fire = (cnt      == 3'b111);
      default: fire = (cnt[0]   == 1'b1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      cnt        <= cnt + 3'd1;
      dout_valid <= fire;
      if (fire) dout <= DOW'(sum);
    end
  end

  a_out_fits: assert property (@(posedge clk) disable iff (rst)
    (sum <= SW'((64'sd1 <<< (DOW-1)) - 1)) && (sum >= -SW'(64'sd1 <<< (DOW-1))))
    else $error("decim_filter: output sum exceeds %0d bits", DOW);

endmodule
