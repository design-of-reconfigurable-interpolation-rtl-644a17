// interp_filter_tb: end-to-end test of the interpolation filter.
//
// A new random sample is put on "in" every clock; the filter takes one on
// each in_strobe. The bench keeps its own copy of the three input-rate delay
// lines and of the coefficient tables (written out here) and predicts every
// output: y(nL+p) = sum_k h_L(kL+p) * x(n-k), one clock after the phase it
// belongs to. It checks y, y_phase, y_valid, that in_strobe comes every L
// clocks, and that exactly L outputs are produced per input sample. The
// factor is switched 2 -> 4 -> 8 -> 2 -> 8 -> 4; after a switch, outputs are
// checked again from the second input strobe under the new factor on, once
// the new coefficients have been loaded.
module interp_filter_tb;
  logic clk = 1'b0, rst;
  logic [3:0] intp_sel;
  logic signed [15:0] in;
  logic in_strobe, y_valid;
  logic signed [23:0] y;
  logic [2:0] y_phase;
  int checks = 0, failures = 0;

  int h2 [16] = '{15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0};
  int h4 [16] = '{-12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12};
  int h8 [16] = '{4, 8, 12, 16, 20, 24, 28, 32, 28, 24, 20, 16, 12, 8, 4, 0};

  interp_filter dut (.clk(clk), .rst(rst), .intp_sel(intp_sel), .in(in),
                     .in_strobe(in_strobe), .y(y), .y_phase(y_phase), .y_valid(y_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, evaluated with the values seen just before each edge
  longint hist [3][8];
  int     cnt, strobes_new, last_strobe, cyc;
  longint exp_y;
  int     exp_phase;
  bit     exp_valid, exp_ok, exp_cmp, have;
  logic [3:0] prev_sel;
  int     outputs_checked [3];
  int     nonzero_out;

  function automatic int fac(input logic [3:0] s);
    return (s == 4'b0100) ? 4 : (s == 4'b1000) ? 8 : 2;
  endfunction

  function automatic int coef(input int l, input int i);
    return (l == 4) ? h4[i] : (l == 8) ? h8[i] : h2[i];
  endfunction

  always @(posedge clk) begin
    int l, ph, li;
    longint s;
    if (rst) begin
      cnt = 0; strobes_new = 0; last_strobe = -1; cyc = 0;
      exp_valid = 0; exp_ok = 0; exp_cmp = 0; have = 0; prev_sel = intp_sel;
      for (int a = 0; a < 3; a++) for (int i = 0; i < 8; i++) hist[a][i] = 0;
    end else begin
      // outputs registered at the previous edge
      checks++;
      if (y_valid !== exp_valid) begin failures++; $display("y_valid %0b expected %0b at %0d", y_valid, exp_valid, cyc); end
      if (exp_valid && exp_cmp) begin
        checks += 2;
        outputs_checked[fac(prev_sel) == 2 ? 0 : fac(prev_sel) == 4 ? 1 : 2]++;
        if (longint'(y) != exp_y) begin
          failures++;
          if (failures < 10) $display("y=%0d expected %0d (phase %0d, cycle %0d)", y, exp_y, exp_phase, cyc);
        end
        if (int'(y_phase) != exp_phase) begin
          failures++;
          if (failures < 10) $display("y_phase=%0d expected %0d", y_phase, exp_phase);
        end
        if (y != 0) nonzero_out++;
      end
      // this cycle
      if (intp_sel != prev_sel) begin strobes_new = 0; exp_ok = 0; end
      prev_sel = intp_sel;
      l  = fac(intp_sel);
      li = (l == 2) ? 0 : (l == 4) ? 1 : 2;
      ph = cnt % l;
      s = 0;
      for (int k = 0; k * l < 16; k++) s += longint'(coef(l, k * l + ph)) * hist[li][k];
      exp_y = s; exp_phase = ph; exp_valid = have; exp_cmp = exp_ok;
      checks++;
      if (in_strobe !== (ph == l - 1)) begin failures++; $display("in_strobe wrong at %0d", cyc); end
      if (in_strobe) begin
        if (last_strobe >= 0 && strobes_new > 0) begin
          checks++;
          if (cyc - last_strobe != l) begin failures++; $display("input period %0d expected %0d", cyc - last_strobe, l); end
        end
        last_strobe = cyc;
        strobes_new++;
        have = 1;
      end
      // the coefficients loaded at the end of this strobe are valid from
      // the second strobe after a switch
      if (in_strobe && strobes_new >= 2) exp_ok = 1;
      if (cnt % 2 == 1) begin for (int i = 7; i > 0; i--) hist[0][i] = hist[0][i-1]; hist[0][0] = in; end
      if (cnt % 4 == 3) begin for (int i = 7; i > 0; i--) hist[1][i] = hist[1][i-1]; hist[1][0] = in; end
      if (cnt % 8 == 7) begin for (int i = 7; i > 0; i--) hist[2][i] = hist[2][i-1]; hist[2][0] = in; end
      cnt = (cnt + 1) % 8;
      cyc++;
    end
  end

  initial begin
    logic [3:0] seq [6] = '{4'b0010, 4'b0100, 4'b1000, 4'b0010, 4'b1000, 4'b0100};
    rst = 1'b1; intp_sel = 4'b0010; in = '0;
    outputs_checked = '{0, 0, 0}; nonzero_out = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int m = 0; m < 6; m++) begin
      intp_sel = seq[m];
      for (int i = 0; i < 400 + 3 * m; i++) begin
        in = 16'($urandom);
        @(negedge clk);
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (outputs_checked[i] < 100) begin failures++; $display("factor %0d: only %0d outputs checked", 2 << i, outputs_checked[i]); end
    end
    checks++;
    if (nonzero_out < 100) begin failures++; $display("outputs are mostly zero"); end
    $display("outputs checked: L=2 %0d, L=4 %0d, L=8 %0d", outputs_checked[0], outputs_checked[1], outputs_checked[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
