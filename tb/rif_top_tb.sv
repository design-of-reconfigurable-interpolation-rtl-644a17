// rif_top_tb: end-to-end test of the whole design at its default sizes.
//
// Both filters run at once from one clock. The interpolation filter gets a
// new random sample offered every clock (it takes one per in_strobe) and the
// decimation filter takes a random sample every clock. The bench carries its
// own model of each (delay lines, coefficient tables written out here,
// polyphase and direct-form sums) and checks every output value and its
// timing: one interpolated output per clock and one input per L clocks, one
// decimated output per M clocks. Both factor selects are stepped through
// 2, 4 and 8 several times, independently of each other. At the end it
// reports how often each mechanism happened (outputs at each factor, factor
// switches, negative and positive outputs through the sign stage) and counts
// a failure for any that never happened.
module rif_top_tb;
  logic clk = 1'b0, rst;
  logic [3:0] intp_sel, dec_sel;
  logic signed [15:0] in, din;
  logic in_strobe, y_valid, dout_valid;
  logic signed [23:0] y;
  logic [2:0] y_phase;
  logic signed [25:0] dout;
  int checks = 0, failures = 0;

  int h2 [16] = '{15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0};
  int h4 [16] = '{-12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12};
  int h8 [16] = '{4, 8, 12, 16, 20, 24, 28, 32, 28, 24, 20, 16, 12, 8, 4, 0};

  rif_top dut (
    .clk(clk), .rst(rst),
    .intp_sel(intp_sel), .in(in), .in_strobe(in_strobe), .y(y), .y_phase(y_phase), .y_valid(y_valid),
    .dec_sel(dec_sel), .din(din), .dout(dout), .dout_valid(dout_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fac(input logic [3:0] s);
    return (s == 4'b0100) ? 4 : (s == 4'b1000) ? 8 : 2;
  endfunction

  function automatic int coef(input int l, input int i);
    return (l == 4) ? h4[i] : (l == 8) ? h8[i] : h2[i];
  endfunction

  // mechanism counters
  int n_interp [3], n_decim [3], n_isw, n_dsw, n_neg, n_pos, n_in;

  function automatic int idx(input int l);
    return (l == 2) ? 0 : (l == 4) ? 1 : 2;
  endfunction

  // ---- interpolation model ----
  longint ih [3][8];
  int     icnt, istrobes, ilast, cyc;
  longint iexp_y;
  int     iexp_ph, iexp_l;
  bit     iexp_v, iok, icmp, ihave;
  logic [3:0] iprev;

  always @(posedge clk) begin
    int l, ph;
    longint s;
    if (rst) begin
      icnt = 0; istrobes = 0; ilast = -1; cyc = 0;
      iexp_v = 0; iok = 0; icmp = 0; ihave = 0; iprev = intp_sel;
      for (int a = 0; a < 3; a++) for (int i = 0; i < 8; i++) ih[a][i] = 0;
    end else begin
      checks++;
      if (y_valid !== iexp_v) begin failures++; $display("y_valid wrong at %0d", cyc); end
      if (iexp_v && icmp) begin
        checks += 2;
        n_interp[idx(iexp_l)]++;
        if (y < 0) n_neg++;
        if (y > 0) n_pos++;
        if (longint'(y) != iexp_y || int'(y_phase) != iexp_ph) begin
          failures++;
          if (failures < 10) $display("interp L=%0d: y=%0d/%0d expected %0d/%0d at %0d", iexp_l, y, y_phase, iexp_y, iexp_ph, cyc);
        end
      end
      if (intp_sel != iprev) begin istrobes = 0; iok = 0; n_isw++; end
      iprev = intp_sel;
      l  = fac(intp_sel);
      ph = icnt % l;
      s = 0;
      for (int k = 0; k * l < 16; k++) s += longint'(coef(l, k * l + ph)) * ih[idx(l)][k];
      iexp_y = s; iexp_ph = ph; iexp_l = l; iexp_v = ihave; icmp = iok;
      checks++;
      if (in_strobe !== (ph == l - 1)) begin failures++; $display("in_strobe wrong at %0d", cyc); end
      if (in_strobe) begin
        n_in++;
        if (ilast >= 0 && istrobes > 0) begin
          checks++;
          if (cyc - ilast != l) begin failures++; $display("input period %0d expected %0d", cyc - ilast, l); end
        end
        ilast = cyc;
        istrobes++;
        ihave = 1;
        if (istrobes >= 2) iok = 1;
      end
      if (icnt % 2 == 1) begin for (int i = 7; i > 0; i--) ih[0][i] = ih[0][i-1]; ih[0][0] = in; end
      if (icnt % 4 == 3) begin for (int i = 7; i > 0; i--) ih[1][i] = ih[1][i-1]; ih[1][0] = in; end
      if (icnt % 8 == 7) begin for (int i = 7; i > 0; i--) ih[2][i] = ih[2][i-1]; ih[2][0] = in; end
      icnt = (icnt + 1) % 8;
      cyc++;
    end
  end

  // ---- decimation model ----
  longint dh [16];
  int dcnt, dlast, dsince;
  longint dexp;
  int dexp_m;
  bit dexp_v, dcmp;
  logic [3:0] dprev;

  always @(posedge clk) begin
    int m;
    longint s;
    if (rst) begin
      dcnt = 0; dlast = -1; dexp_v = 0; dcmp = 0; dsince = 0; dprev = dec_sel;
      for (int i = 0; i < 16; i++) dh[i] = 0;
    end else begin
      if (dec_sel != dprev) begin dsince = 0; n_dsw++; end
      dprev = dec_sel;
      m = fac(dec_sel);
      checks++;
      if (dout_valid !== dexp_v) begin failures++; $display("dout_valid wrong"); end
      if (dout_valid) begin
        if (dlast >= 0 && dsince > 16) begin
          checks++;
          if (cyc - dlast != m) begin failures++; $display("decim period %0d expected %0d", cyc - dlast, m); end
        end
        dlast = cyc;
      end
      if (dexp_v && dcmp) begin
        checks++;
        n_decim[idx(dexp_m)]++;
        if (longint'(dout) != dexp) begin
          failures++;
          if (failures < 10) $display("decim M=%0d: dout=%0d expected %0d", dexp_m, dout, dexp);
        end
      end
      s = 0;
      for (int k = 0; k < 16; k++) s += longint'(coef(m, k)) * dh[k];
      dexp_v = (dcnt % m) == m - 1;
      if (dexp_v) begin dexp = s; dexp_m = m; dcmp = dsince >= 2; end
      for (int i = 15; i > 0; i--) dh[i] = dh[i-1];
      dh[0] = din;
      dcnt = (dcnt + 1) % 8;
      dsince++;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  ^ never happened"); end
  endtask

  initial begin
    logic [3:0] iseq [7] = '{4'b0010, 4'b0100, 4'b1000, 4'b0010, 4'b1000, 4'b0100, 4'b0010};
    logic [3:0] dseq [5] = '{4'b1000, 4'b0010, 4'b0100, 4'b1000, 4'b0010};
    rst = 1'b1; intp_sel = 4'b0010; dec_sel = 4'b1000; in = '0; din = '0;
    n_interp = '{0, 0, 0}; n_decim = '{0, 0, 0};
    n_isw = 0; n_dsw = 0; n_neg = 0; n_pos = 0; n_in = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 7 * 300; t++) begin
      intp_sel = iseq[t / 300];
      dec_sel  = dseq[t / 420];
      in  = 16'($urandom);
      din = 16'($urandom);
      @(negedge clk);
    end
    $display("mechanisms:");
    need(n_in,        "interpolator input samples");
    need(n_interp[0], "interpolated outputs, factor 2");
    need(n_interp[1], "interpolated outputs, factor 4");
    need(n_interp[2], "interpolated outputs, factor 8");
    need(n_isw,       "interpolation factor switches");
    need(n_neg,       "negative outputs");
    need(n_pos,       "positive outputs");
    need(n_decim[0],  "decimated outputs, factor 2");
    need(n_decim[1],  "decimated outputs, factor 4");
    need(n_decim[2],  "decimated outputs, factor 8");
    need(n_dsw,       "decimation factor switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
