// decim_filter_tb: feeds a random sample every clock and checks every
// decimated output against sum_k h_M(k) * x(m-k) computed from the bench's
// own input history, that dout_valid comes exactly every M clocks, for
// M = 2, 4 and 8 in turn (the first outputs after each switch, made while the
// new coefficients load, are not compared).
module decim_filter_tb;
  logic clk = 1'b0, rst;
  logic [3:0] dec_sel;
  logic signed [15:0] din;
  logic signed [25:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;

  int h2 [16] = '{15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0};
  int h4 [16] = '{-12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12};
  int h8 [16] = '{4, 8, 12, 16, 20, 24, 28, 32, 28, 24, 20, 16, 12, 8, 4, 0};

  decim_filter dut (.clk(clk), .rst(rst), .dec_sel(dec_sel), .din(din),
                    .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [16];
  int cnt, cyc, last_valid, since_switch, n_out [3];
  longint exp_d;
  bit exp_v, exp_cmp;
  logic [3:0] prev_sel;

  function automatic int fac(input logic [3:0] s);
    return (s == 4'b0100) ? 4 : (s == 4'b1000) ? 8 : 2;
  endfunction

  always @(posedge clk) begin
    int m;
    longint s;
    if (rst) begin
      cnt = 0; cyc = 0; last_valid = -1; exp_v = 0; exp_cmp = 0; since_switch = 0;
      prev_sel = dec_sel;
      for (int i = 0; i < 16; i++) hist[i] = 0;
    end else begin
      if (dec_sel != prev_sel) since_switch = 0;
      prev_sel = dec_sel;
      m = fac(dec_sel);
      checks++;
      if (dout_valid !== exp_v) begin failures++; $display("dout_valid wrong at %0d", cyc); end
      if (dout_valid) begin
        if (last_valid >= 0 && since_switch > 16) begin
          checks++;
          if (cyc - last_valid != m) begin failures++; $display("output period %0d expected %0d", cyc - last_valid, m); end
        end
        last_valid = cyc;
      end
      if (exp_v && exp_cmp) begin
        checks++;
        n_out[m == 2 ? 0 : m == 4 ? 1 : 2]++;
        if (longint'(dout) != exp_d) begin
          failures++;
          if (failures < 10) $display("dout=%0d expected %0d at %0d", dout, exp_d, cyc);
        end
      end
      s = 0;
      for (int k = 0; k < 16; k++)
        s += longint'((m == 4) ? h4[k] : (m == 8) ? h8[k] : h2[k]) * hist[k];
      exp_v = (cnt % m) == m - 1;
      if (exp_v) begin exp_d = s; exp_cmp = since_switch >= 2; end
      for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = din;
      cnt = (cnt + 1) % 8;
      cyc++;
      since_switch++;
    end
  end

  initial begin
    logic [3:0] seq [4] = '{4'b0010, 4'b0100, 4'b1000, 4'b0010};
    rst = 1'b1; dec_sel = 4'b0010; din = '0; n_out = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int j = 0; j < 4; j++) begin
      dec_sel = seq[j];
      for (int i = 0; i < 480 + j; i++) begin
        din = 16'($urandom);
        @(negedge clk);
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_out[i] < 40) begin failures++; $display("factor %0d: only %0d outputs", 2 << i, n_out[i]); end
    end
    $display("outputs checked: M=2 %0d, M=4 %0d, M=8 %0d", n_out[0], n_out[1], n_out[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
