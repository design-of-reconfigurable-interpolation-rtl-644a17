// audio_workload_tb: runs the interpolation filter on an audio-like signal at
// factor 4 and then at factor 2, as a filter would be used.
//
// The input starts with five 16-bit samples (0x000A, 0x11A9, 0x1107, 0x1441,
// 0x1FAC) and continues with a 1 kHz tone sampled at 48 kHz, amplitude
// 12000, computed here with $sin. A new sample is presented after each one
// the filter takes. Every output is compared with the polyphase sum the bench
// computes from its own copy of the input history, inputs must be taken
// exactly every L clocks, and L outputs must leave per input sample. The
// filter is reset between the two runs.
module audio_workload_tb;
  logic clk = 1'b0, rst;
  logic [3:0] intp_sel;
  logic signed [15:0] in;
  logic in_strobe, y_valid;
  logic signed [23:0] y;
  logic [2:0] y_phase;
  int checks = 0, failures = 0;

  int h2 [16] = '{15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0};
  int h4 [16] = '{-12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12};
  logic signed [15:0] first [5] = '{16'h000A, 16'h11A9, 16'h1107, 16'h1441, 16'h1FAC};

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

  function automatic logic signed [15:0] sample(input int n);
    if (n < 5) return first[n];
    return 16'($rtoi(12000.0 * $sin(2.0 * 3.14159265358979 * 1000.0 * real'(n) / 48000.0)));
  endfunction

  // model, evaluated with the values seen just before each rising edge
  longint x [8];
  int     l, cnt, n_in, n_out, last_in, cyc, peak;
  longint exp_y;
  bit     exp_v, have;

  always @(posedge clk) begin
    longint s;
    if (rst) begin
      cnt = 0; n_in = 0; n_out = 0; last_in = -1; cyc = 0; peak = 0;
      exp_v = 0; have = 0;
      for (int i = 0; i < 8; i++) x[i] = 0;
    end else begin
      if (exp_v) begin
        checks++;
        n_out++;
        if (int'(y) > peak) peak = int'(y);
        if (longint'(y) != exp_y) begin
          failures++;
          if (failures < 10) $display("L=%0d: y=%0d expected %0d", l, y, exp_y);
        end
      end
      s = 0;
      for (int k = 0; k * l < 16; k++)
        s += longint'((l == 4) ? h4[k * l + cnt % l] : h2[k * l + cnt % l]) * x[k];
      exp_y = s;
      exp_v = have;
      if (in_strobe) begin
        if (last_in >= 0) begin
          checks++;
          if (cyc - last_in != l) begin failures++; $display("input period %0d, expected %0d", cyc - last_in, l); end
        end
        last_in = cyc;
        for (int i = 7; i > 0; i--) x[i] = x[i-1];
        x[0] = longint'(in);
        n_in++;
        have = 1;
      end
      cnt = (cnt + 1) % 8;
      cyc++;
    end
  end

  always @(negedge clk) in = sample(n_in);

  task automatic run(input int factor, input int nin);
    l = factor;
    intp_sel = 4'(factor);
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    wait (n_in == nin);
    @(negedge clk);
    // outputs checked so far: all L outputs of the first nin-1 samples, less
    // the one registered on this edge and not yet compared
    checks++;
    if (n_out != (nin - 1) * l - 1) begin
      failures++;
      $display("L=%0d: %0d outputs for %0d inputs", l, n_out, nin);
    end
    $display("L=%0d: %0d input samples, %0d outputs checked, peak output %0d", l, nin, n_out, peak);
  endtask

  initial begin
    rst = 1'b1; intp_sel = 4'b0100;
    run(4, 240);
    run(2, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
