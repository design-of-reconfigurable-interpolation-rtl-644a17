// rate_gen_tb: checks that ce2/ce4/ce8 pulse once every 2/4/8 clocks, in the
// last clock of each period, that phase counts 0..L-1 for the selected factor
// and that in_strobe is the selected factor's strobe. The selection is
// changed every 40 clocks through 2, 4, 8 and an unused code (read as 2).
module rate_gen_tb;
  logic clk = 1'b0, rst;
  logic [3:0] intp_sel;
  logic ce2, ce4, ce8, in_strobe;
  logic [2:0] phase;
  int checks = 0, failures = 0;
  int cyc;
  int last2, last4, last8;

  rate_gen dut (.clk(clk), .rst(rst), .intp_sel(intp_sel), .ce2(ce2), .ce4(ce4),
                .ce8(ce8), .phase(phase), .in_strobe(in_strobe));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("rate_gen: %s failed at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    logic [3:0] sels [4] = '{4'b0010, 4'b0100, 4'b1000, 4'b0000};
    int l;
    rst = 1'b1; intp_sel = 4'b0010;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    last2 = -1; last4 = -1; last8 = -1;
    for (cyc = 0; cyc < 640; cyc++) begin
      intp_sel = sels[(cyc / 40) % 4];
      l = (intp_sel == 4'b0100) ? 4 : (intp_sel == 4'b1000) ? 8 : 2;
      #1;
      check(ce2 == ((cyc % 2) == 1), "ce2 position");
      check(ce4 == ((cyc % 4) == 3), "ce4 position");
      check(ce8 == ((cyc % 8) == 7), "ce8 position");
      check(int'(phase) == cyc % l, "phase");
      check(in_strobe == ((cyc % l) == l - 1), "in_strobe");
      // rates: distance between strobes
      if (ce2) begin if (last2 >= 0) check(cyc - last2 == 2, "ce2 period"); last2 = cyc; end
      if (ce4) begin if (last4 >= 0) check(cyc - last4 == 4, "ce4 period"); last4 = cyc; end
      if (ce8) begin if (last8 >= 0) check(cyc - last8 == 8, "ce8 period"); last8 = cyc; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
