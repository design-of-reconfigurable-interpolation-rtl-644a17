// vgu_tb: drives the three rate strobes from its own counter and a new random
// sample every clock, keeps a software copy of the three 8-deep delay lines
// and checks that dg[0..7] equals the line of the selected factor, for each
// of the factors 2, 4 and 8 in turn.
module vgu_tb;
  logic clk = 1'b0, rst;
  logic ce2, ce4, ce8;
  logic [3:0] intp_sel;
  logic signed [15:0] xin;
  logic signed [15:0] dg [8];
  logic signed [15:0] m [3][8];
  int checks = 0, failures = 0;

  vgu dut (.clk(clk), .rst(rst), .ce2(ce2), .ce4(ce4), .ce8(ce8),
           .intp_sel(intp_sel), .xin(xin), .dg(dg));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, s;
    rst = 1'b1; ce2 = 0; ce4 = 0; ce8 = 0; intp_sel = 4'b0010; xin = '0;
    for (int a = 0; a < 3; a++) for (int i = 0; i < 8; i++) m[a][i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (c = 0; c < 900; c++) begin
      intp_sel = (c < 300) ? 4'b0010 : (c < 600) ? 4'b0100 : 4'b1000;
      s = (intp_sel == 4'b0100) ? 1 : (intp_sel == 4'b1000) ? 2 : 0;
      ce2 = (c % 2) == 1; ce4 = (c % 4) == 3; ce8 = (c % 8) == 7;
      xin = 16'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (dg[i] !== m[s][i]) begin
          failures++;
          if (failures < 10) $display("vgu: cycle %0d dg[%0d]=%h expected %h", c, i, dg[i], m[s][i]);
        end
      end
      @(posedge clk);
      if (ce2) begin for (int i = 7; i > 0; i--) m[0][i] = m[0][i-1]; m[0][0] = xin; end
      if (ce4) begin for (int i = 7; i > 0; i--) m[1][i] = m[1][i-1]; m[1][0] = xin; end
      if (ce8) begin for (int i = 7; i > 0; i--) m[2][i] = m[2][i-1]; m[2][0] = xin; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
