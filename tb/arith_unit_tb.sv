// arith_unit_tb: feeds the arithmetic unit a fixed coefficient vector per
// factor and random data vectors that change at each load, and checks every
// registered output against sum_k h(kL+p) * dg[k], phase p counting from the
// load; one new output per clock. Coefficients are drawn small enough that the
// sum stays inside 24 bits.
module arith_unit_tb;
  logic clk = 1'b0, rst, load;
  logic [3:0] intp_sel;
  logic signed [16:0] coef [16];
  logic signed [15:0] dg [8];
  logic signed [23:0] y;
  int checks = 0, failures = 0;

  arith_unit dut (.clk(clk), .rst(rst), .load(load), .intp_sel(intp_sel),
                  .coef(coef), .dg(dg), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l;
    longint e;
    rst = 1'b1; load = 1'b0; intp_sel = 4'b0010;
    for (int k = 0; k < 16; k++) coef[k] = '0;
    for (int k = 0; k < 8; k++) dg[k] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      l = 2 << f;
      intp_sel = 4'(l);
      for (int k = 0; k < 16; k++) coef[k] = 17'(int'($urandom_range(0, 60)) - 30);
      load = 1'b1;
      @(negedge clk);
      for (int rep = 0; rep < 40; rep++) begin
        for (int k = 0; k < 8; k++) dg[k] = 16'($urandom);
        for (int p = 0; p < l; p++) begin
          e = 0;
          for (int k = 0; k * l < 16; k++) e += longint'(coef[k * l + p]) * longint'(dg[k]);
          load = (p == l - 1);
          @(negedge clk);
          checks++;
          if (longint'(y) != e) begin
            failures++;
            if (failures < 10) $display("au L=%0d p=%0d: y=%0d expected %0d", l, p, y, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
