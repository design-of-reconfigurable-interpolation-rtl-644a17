// csu_tb: checks the three stored coefficient vectors against values written
// out here, and that a new selection appears exactly one clock after
// intp_sel changes (the old vector is still there right after the change).
module csu_tb;
  import rif_pkg::*;
  logic clk = 1'b0, rst;
  logic [3:0] intp_sel;
  coef_t coef [16];
  int checks = 0, failures = 0;

  int exp2 [16] = '{15, -25, -30, 10, 79, 114, 79, 10, -30, -25, 15, 0, 0, 0, 0, 0};
  int exp4 [16] = '{-12, 8, 16, 4, -19, -10, 47, 106, 106, 47, -10, -19, 4, 16, 8, -12};
  int exp8 [16] = '{4, 8, 12, 16, 20, 24, 28, 32, 28, 24, 20, 16, 12, 8, 4, 0};

  csu dut (.clk(clk), .rst(rst), .intp_sel(intp_sel), .coef(coef));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_vec(input int f, input string when);
    for (int k = 0; k < 16; k++) begin
      int e;
      e = (f == 4) ? exp4[k] : (f == 8) ? exp8[k] : exp2[k];
      checks++;
      if (int'(coef[k]) != e) begin
        failures++;
        $display("csu %s: factor %0d tap %0d = %0d expected %0d", when, f, k, int'(coef[k]), e);
      end
    end
  endtask

  initial begin
    logic [3:0] seq [7] = '{4'b0010, 4'b0100, 4'b1000, 4'b0100, 4'b0010, 4'b1000, 4'b0110};
    int prev;
    rst = 1'b1; intp_sel = 4'b0010;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    prev = 2;
    for (int i = 0; i < 7; i++) begin
      int f;
      f = (seq[i] == 4'b0100) ? 4 : (seq[i] == 4'b1000) ? 8 : 2;
      intp_sel = seq[i];
      #1 expect_vec(prev, "before the edge");
      @(negedge clk);
      expect_vec(f, "one clock after");
      @(negedge clk);
      prev = f;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
