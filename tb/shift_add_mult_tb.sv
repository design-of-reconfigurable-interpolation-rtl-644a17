// shift_add_mult_tb: compares the shift-and-add product with an ordinary
// integer product for corner values and random operands, both signs of data
// and coefficient; the most negative coefficient must give x * -(2^16 - 1).
module shift_add_mult_tb;
  logic clk = 1'b0;
  logic signed [15:0] x;
  logic signed [16:0] c;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  shift_add_mult dut (.x(x), .c(c), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input longint xv, input longint cv);
    longint e;
    x = 16'(xv); c = 17'(cv);
    #1;
    e = (cv == -65536) ? xv * -65535 : xv * cv;
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("mult: %0d * %0d = %0d expected %0d", xv, cv, longint'(p), e);
    end
  endtask

  initial begin
    longint xs [6] = '{0, 1, -1, 32767, -32768, 12345};
    longint cs [9] = '{0, 1, -1, 65535, -65535, -65536, 106, -12, 43690};
    foreach (xs[i]) foreach (cs[j]) try(xs[i], cs[j]);
    for (int i = 0; i < 5000; i++)
      try(longint'($signed(16'($urandom))), longint'($signed(17'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
