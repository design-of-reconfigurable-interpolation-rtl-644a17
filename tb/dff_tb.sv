// dff_tb: self-checking test of the enabled, synchronously cleared register.
// Random d, en and rst are driven on the falling edge; a software copy of the
// register predicts q after every rising edge.
module dff_tb;
  localparam int W = 16;
  logic clk = 1'b0, rst, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  dff dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; d = '0; model = '0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 19) == 0);
      en  = $urandom_range(0, 1)[0];
      d   = W'($urandom);
      @(posedge clk);
      if (rst) model = '0;
      else if (en) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("dff mismatch: q=%h expected %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
