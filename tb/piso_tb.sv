// piso_tb: loads random 16-entry vectors and checks, for factors 2, 4 and 8,
// that in the p-th clock after the load output cs[k] is tap k*L+p of the
// loaded vector (and zero where k*L >= 16), over several load periods.
module piso_tb;
  logic clk = 1'b0, rst, load;
  logic [3:0] intp_sel;
  logic signed [16:0] cin [16];
  logic signed [16:0] cs [8];
  logic signed [16:0] v [16];
  int checks = 0, failures = 0;

  piso dut (.clk(clk), .rst(rst), .load(load), .intp_sel(intp_sel), .cin(cin), .cs(cs));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l;
    rst = 1'b1; load = 1'b0; intp_sel = 4'b0010;
    for (int k = 0; k < 16; k++) cin[k] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3; f++) begin
      l = 2 << f;
      intp_sel = 4'(l);
      for (int rep = 0; rep < 20; rep++) begin
        for (int k = 0; k < 16; k++) begin
          v[k] = 17'($urandom);
          cin[k] = v[k];
        end
        load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        for (int k = 0; k < 16; k++) cin[k] = 17'($urandom);  // must be ignored now
        for (int p = 0; p < l; p++) begin
          for (int k = 0; k < 8; k++) begin
            logic signed [16:0] e;
            e = (k * l < 16) ? v[k * l + p] : '0;
            checks++;
            if (cs[k] !== e) begin
              failures++;
              if (failures < 10) $display("piso L=%0d p=%0d k=%0d: %h expected %h", l, p, k, cs[k], e);
            end
          end
          if (p != l - 1) @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
