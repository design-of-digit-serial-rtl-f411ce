// tb_ds_wordreg: self-checking test of the one-sample delay register.
//
// With d = 2 and L = 5, drives a random digit stream and checks that the
// output equals the input of exactly L cycles earlier, and zero during the
// first L cycles after a clear.
module tb_ds_wordreg;
  localparam int unsigned D = 2;
  localparam int unsigned L = 5;

  logic         clk = 1'b0;
  logic         clr;
  logic [D-1:0] a, q;
  logic [D-1:0] hist [$];
  int           checks = 0, failures = 0;

  ds_wordreg #(.D(D), .L(L)) dut (.clk(clk), .clr(clr), .a(a), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b1; a = '0;
    @(negedge clk) clr = 1'b0;
    for (int k = 0; k < int'(L); k++) hist.push_back('0);
    for (int c = 0; c < 500; c++) begin
      a = D'($urandom);
      hist.push_back(a);
      #1;
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("FAIL: cycle %0d q=%0d expected %0d", c, q, hist[0]);
      end
      void'(hist.pop_front());
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
