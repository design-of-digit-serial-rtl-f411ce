// tb_ds_ctrl: self-checking test of the word-framing counter.
//
// With L = 5, checks after reset that the counter runs 0,1,2,3,4,0,..., that
// first/last mark digits 0 and L-1, that init is high in the last digit and
// during reset, and that a new word starts exactly every L cycles.
module tb_ds_ctrl;
  localparam int unsigned L  = 5;
  localparam int unsigned CW = 3;

  logic          clk = 1'b0;
  logic          rst;
  logic [CW-1:0] cnt;
  logic          first, last, init;
  int            checks = 0, failures = 0;

  ds_ctrl #(.L(L), .CW(CW)) dut (.clk(clk), .rst(rst), .cnt(cnt), .first(first),
                                 .last(last), .init(init));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cnt=%0d first=%0b last=%0b init=%0b)", what, cnt, first, last, init);
    end
  endtask

  initial begin
    int prev_first;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(init, "init during reset");
    @(negedge clk) rst = 1'b0;
    prev_first = -1;
    for (int c = 0; c < 60; c++) begin
      #1;
      check(cnt == CW'(c % L), "counter value");
      check(first == (c % L == 0), "first flag");
      check(last == (c % L == L - 1), "last flag");
      check(init == last, "init follows last");
      if (first) begin
        if (prev_first >= 0) check(c - prev_first == L, "word period");
        prev_first = c;
      end
      @(negedge clk);
    end
    // A reset in mid-word restarts the word.
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    #1 check(cnt == 0 && first, "restart after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
