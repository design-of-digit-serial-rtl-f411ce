// tb_ds_sub: self-checking test of the digit-serial subtraction.
//
// Streams random 15-bit words (five 3-bit digits, least significant first)
// through ds_sub with d = 3, asserting init in the last digit of every word,
// and compares each output word with (a - b) mod 2^15 computed directly.
// Also checks that a word after a long gap still starts from the initial carry.
module tb_ds_sub;
  localparam int unsigned D = 3;
  localparam int unsigned L = 5;            // digits per word
  localparam int unsigned W = D * L;

  logic         clk = 1'b0;
  logic         init;
  logic [D-1:0] a, b, s;
  int           checks = 0, failures = 0;

  ds_sub #(.D(D)) dut (.clk(clk), .init(init), .a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(input logic [W-1:0] wa, input logic [W-1:0] wb);
    logic [W-1:0] got, exp;
    exp = wa - wb;
    for (int k = 0; k < int'(L); k++) begin
      @(negedge clk);
      a    = wa[k*D +: D];
      b    = wb[k*D +: D];
      init = (k == int'(L) - 1);
      #1 got[k*D +: D] = s;
    end
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %0d - %0d gave %0d, expected %0d", wa, wb, got, exp);
    end
  endtask

  initial begin
    a = '0; b = '0; init = 1'b1;
    repeat (2) @(posedge clk);
    run_word('0, '0);
    run_word('1, 15'd1);
    run_word(15'd1, '1);
    run_word('1, '1);
    for (int n = 0; n < 300; n++) run_word(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
