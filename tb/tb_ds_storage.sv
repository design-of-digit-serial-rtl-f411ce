// tb_ds_storage: self-checking test of the digit-serial to parallel storage.
//
// With d = 2 and 4 digits (the 8-bit case), shifts in the digits of random
// words least significant first and checks the parallel word, and checks that
// the word is held while shifting is disabled.
module tb_ds_storage;
  localparam int unsigned D    = 2;
  localparam int unsigned NDIG = 4;

  logic              clk = 1'b0;
  logic              shift;
  logic [D-1:0]      digit;
  logic [D*NDIG-1:0] word;
  int                checks = 0, failures = 0;

  ds_storage #(.D(D), .NDIG(NDIG)) dut (.clk(clk), .shift(shift), .digit(digit), .word(word));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D*NDIG-1:0] w;
    shift = 1'b0; digit = '0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      w = (D*NDIG)'($urandom);
      for (int k = 0; k < int'(NDIG); k++) begin
        shift = 1'b1;
        digit = w[k*D +: D];
        @(negedge clk);
      end
      // Hold for a random number of cycles with garbage on the input.
      shift = 1'b0;
      for (int h = 0; h <= n % 3; h++) begin
        digit = D'($urandom);
        checks++;
        if (word !== w) begin
          failures++;
          $display("FAIL: stored %h, expected %h", word, w);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
