// tb_ds_shift: self-checking test of the digit-serial left shift chain.
//
// With d = 3 and MLS = 7, random 18-bit words are streamed in (six digits,
// least significant first, init in the last digit) and every tap ls = 0..7 is
// collected into a word and compared with (a << ls) mod 2^18. The number of
// history flip-flops must equal MLS, which is checked from the chain's width.
module tb_ds_shift;
  localparam int unsigned D   = 3;
  localparam int unsigned MLS = 7;
  localparam int unsigned L   = 6;
  localparam int unsigned W   = D * L;

  logic                clk = 1'b0;
  logic                init;
  logic [D-1:0]        a;
  logic [MLS:0][D-1:0] taps;
  int                  checks = 0, failures = 0;

  ds_shift #(.D(D), .MLS(MLS)) dut (.clk(clk), .init(init), .a(a), .taps(taps));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(input logic [W-1:0] wa);
    logic [MLS:0][W-1:0] got;
    for (int k = 0; k < int'(L); k++) begin
      @(negedge clk);
      a    = wa[k*D +: D];
      init = (k == int'(L) - 1);
      #1;
      for (int ls = 0; ls <= int'(MLS); ls++) got[ls][k*D +: D] = taps[ls];
    end
    for (int ls = 0; ls <= int'(MLS); ls++) begin
      checks++;
      if (got[ls] !== W'(wa << ls)) begin
        failures++;
        $display("FAIL: %h << %0d gave %h", wa, ls, got[ls]);
      end
    end
  endtask

  initial begin
    a = '0; init = 1'b1;
    repeat (2) @(posedge clk);
    checks++;
    if ($bits(dut.g_chain.hist) != MLS) begin
      failures++;
      $display("FAIL: %0d history flip-flops, expected %0d", $bits(dut.g_chain.hist), MLS);
    end
    run_word('1);
    run_word(W'(1));
    for (int n = 0; n < 200; n++) run_word(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
