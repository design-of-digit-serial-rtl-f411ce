// tb_ds_fir: self-checking test of the digit-serial transposed FIR filter.
//
// Three filters run side by side against a direct evaluation of the filter
// sum (see fir_harness):
//  * the default filter (h = 29, 43; d = 2, N = 16; 12-cycle words),
//  * a 7-tap filter h = 29, -86, 0, 43, -7, 1, 58 with d = 3 and N = 8 on the
//    shift-adds multiplier block: negative taps use chain subtractors, even
//    taps use shift chains, the zero tap only forwards the delayed sum, and
//    the unit tap uses the input directly,
//  * the same 7-tap filter with one sequential constant multiplier per
//    distinct odd constant instead of the shared network.
// Output width: ceil(log2 72) + 16 = 23 bits (L = 12) and ceil(log2 224) + 8
// = 16 bits (L = 6).
module tb_ds_fir;
  import ds_pkg::*;

  localparam int H7 [7] = '{29, -86, 0, 43, -7, 1, 58};

  logic clk = 1'b0;
  logic rst;
  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int   checks, failures;

  fir_harness #(.NSAMP(200)) h_default (
    .clk(clk), .rst(rst), .checks(c0), .failures(f0), .done(d0));
  fir_harness #(.D(3), .N(8), .ARCH(ARCH_SHIFT_ADDS), .NTAP(7), .H(H7), .NSAMP(300)) h_sa (
    .clk(clk), .rst(rst), .checks(c1), .failures(f1), .done(d1));
  fir_harness #(.D(3), .N(8), .ARCH(ARCH_CONST_MULT), .NTAP(7), .H(H7), .NSAMP(300)) h_cm (
    .clk(clk), .rst(rst), .checks(c2), .failures(f2), .done(d2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    // Every harness must have run its samples.
    checks++;
    if (c0 < 200 || c1 < 300 || c2 < 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
