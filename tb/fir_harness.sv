// fir_harness: drives one ds_fir instance with random signed samples and
// checks every output against a direct evaluation of y(n) = sum H[j] x(n-j).
//
// Samples are streamed as sign-extended words of L = ceil(bw_y / d) digits,
// least significant digit first, starting on the filter's `first` flag. The
// first NSAMP/10 samples are the extreme values +max and -max-1 to exercise
// the full output width. For every sample the harness checks that y_valid
// rises exactly L cycles after digit 0 (one output per word) and that y is
// the expected value. `done` rises after NSAMP samples.
module fir_harness
  import ds_pkg::*;
#(
  parameter int unsigned D     = 2,
  parameter int unsigned N     = 16,
  parameter arch_e       ARCH  = ARCH_SHIFT_ADDS,
  parameter int unsigned NTAP  = 2,
  parameter int          H [NTAP] = '{29, 43},
  parameter int unsigned NOPS  = 3,
  parameter aop_t [NOPS-1:0] OPS = {aop(2, 0, 1, 1, 1'b0),
                                    aop(1, 2, 0, 0, 1'b0),
                                    aop(0, 3, 0, 0, 1'b1)},
  parameter int unsigned NSAMP = 100
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);

  function automatic longint sum_abs();
    longint s = 0;
    for (int j = 0; j < NTAP; j++) s += (H[j] < 0) ? -H[j] : H[j];
    return (s < 2) ? 2 : s;
  endfunction

  localparam int unsigned BWY = $clog2(sum_abs()) + N;
  localparam int unsigned L   = (BWY + D - 1) / D;

  logic                  first, y_valid;
  logic [D-1:0]          x;
  logic signed [BWY-1:0] y;
  longint                hist [NTAP];

  ds_fir #(.D(D), .N(N), .ARCH(ARCH), .NTAP(NTAP), .H(H), .NOPS(NOPS), .OPS(OPS)) dut (
    .clk(clk), .rst(rst), .x(x), .first(first), .y_valid(y_valid), .y(y));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (d=%0d arch=%0d): %s", D, ARCH, what);
    end
  endtask

  initial begin
    logic signed [N-1:0] xs;
    logic [D*L-1:0]      xw;
    longint              exp;
    checks = 0; failures = 0; done = 1'b0; x = '0;
    for (int j = 0; j < int'(NTAP); j++) hist[j] = 0;
    @(negedge clk iff (!rst && first));
    for (int n = 0; n < int'(NSAMP); n++) begin
      if (n < int'(NSAMP) / 10) xs = n[0] ? {1'b1, {(N-1){1'b0}}} : {1'b0, {(N-1){1'b1}}};
      else                      xs = N'($urandom);
      for (int j = int'(NTAP) - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = longint'(xs);
      exp = 0;
      for (int j = 0; j < int'(NTAP); j++) exp += longint'(H[j]) * hist[j];
      xw = (D*L)'(longint'(xs));
      check(first, "word starts on digit 0");
      for (int k = 0; k < int'(L); k++) begin
        x = xw[k*D +: D];
        @(negedge clk);
        if (k < int'(L) - 1) check(!y_valid, "no output in mid-word");
      end
      check(y_valid, $sformatf("output valid %0d cycles after digit 0", L));
      check(longint'(y) == exp, $sformatf("sample %0d: y=%0d expected %0d", n, y, exp));
    end
    done = 1'b1;
  end

endmodule
