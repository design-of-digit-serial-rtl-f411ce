// tb_filter4_sized: a filter of the size of the largest benchmark filter
// (200 taps, 16-bit coefficients, 16-bit input, 35-bit output) run at the
// digit sizes d = 1, 2, 4 and 8.
//
// The benchmark coefficients themselves are not available, so a fixed
// pseudo-random set is generated: h_j = ((7919 j + 13) mod 6001) - 3000,
// which spans roughly +-3000 (12-bit magnitudes in a 16-bit signed word) and
// has sum |h| between 2^18 and 2^19, so the output is ceil(log2 sum|h|) + 16
// = 35 bits wide. Here the multiplier block is built from constant
// multipliers; tb_filter4_shiftadds runs the same filter on a shift-adds
// network. Each digit size must
// produce one output every ceil(35/d) = 35, 18, 9, 5 cycles, and every output
// is checked against the direct filter sum (see fir_harness).
module tb_filter4_sized;
  import ds_pkg::*;

  localparam int unsigned NT = 200;
  typedef int coef_t [NT];

  function automatic coef_t gen();
    coef_t h;
    for (int j = 0; j < int'(NT); j++) h[j] = ((7919 * j + 13) % 6001) - 3000;
    return h;
  endfunction

  function automatic longint sum_abs(coef_t h);
    longint s = 0;
    for (int j = 0; j < int'(NT); j++) s += (h[j] < 0) ? -h[j] : h[j];
    return s;
  endfunction

  localparam coef_t HF = gen();
  localparam int unsigned NS = 40;

  logic clk = 1'b0;
  logic rst;
  int   c[4], f[4];
  logic d[4];
  int   checks = 0, failures = 0;

  fir_harness #(.D(1), .N(16), .ARCH(ARCH_CONST_MULT), .NTAP(NT), .H(HF), .NSAMP(NS)) h1 (
    .clk(clk), .rst(rst), .checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_harness #(.D(2), .N(16), .ARCH(ARCH_CONST_MULT), .NTAP(NT), .H(HF), .NSAMP(NS)) h2 (
    .clk(clk), .rst(rst), .checks(c[1]), .failures(f[1]), .done(d[1]));
  fir_harness #(.D(4), .N(16), .ARCH(ARCH_CONST_MULT), .NTAP(NT), .H(HF), .NSAMP(NS)) h4 (
    .clk(clk), .rst(rst), .checks(c[2]), .failures(f[2]), .done(d[2]));
  fir_harness #(.D(8), .N(16), .ARCH(ARCH_CONST_MULT), .NTAP(NT), .H(HF), .NSAMP(NS)) h8 (
    .clk(clk), .rst(rst), .checks(c[3]), .failures(f[3]), .done(d[3]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40 * 36 + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1;
    check(sum_abs(HF) > (64'd1 << 18) && sum_abs(HF) <= (64'd1 << 19), "generated set gives a 35-bit output");
    check(h1.L == 35 && h2.L == 18 && h4.L == 9 && h8.L == 5, "word lengths 35, 18, 9, 5");
    $display("sum |h| = %0d, output width %0d, cycles per output: %0d %0d %0d %0d",
             sum_abs(HF), h1.BWY, h1.L, h2.L, h4.L, h8.L);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i];
      failures += f[i];
      check(c[i] >= int'(NS), "harness ran all samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
