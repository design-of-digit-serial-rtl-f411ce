// mcm_harness: drives one ds_mcm instance with random signed samples and
// checks every product against TGT[t] * x computed directly.
//
// Samples are streamed as sign-extended words of L = ceil((bw + N) / d)
// digits, least significant digit first, starting on the design's `first`
// flag; the first samples are the extreme values +max and -max-1. For every
// sample the harness checks that `valid` rises exactly L cycles after digit 0
// and that every product is right. `done` rises after NSAMP samples.
module mcm_harness
  import ds_pkg::*;
#(
  parameter int unsigned D     = 2,
  parameter int unsigned N     = 16,
  parameter int unsigned NOPS  = 3,
  parameter aop_t [NOPS-1:0] OPS = {aop(2, 0, 1, 1, 1'b0),
                                    aop(1, 2, 0, 0, 1'b0),
                                    aop(0, 3, 0, 0, 1'b1)},
  parameter int unsigned NT    = 2,
  parameter int          TGT [NT] = '{29, 43},
  parameter int unsigned NSAMP = 100
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);

  function automatic int unsigned max_bits();
    int unsigned m = 1;
    for (int t = 0; t < NT; t++)
      if (bitlen((TGT[t] < 0) ? longint'(-TGT[t]) : longint'(TGT[t])) > m)
        m = bitlen((TGT[t] < 0) ? longint'(-TGT[t]) : longint'(TGT[t]));
    return m;
  endfunction

  localparam int unsigned BW = max_bits();
  localparam int unsigned PW = BW + N;
  localparam int unsigned L  = (PW + D - 1) / D;

  logic                   first, valid;
  logic [D-1:0]           x;
  logic [NT-1:0][PW-1:0]  prod;

  ds_mcm #(.D(D), .N(N), .NOPS(NOPS), .OPS(OPS), .NT(NT), .TGT(TGT)) dut (
    .clk(clk), .rst(rst), .x(x), .first(first), .valid(valid), .prod(prod));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10) $display("FAIL (d=%0d): %s", D, what);
    end
  endtask

  initial begin
    logic signed [N-1:0] xs;
    logic [D*L-1:0]      xw;
    longint              t0;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    x        = '0;
    @(negedge clk iff (!rst && first));
    for (int n = 0; n < int'(NSAMP); n++) begin
      xs = (n == 0) ? {1'b0, {(N-1){1'b1}}} : (n == 1) ? {1'b1, {(N-1){1'b0}}} : N'($urandom);
      xw = (D*L)'(longint'(xs));
      check(first, "word starts on digit 0");
      t0 = $time;
      for (int k = 0; k < int'(L); k++) begin
        x = xw[D*k +: D];
        @(negedge clk);
      end
      check(valid && ($time - t0) / 10 == L, $sformatf("valid %0d cycles after digit 0", L));
      for (int t = 0; t < int'(NT); t++)
        check(prod[t] == PW'(longint'(TGT[t]) * longint'(xs)),
              $sformatf("%0d * %0d gave %0d", TGT[t], xs, $signed(prod[t])));
    end
    done = 1'b1;
  end
endmodule
