// ds_wordreg: one sample delay (z^-1) of a digit-serial filter chain.
//
// In the transposed FIR filter each delay element holds one partial sum. With
// words of L digits streamed back to back, one sample period is L clock
// cycles, so the delay is a chain of L digit registers: d layers of L
// flip-flops each. A word that enters at digit k of one sample period leaves at
// digit k of the next, so word boundaries stay aligned to the frame counter.
//
// Timing: q is a delayed by exactly L cycles. There is no reset: the contents
// before the first full sample period are whatever was shifted in; callers
// that need a clean start clear the chain with `clr`.
module ds_wordreg #(
  parameter int unsigned D = 2,         // digit size d
  parameter int unsigned L = 4          // digits per word (delay in cycles)
) (
  input  logic         clk,
  input  logic         clr,             // synchronous clear of all stages
  input  logic [D-1:0] a,
  output logic [D-1:0] q
);

  logic [L-1:0][D-1:0] stage;           // stage[L-1] is the newest digit

  if (L == 1) begin : g_one
    always_ff @(posedge clk) begin
      if (clr) stage <= '0;
      else     stage <= a;
    end
  end else begin : g_many
    always_ff @(posedge clk) begin
      if (clr) stage <= '0;
      else     stage <= {a, stage[L-1:1]};
    end
  end

  assign q = stage[0];

endmodule
