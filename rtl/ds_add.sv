// ds_add: digit-serial adder.
//
// Adds two operands that arrive d bits per clock cycle, least significant
// digit first. It is a ripple of D full adders whose carry out of the top bit
// is kept in one flip-flop and fed back as the carry in of the next digit, as
// in the classic digit-serial adder. The carry flip-flop is loaded with 0
// whenever `init` is high, so `init` must be asserted in the last cycle of a
// word (and during reset); the next cycle then starts a new word.
//
// Timing: s is combinational in a and b; one digit in, one digit out per cycle,
// no latency. Cost: D full adders and one flip-flop.
module ds_add #(
  parameter int unsigned D = 2          // digit size d
) (
  input  logic         clk,
  input  logic         init,            // load the carry flip-flop with 0
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic         carry_q;
  logic [D:0]   c;                      // ripple carries, c[0] = stored carry

  assign c[0] = carry_q;

  // Ripple of D full adders.
  for (genvar i = 0; i < D; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  always_ff @(posedge clk) begin
    if (init) carry_q <= 1'b0;
    else      carry_q <= c[D];
  end

endmodule
