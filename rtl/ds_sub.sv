// ds_sub: digit-serial subtractor, s = a - b.
//
// Same structure as the digit-serial adder, with b inverted by D inverters
// (two's complement) and the carry flip-flop loaded with 1 instead of 0, so
// the first digit of a word gets the +1 of the two's complement. `init` loads
// the carry flip-flop and must be high in the last cycle of every word and
// during reset.
//
// Timing: s is combinational in a and b; one digit per cycle, no latency.
// Cost: D full adders, D inverters, one flip-flop.
module ds_sub #(
  parameter int unsigned D = 2          // digit size d
) (
  input  logic         clk,
  input  logic         init,            // load the carry flip-flop with 1
  input  logic [D-1:0] a,
  input  logic [D-1:0] b,
  output logic [D-1:0] s
);

  logic         carry_q;
  logic [D:0]   c;
  logic [D-1:0] nb;

  assign nb   = ~b;
  assign c[0] = carry_q;

  // Ripple of D full adders.
  for (genvar i = 0; i < D; i++) begin : g_fa
    assign s[i]   = a[i] ^ nb[i] ^ c[i];
    assign c[i+1] = (a[i] & nb[i]) | (c[i] & (a[i] ^ nb[i]));
  end

  always_ff @(posedge clk) begin
    if (init) carry_q <= 1'b1;
    else      carry_q <= c[D];
  end

endmodule
