// ds_shift: digit-serial left shift with taps for every shift amount 0..MLS.
//
// In a digit-serial stream a left shift by ls bits is a delay of ls bit
// positions. Bit i of the incoming digit must appear at bit (i+ls) mod d of a
// later digit, which takes floor(ls/d) flip-flops for the lower input bits and
// ceil(ls/d) for the upper ones; the flip-flops of each bit position form a
// chain ("layer"). One chain built for the largest shift MLS gives every
// smaller shift for free, so a node of an MCM network needs only one of these
// blocks. Here the d layers are kept as one MLS-bit history vector of the most
// recent stream bits: {a, hist} is the bit stream, newest bit first, and tap
// ls is the d-bit window that starts ls bits back. The flip-flop count is MLS,
// the sum of the per-layer counts.
//
// `init` clears the history so that zeros are shifted into the bottom of a new
// word; assert it in the last cycle of every word and during reset.
//
// Timing: taps[0] is a itself; all taps are combinational in a and the
// history; one digit per cycle.
module ds_shift #(
  parameter int unsigned D   = 2,       // digit size d
  parameter int unsigned MLS = 3        // largest left shift, in bits
) (
  input  logic                 clk,
  input  logic                 init,
  input  logic [D-1:0]         a,
  output logic [MLS:0][D-1:0]  taps     // taps[ls] = a shifted left by ls bits
);

  if (MLS == 0) begin : g_none
    assign taps[0] = a;
  end else begin : g_chain
    logic [MLS-1:0]   hist;             // hist[MLS-1] is the most recent bit
    logic [D+MLS-1:0] stream;

    assign stream = {a, hist};

    for (genvar ls = 0; ls <= MLS; ls++) begin : g_tap
      assign taps[ls] = stream[MLS-ls +: D];
    end

    always_ff @(posedge clk) begin
      if (init) hist <= '0;
      else      hist <= stream[D+MLS-1 -: MLS];
    end
  end

endmodule
