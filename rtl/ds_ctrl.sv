// ds_ctrl: word-framing counter of a digit-serial design.
//
// A digit-serial word of L digits takes L clock cycles. This block counts the
// cycles of a word with a ceil(log2 L)-bit counter that increments every cycle
// and wraps after L-1, so a new word (a new input sample) starts every L
// cycles. From the count it derives:
//   first  - high in the cycle that carries digit 0 (the least significant
//            digit) of a word,
//   last   - high in the cycle that carries digit L-1,
//   init   - high in the last cycle of a word and during reset: tells every
//            digit-serial adder, subtractor and shift chain to load its initial
//            flip-flop value so that the next cycle starts a clean word.
// The counter value `cnt` also drives the storage enables of ds_mcm.
// Reset is synchronous and active high; the first cycle after reset is digit 0.
module ds_ctrl #(
  parameter int unsigned L  = 11,                    // digits per word
  parameter int unsigned CW = (L > 1) ? $clog2(L) : 1 // counter width
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] cnt,
  output logic          first,
  output logic          last,
  output logic          init
);

  always_ff @(posedge clk) begin
    if (rst || last) cnt <= '0;
    else             cnt <= cnt + 1'b1;
  end

  assign first = (cnt == '0);
  assign last  = (cnt == CW'(L - 1));
  assign init  = rst | last;

endmodule
