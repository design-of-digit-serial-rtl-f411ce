// ds_storage: digit-serial to bit-parallel conversion.
//
// A shift register of NDIG digits, organised as D layers (one per bit of a
// digit) of NDIG flip-flops each. Each enabled cycle the new digit enters at
// the most significant end and every stored digit moves one place towards the
// least significant end, so after NDIG enabled cycles the first digit of the
// word (its least significant digit) sits in the lowest D bits and the whole
// word is available in parallel on `word`.
//
// Timing: `word` is the register output; it holds the complete word in the
// cycle after the digit that completed it was shifted in, and keeps it as long
// as `shift` stays low.
module ds_storage #(
  parameter int unsigned D    = 2,      // digit size d
  parameter int unsigned NDIG = 4       // ceil(bw/d) digits stored
) (
  input  logic              clk,
  input  logic              shift,      // shift the digit in this cycle
  input  logic [D-1:0]      digit,
  output logic [D*NDIG-1:0] word
);

  if (NDIG == 1) begin : g_one
    always_ff @(posedge clk) if (shift) word <= digit;
  end else begin : g_many
    always_ff @(posedge clk) if (shift) word <= {digit, word[D*NDIG-1:D]};
  end

endmodule
