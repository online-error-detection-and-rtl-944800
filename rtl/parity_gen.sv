// Even parity generator.
//
// Every value written into a protected register file is stored together with
// one parity bit, chosen so that the stored word (value and parity) holds an
// even number of ones: 00110011 is stored with parity 0. The bit is computed
// once, when the value is produced, and is never recomputed afterwards; the
// recovery sequence inverts and moves it as an ordinary bit of the word.
// The stored word is {parity, data}.
// Using even parity is a choice of this design; any single-bit error
// detection code would serve. Purely combinational.
module parity_gen #(
  parameter int unsigned W = 64          // value width
) (
  input  logic [W-1:0] data,             // value to protect
  output logic         parity            // stored as the word's top bit
);

  always_comb parity = ^data;

endmodule
