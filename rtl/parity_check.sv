// Even parity checker.
//
// Flags an error when a stored word (value plus its parity bit, as produced
// by parity_gen) holds an odd number of ones. This detects any single-bit
// error, including one in the parity bit itself, but cannot locate it; the
// erratic-bit recovery sequence is what locates a stuck bit. Combinational.
module parity_check #(
  parameter int unsigned W = 64          // value width, parity excluded
) (
  input  logic [W:0] word,               // {parity, value} as read
  output logic       error               // 1: odd number of ones
);

  always_comb error = ^word;

endmodule
