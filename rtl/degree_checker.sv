// degree_checker: tells whether a value reaches the field length.
//
// The field-length word `fl` is one-hot, with bit m set. The output is the
// OR of the bitwise AND of `din` and `fl`: one level of AND gates and an
// OR tree, instead of a wide multiplexer that picks bit m of `din`.
// For a polynomial whose degree is at most m this flags degree == m (the
// reduction decision of a doubling in GF(2^m)); for a thermometer counter
// it flags that the count has reached m. Purely combinational.
module degree_checker #(
  parameter int unsigned W = 522
) (
  input  logic [W-1:0] din,
  input  logic [W-1:0] fl,
  output logic         dout
);
  assign dout = |(din & fl);
endmodule
