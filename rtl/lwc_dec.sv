// lwc_dec: fixed limited-weight code decoder, the inverse of lwc_enc.
//
// A (K+1)-bit codeword whose top bit is set carries the inverted symbol in
// its low K bits; otherwise the low bits are the symbol. The same mapping
// folds any weight-limited 9-bit codeword one-to-one onto an 8-bit value,
// which ci_decoder uses to index its 256-entry decode table.
//
// Purely combinational.
module lwc_dec #(
  parameter int unsigned K = 8
) (
  input  logic [K:0]   cw,
  output logic [K-1:0] data
);
  always_comb data = cw[K] ? ~cw[K-1:0] : cw[K-1:0];
endmodule
