// lwc_enc: fixed limited-weight code (LWC) encoder.
//
// Maps a K-bit symbol onto a (K+1)-bit codeword whose weight (number of
// ones) is at most K/2. It counts the ones in the symbol; if there are more
// than K/2 it sends the inverted symbol with the extra top bit set,
// otherwise the symbol itself with the top bit clear. For K = 8 this is the
// perfect 4-LWC on nine wires (1+9+36+84+126 = 256 codewords); for K = 4 it
// is the perfect 2-LWC on five wires. The population-count-and-invert
// structure is the one the code is known for; K must be even.
//
// Purely combinational: cw follows data in the same cycle.
module lwc_enc #(
  parameter int unsigned K = 8
) (
  input  logic [K-1:0] data,
  output logic [K:0]   cw
);
  import cic_pkg::*;

  initial assert (K % 2 == 0 && K <= 32) else $error("lwc_enc: K must be even and at most 32");

  always_comb begin
    if (popcount(32'(data)) > K / 2) cw = {1'b1, ~data};
    else                             cw = {1'b0, data};
  end
endmodule
