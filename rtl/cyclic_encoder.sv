// cyclic_encoder: combinational systematic encoder of a binary cyclic code.
//
// The message msg (K bits, msg[K-1] is the highest-order coefficient) is
// treated as a polynomial u(x); the R parity bits are the remainder
//   p(x) = u(x) * x^R  mod  g(x)
// so that [msg | parity] is a codeword of the code generated by g(x).
// G holds the low R coefficients of the degree-R generator (x^R implied).
// The remainder is formed exactly as the classic serial LFSR divider would
// form it, one message bit per step, but with all K steps unrolled into one
// XOR network; the result is therefore available in the same cycle.
// ECC-Map uses this encoder, with R = m, as its family of mapping functions;
// that it is a systematic cyclic encoder follows the published architecture, while the
// fully parallel (unrolled) form is this design's choice.
module cyclic_encoder #(
  parameter int unsigned K = 1013,          // information bits
  parameter int unsigned R = 10,            // redundancy (= m)
  parameter logic [R-1:0] G = R'('h9)       // g(x) = x^10 + x^3 + 1
) (
  input  logic [K-1:0] msg,
  output logic [R-1:0] parity
);

  always_comb begin
    logic [R-1:0] rem;
    logic         fb;
    rem = '0;
    for (int j = K - 1; j >= 0; j--) begin
      fb  = msg[j] ^ rem[R-1];
      rem = {rem[R-2:0], 1'b0} ^ (fb ? G : '0);
    end
    parity = rem;
  end

endmodule
