// berger_checker - self-checking Berger code checker with a two-rail output.
//
// The checker recomputes the Berger check symbol of the information bits
// (binary count of their zeros) and compares it with the received check
// bits through a chain of two-rail checker cells. Bit j of the recomputed
// count and the complement of received check bit j form a two-rail pair,
// which is complementary exactly when the two agree. A two-rail cell joins
// two pairs (a0,b0), (a1,b1) into z1 = a0&a1 | b0&b1, z2 = a0&b1 | b0&a1,
// which is again complementary only if both pairs were. The output pair z
// is therefore 01 or 10 for a codeword and 00 or 11 otherwise; err, the
// single error indication passed on to the glue logic, is high when the two
// rails agree.
//
// The source of the method uses a published Berger checker without giving
// its insides; this zero counter with a two-rail reduction is this design's
// own implementation of that function.
//
// Interface: purely combinational. info[R], check[K], z[1:0], err.
module berger_checker #(
  parameter int unsigned R = 2,
  parameter int unsigned K = $clog2(R + 1)
) (
  input  logic [R-1:0] info,
  input  logic [K-1:0] check,
  output logic [1:0]   z,
  output logic         err
);

  logic [K-1:0] zeros;
  logic         z1, z2, a1, b1;

  always_comb begin
    zeros = '0;
    for (int unsigned i = 0; i < R; i++) zeros = zeros + K'(!info[i]);
  end

  // Two-rail reduction over the K pairs (zeros[j], ~check[j]).
  always_comb begin
    z1 = zeros[0];
    z2 = ~check[0];
    for (int unsigned j = 1; j < K; j++) begin
      a1 = zeros[j];
      b1 = ~check[j];
      {z1, z2} = {(z1 & a1) | (z2 & b1), (z1 & b1) | (z2 & a1)};
    end
  end

  assign z     = {z1, z2};
  assign err   = ~(z1 ^ z2);

endmodule
