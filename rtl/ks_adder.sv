// ks_adder: Kogge-Stone parallel-prefix adder, the adder inside every PE.
//
// Three stages, as in a textbook carry look-ahead adder:
//   1. bitwise PG: p_i = a_i | b_i, g_i = a_i & b_i (the inclusive-OR
//      propagate of the original; the sum stage uses a_i ^ b_i separately);
//   2. group PG: log2(W) levels of the pg_combine operator, each level k
//      combining bit i with bit i - 2^k, so after the last level g of bit i
//      is the carry out of bits [i:0] (the Kogge-Stone network, no fan-in
//      reduction);
//   3. sum: s_i = a_i ^ b_i ^ c_i, c_0 = cin, c_{i+1} = G[i:0] | P[i:0].cin.
// Purely combinational; sum = a + b + cin, cout is the carry out of bit W-1.
// The three-stage structure and the operator follow the original design;
// folding cin into the group terms in the sum stage is this implementation's
// choice.
module ks_adder
  import fold_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // pg[k][i]: group PG of bits [i : max(0, i-2^k+1)] after k levels.
  pg_t pg [LEVELS+1][W];
  logic [W:0] carry;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      pg[0][i].p = a[i] | b[i];
      pg[0][i].g = a[i] & b[i];
    end
    for (int k = 0; k < LEVELS; k++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << k)) pg[k+1][i] = pg_combine(pg[k][i], pg[k][i-(1<<k)]);
        else               pg[k+1][i] = pg[k][i];
      end
    end
    carry[0] = cin;
    for (int i = 0; i < W; i++) begin
      carry[i+1] = pg[LEVELS][i].g | (pg[LEVELS][i].p & cin);
    end
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ carry[i];
    end
    cout = carry[W];
  end

endmodule
