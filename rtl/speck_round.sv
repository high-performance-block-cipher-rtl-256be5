// speck_round: one Speck round, the combinational part of the iterative
// datapath.
//
//   x' = ((x >>> ALPHA) + y) xor k
//   y' = (y <<< BETA) xor x'
//
// x is the upper word of the block (P[2n-1:n], register Reg2 of the
// datapath) and y the lower word (P[n-1:0], Reg1). The addition is modulo
// 2^N and uses the Sklansky prefix adder. The same function, with the
// round index in place of k, advances the Speck key schedule.
// Structure (one rotate-right, one adder, XOR with the round key, one
// rotate-left, XOR) follows the datapath figure of the design description;
// ALPHA/BETA are the published Speck rotation amounts (7/2 for N=16,
// 8/3 otherwise). Purely combinational.
module speck_round #(
  parameter int unsigned N     = 64,
  parameter int unsigned ALPHA = cipher_pkg::speck_alpha(N),
  parameter int unsigned BETA  = cipher_pkg::speck_beta(N)
) (
  input  logic [N-1:0] x,       // upper word
  input  logic [N-1:0] y,       // lower word
  input  logic [N-1:0] k,       // round key
  output logic [N-1:0] x_out,   // C[2n-1:n]
  output logic [N-1:0] y_out    // C[n-1:0]
);

  logic [N-1:0] x_rot, y_rot, sum;

  assign x_rot = (x >> ALPHA) | (x << (N - ALPHA));
  assign y_rot = (y << BETA)  | (y >> (N - BETA));

  sklansky_adder #(.N(N)) u_add (
    .a(x_rot),
    .b(y),
    .s(sum)
  );

  assign x_out = sum ^ k;
  assign y_out = y_rot ^ x_out;

endmodule
