// sklansky_adder: N-bit modular adder, s = (a + b) mod 2^N, built as a
// Sklansky parallel-prefix adder.
//
// The modular adder is the element on the critical path of a Speck round,
// so it is built as a parallel-prefix tree instead of a ripple chain.
// Bit generate/propagate pairs (g = a&b, p = a^b) are combined in
// ceil(log2 N) levels. At level l every bit i whose bit l is set takes the
// group (g,p) of the last bit of the block of 2^l bits below it, which
// gives the divide-and-conquer fan-out pattern of the Sklansky tree. After
// the last level g[i] is the carry out of bits i..0; the carry into bit 0
// is zero and the carry out of bit N-1 is dropped (mod 2^N).
// Purely combinational; depth log2(N) prefix levels plus one XOR.
// The use of a Sklansky prefix adder follows the design description; the
// gate-level form of the prefix cells is the textbook one.
module sklansky_adder #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] g [LEVELS+1];
  logic [N-1:0] p [LEVELS+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i >> l) & 1) == 1) begin : g_combine
        // last bit of the preceding block of 2^l bits
        localparam int unsigned J = ((i >> l) << l) - 1;
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][J]);
        assign p[l+1][i] = p[l][i] & p[l][J];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // carry into bit i is the group generate of bits i-1..0
  logic [N-1:0] carry;
  assign carry = {g[LEVELS][N-2:0], 1'b0};
  assign s     = p[0] ^ carry;

endmodule
