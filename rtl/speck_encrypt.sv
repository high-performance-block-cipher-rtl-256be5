// speck_encrypt: iterative Speck encryption core, one round per clock.
//
// Datapath: Reg1 holds the lower block word y, Reg2 the upper word x. In
// the cycle where `start` is high the plaintext is loaded through the
// input multiplexers (P[n-1:0] into Reg1, P[2n-1:n] into Reg2) and the key
// schedule loads the master key. In every later cycle the multiplexers
// select the round output C, so the intermediate state stays in the same
// two registers. The round function (rotate-right, Sklansky modular adder,
// XOR with k_i, rotate-left, XOR) is in speck_round; the round keys come
// from speck_key_schedule, one per cycle.
//
// Interface: pt and key are sampled on the clock edge where start = 1;
// key_words selects m = 2, 3 or 4 key words, which sets the round count
// T (32, 33, 34 for N = 64). The ciphertext C = {x, y} of the last round
// is captured in the ct register.
// Timing: with start sampled at edge 0, the round with key k_i is computed
// in the cycle after edge i, and ct is valid with a one-cycle `done` pulse
// after edge T. busy is high from edge 0 to edge T. start always restarts
// the core; a start sampled on edge T itself (the edge that captures ct)
// overlaps with the last round, so back-to-back blocks take T cycles each.
// The two-register datapath with start-controlled multiplexers follows the
// design description; the ct register, busy/done and reset are this
// design's own.
// Lint: Verilator reports SYNCASYNCNET on rst_n because the assertion below
// uses it in `disable iff` as well as in the asynchronous register resets;
// the assertion is simulation-only, so the warning stands.
module speck_encrypt
  import cipher_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,      // asynchronous, active low
  input  logic           start,      // load plaintext and key
  input  speck_key_e     key_words,  // m = 2, 3 or 4 key words
  input  logic [2*N-1:0] pt,         // {x, y}
  input  logic [4*N-1:0] key,        // k_0 in the low word
  output logic [2*N-1:0] ct,         // {x, y} after T rounds
  output logic           done,       // one-cycle pulse, ct valid
  output logic           busy,
  output logic           last        // final round in progress: ct is
                                     // captured on the next clock edge
);

  logic [N-1:0]     reg1, reg2;      // y and x
  logic [RND_W-1:0] rnd;
  logic [RND_W-1:0] last_rnd;
  logic [N-1:0]     rk;
  logic [N-1:0]     c_hi, c_lo;

  speck_key_schedule #(.N(N)) u_ks (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (start),
    .step     (busy),
    .key_words(key_words),
    .key      (key),
    .rnd      (rnd),
    .rk       (rk)
  );

  speck_round #(.N(N)) u_round (
    .x    (reg2),
    .y    (reg1),
    .k    (rk),
    .x_out(c_hi),
    .y_out(c_lo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1     <= '0;
      reg2     <= '0;
      rnd      <= '0;
      last_rnd <= '0;
      busy     <= 1'b0;
    end else if (start) begin
      reg1     <= pt[N-1:0];
      reg2     <= pt[2*N-1:N];
      rnd      <= '0;
      last_rnd <= RND_W'(speck_rounds(N, speck_m(key_words)) - 1);
      busy     <= 1'b1;
    end else if (busy) begin
      reg1 <= c_lo;
      reg2 <= c_hi;
      rnd  <= rnd + 1'b1;
      if (rnd == last_rnd) busy <= 1'b0;
    end
  end

  assign last = busy && (rnd == last_rnd);

  // Output register: captures the round output of the final round.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct   <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (last) ct <= {c_hi, c_lo};
    end
  end

  a_key_words_valid: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (key_words inside {SPECK_KEY_2W, SPECK_KEY_3W, SPECK_KEY_4W}));

endmodule
