// flex_block_cipher: flexible lightweight block cipher engine with an
// iterative Speck core and a flexible Simon core behind one interface.
//
// `alg` chooses the cipher for the block started with `start`:
//   ALG_SPECK: Speck with a 128-bit block (n = 64); `speck_key` selects a
//              128-, 192- or 256-bit key (m = 2, 3, 4; 32, 33, 34 rounds).
//   ALG_SIMON: Simon in one of five block/key configurations given by
//              `simon_mode` (64/128, 96/144, 128/128, 128/192, 128/256).
// pt holds the block as {x, y} in its low 2n bits and key the m key words
// with k_0 in the low n bits. Both cores compute one round per clock; only
// the selected core is started.
// Result routing: a start always replaces the block in progress. Each core
// has an ownership flag, set when that core is started and cleared when
// the other one is (an abandoned block of the other core then finishes
// unseen). A core that is in its final round when the other core is
// started still owns that round, so back-to-back blocks of different
// algorithms both report. When an owned block finishes, done pulses and
// the output select switches to that core, so ct always holds the latest
// reported ciphertext.
// Timing: done is high for one cycle right after the T-th clock edge
// following the start edge (T = the round count of the selected
// configuration); busy is high while either core is working. Only
// encryption is provided.
// Speck and Simon cores and the variable sizes follow the design
// description; the shared interface and the algorithm select are this
// design's own.
// Lint: Verilator reports SYNCASYNCNET on rst_n because the assertion below
// uses it in `disable iff` as well as in the asynchronous register resets;
// the assertion is simulation-only, so the warning stands.
module flex_block_cipher
  import cipher_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,      // asynchronous, active low
  input  logic               start,
  input  alg_e               alg,        // sampled at start
  input  speck_key_e         speck_key,  // Speck key size, sampled at start
  input  simon_mode_e        simon_mode, // Simon configuration, sampled at start
  input  logic [BLOCK_W-1:0] pt,
  input  logic [KEY_W-1:0]   key,
  output logic [BLOCK_W-1:0] ct,
  output logic               done,
  output logic               busy
);

  logic               speck_start, simon_start;
  logic [BLOCK_W-1:0] speck_ct, simon_ct;
  logic               speck_done, simon_done, speck_busy, simon_busy;
  logic               speck_last, simon_last;
  logic               speck_own, simon_own;   // block in the core is wanted
  logic               speck_rep, simon_rep;   // core's done is reported
  alg_e               out_sel;

  assign speck_start = start && (alg == ALG_SPECK);
  assign simon_start = start && (alg == ALG_SIMON);

  speck_encrypt #(.N(WORD_W)) u_speck (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (speck_start),
    .key_words(speck_key),
    .pt       (pt),
    .key      (key),
    .ct       (speck_ct),
    .done     (speck_done),
    .busy     (speck_busy),
    .last     (speck_last)
  );

  simon_encrypt u_simon (
    .clk  (clk),
    .rst_n(rst_n),
    .start(simon_start),
    .mode (simon_mode),
    .pt   (pt),
    .key  (key),
    .ct   (simon_ct),
    .done (simon_done),
    .busy (simon_busy),
    .last (simon_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      speck_own <= 1'b0;
      simon_own <= 1'b0;
      speck_rep <= 1'b0;
      simon_rep <= 1'b0;
      out_sel   <= ALG_SPECK;
    end else begin
      if (speck_start)      speck_own <= 1'b1;
      else if (simon_start) speck_own <= 1'b0;
      if (simon_start)      simon_own <= 1'b1;
      else if (speck_start) simon_own <= 1'b0;
      // the cores capture ct and raise done on the same edge
      speck_rep <= speck_last && speck_own;
      simon_rep <= simon_last && simon_own;
      if (speck_last && speck_own)      out_sel <= ALG_SPECK;
      else if (simon_last && simon_own) out_sel <= ALG_SIMON;
    end
  end

  assign ct   = (out_sel == ALG_SPECK) ? speck_ct : simon_ct;
  assign done = (speck_done && speck_rep) || (simon_done && simon_rep);
  assign busy = speck_busy || simon_busy;

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    !(speck_own && simon_own));

endmodule
