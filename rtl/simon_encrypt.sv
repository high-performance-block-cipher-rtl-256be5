// simon_encrypt: flexible iterative Simon encryption core, one round per
// clock, supporting block sizes of 64, 96 and 128 bits and key sizes of
// 128, 144, 192 and 256 bits in the combinations 64/128, 96/144, 128/128,
// 128/192 and 128/256 (selected by `mode`).
//
// Two 64-bit word registers hold x (upper block word) and y (lower word);
// for n = 32 or 48 only their low n bits are used. On `start` the
// plaintext, packed as {x, y} in the low 2n bits of pt, is loaded and the
// key schedule loads the key (m n-bit words packed in the low m*n bits of
// key). Every later cycle stores the round output of simon_round back into
// the same registers, using the round key of simon_key_schedule.
// Timing: with start sampled at edge 0, ct (packed like pt, upper bits
// zero) is valid with a one-cycle `done` pulse after edge T, where T is
// 44, 54, 68, 69 or 72 for the five modes. busy is high in between; start
// always restarts the core, and a start on edge T overlaps with the last
// round, so back-to-back blocks take T cycles each.
// Support for variable block and key sizes and the XOR tree follow the
// design description; the register-level organisation (the same one as the
// Speck core), the packing, busy/done and reset are this design's own.
// Lint: Verilator reports SYNCASYNCNET on rst_n because the assertion below
// uses it in `disable iff` as well as in the asynchronous register resets;
// the assertion is simulation-only, so the warning stands.
module simon_encrypt
  import cipher_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,   // asynchronous, active low
  input  logic             start,
  input  simon_mode_e      mode,    // sampled at start
  input  logic [BLOCK_W-1:0] pt,    // {x, y} in the low 2n bits
  input  logic [KEY_W-1:0] key,     // m words, k_0 in the low n bits
  output logic [BLOCK_W-1:0] ct,
  output logic             done,
  output logic             busy,
  output logic             last     // final round in progress: ct is
                                    // captured on the next clock edge
);

  word_t       xreg, yreg;
  rnd_t        rnd, last_rnd;
  wsize_e      ws_q;
  word_t       rk, c_x, c_y;

  function automatic word_t upper_word(logic [BLOCK_W-1:32] b, wsize_e w);
    case (w)
      W32:     return word_t'(b[63:32]);
      W48:     return word_t'(b[95:48]);
      default: return b[127:64];
    endcase
  endfunction

  function automatic logic [BLOCK_W-1:0] pack(word_t xw, word_t yw,
                                              wsize_e w);
    case (w)
      W32:     return BLOCK_W'({xw[31:0], yw[31:0]});
      W48:     return BLOCK_W'({xw[47:0], yw[47:0]});
      default: return {xw, yw};
    endcase
  endfunction

  simon_key_schedule u_ks (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start),
    .step (busy),
    .mode (mode),
    .key  (key),
    .rk   (rk)
  );

  simon_round u_round (
    .wsize(ws_q),
    .x    (xreg),
    .y    (yreg),
    .k    (rk),
    .x_out(c_x),
    .y_out(c_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xreg     <= '0;
      yreg     <= '0;
      rnd      <= '0;
      last_rnd <= '0;
      ws_q     <= W64;
      busy     <= 1'b0;
    end else if (start) begin
      xreg     <= upper_word(pt[BLOCK_W-1:32], simon_wsize(mode));
      yreg     <= pt[WORD_W-1:0] & wmask(simon_wsize(mode));
      rnd      <= '0;
      last_rnd <= simon_rounds(mode) - 1'b1;
      ws_q     <= simon_wsize(mode);
      busy     <= 1'b1;
    end else if (busy) begin
      xreg <= c_x;
      yreg <= c_y;
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
      if (last) ct <= pack(c_x, c_y, ws_q);
    end
  end

  a_mode_valid: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (mode inside {SIMON_64_128, SIMON_96_144, SIMON_128_128,
                            SIMON_128_192, SIMON_128_256}));

endmodule
