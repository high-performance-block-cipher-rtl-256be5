// simon_key_schedule: flexible on-the-fly Simon key expansion, one round
// key per clock, for the five supported configurations (n = 32, 48, 64
// bits per word; m = 2, 3, 4 key words).
//
// Four 64-bit word registers kw[0..3] hold k_i .. k_{i+m-1}; only the low
// n bits are used and the rest stay zero. On `load` the master key, packed
// as m contiguous n-bit words with k_0 in the low bits, is split into the
// registers. Each `step` cycle computes
//   t         = (k_{i+m-1} >>> 3) [xor k_{i+1} when m = 4]
//   t         = t xor (t >>> 1)
//   k_{i+m}   = ~k_i xor t xor z_j[i mod 62] xor 3
// and shifts the registers down by one with k_{i+m} entering at kw[m-1].
// A 6-bit counter walks the 62-bit constant sequence z_j of the
// configuration. Timing: rk = k_0 after the load edge, k_j after j steps.
// Variable key and block sizes follow the design description; the
// expansion is the published Simon key schedule.
module simon_key_schedule
  import cipher_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,   // asynchronous, active low
  input  logic          load,
  input  logic          step,
  input  simon_mode_e   mode,    // sampled at load
  input  logic [KEY_W-1:0] key,
  output word_t         rk       // current round key k_i
);

  word_t       kw [4];
  simon_mode_e mode_q;
  logic [5:0]  zi;

  wsize_e      ws_q;
  logic [2:0]  m_q;
  logic [61:0] z_q;
  assign ws_q = simon_wsize(mode_q);
  assign m_q  = 3'(simon_m(mode_q));
  assign z_q  = simon_z(mode_q);

  // Key words of the master key for the load.
  function automatic word_t key_word(logic [KEY_W-1:0] kin, int unsigned j,
                                     wsize_e w);
    case (w)
      W32:     return word_t'(kin[32*j +: 32]);
      W48:     return word_t'(kin[48*j +: 48]);
      default: return kin[64*j +: 64];
    endcase
  endfunction

  word_t t_a, t_b, k_new;
  always_comb begin
    t_a = rotr_w(kw[2'(m_q - 3'd1)], 3, ws_q);
    if (m_q == 4) t_a = t_a ^ kw[1];
    t_b   = t_a ^ rotr_w(t_a, 1, ws_q);
    k_new = (~kw[0] ^ t_b ^ word_t'(z_q[zi]) ^ word_t'(3)) & wmask(ws_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kw     <= '{default: '0};
      mode_q <= SIMON_128_128;
      zi     <= '0;
    end else if (load) begin
      for (int j = 0; j < 4; j++) kw[j] <= key_word(key, j, simon_wsize(mode));
      mode_q <= mode;
      zi     <= '0;
    end else if (step) begin
      for (int j = 0; j < 3; j++) begin
        if (3'(j + 1) < m_q) kw[j] <= kw[j+1];
      end
      kw[2'(m_q - 3'd1)] <= k_new;
      zi        <= (zi == 6'd61) ? 6'd0 : zi + 6'd1;
    end
  end

  assign rk = kw[0];

endmodule
