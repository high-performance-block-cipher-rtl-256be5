// speck_key_schedule: on-the-fly Speck key expansion for keys of m = 2, 3
// or 4 words, one round key per clock.
//
// Registers: kreg holds the current round key k_i; lreg[0..m-2] form a
// shift register of the words l_i .. l_{i+m-2}. With `load` high the master
// key words are loaded (key[N-1:0] = k_0, key[2N-1:N] = l_0, ...). Each
// cycle with `step` high and `load` low the schedule advances by one:
//   l_{i+m-1} = ((l_i >>> alpha) + k_i) xor i
//   k_{i+1}   = (k_i <<< beta) xor l_{i+m-1}
// which is the Speck round function with the round index i as its key, so
// it reuses speck_round (and its Sklansky adder). The new l word enters at
// position m-2 of the shift register, the others move down by one.
// Timing: after the load edge rk = k_0; after j step edges rk = k_j.
// Loading the key words on start and running the word registers as a
// shift register follows the design description; the register naming and
// the runtime choice of m are this design's own.
module speck_key_schedule
  import cipher_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,      // asynchronous, active low
  input  logic           load,       // load master key
  input  logic           step,       // advance one round
  input  speck_key_e     key_words,  // m, sampled at load
  input  logic [4*N-1:0] key,        // master key, k_0 in the low word
  input  logic [RND_W-1:0] rnd,      // index i of the round key in kreg
  output logic [N-1:0]   rk          // current round key k_i
);

  logic [N-1:0] kreg;
  logic [N-1:0] lreg [3];
  speck_key_e   m_q;

  logic [N-1:0] l_new, k_new;

  speck_round #(.N(N)) u_rf (
    .x    (lreg[0]),
    .y    (kreg),
    .k    (N'(rnd)),
    .x_out(l_new),
    .y_out(k_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kreg <= '0;
      lreg <= '{default: '0};
      m_q  <= SPECK_KEY_2W;
    end else if (load) begin
      kreg    <= key[N-1:0];
      lreg[0] <= key[2*N-1:N];
      lreg[1] <= key[3*N-1:2*N];
      lreg[2] <= key[4*N-1:3*N];
      m_q     <= key_words;
    end else if (step) begin
      kreg <= k_new;
      case (m_q)
        SPECK_KEY_2W: lreg[0] <= l_new;
        SPECK_KEY_3W: begin
          lreg[0] <= lreg[1];
          lreg[1] <= l_new;
        end
        default: begin
          lreg[0] <= lreg[1];
          lreg[1] <= lreg[2];
          lreg[2] <= l_new;
        end
      endcase
    end
  end

  assign rk = kreg;

endmodule
