// tb_speck_key_schedule: loads random 128/192/256-bit keys (m = 2, 3, 4)
// into the n = 64 key schedule and compares the round key after every
// step with the reference expansion, over all 32/33/34 rounds.
module tb_speck_key_schedule;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  speck_key_e kw;
  logic [255:0] key;
  logic [RND_W-1:0] rnd;
  logic [63:0] rk;
  int checks = 0, failures = 0;

  speck_key_schedule dut (.clk, .rst_n, .load, .step, .key_words(kw), .key, .rnd, .rk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wkeys_t ref_k;
    int m;
    rnd = '0; kw = SPECK_KEY_2W; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      m = 2 + (t % 3);
      kw = speck_key_e'(m - 2);
      key = rand256();
      speck_keys(64, m, key, ref_k);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0; step = 1; rnd = '0;
      for (int i = 0; i < speck_T(64, m); i++) begin
        checks++;
        if (rk !== ref_k[i]) begin
          failures++;
          $display("FAIL m=%0d round %0d: rk=%h expected %h", m, i, rk, ref_k[i]);
        end
        @(negedge clk); rnd = rnd + 1'b1;
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
