// tb_simon_key_schedule: loads random keys in each of the five Simon
// configurations and compares every round key with the reference key
// expansion (which reads the z sequences from their character-string
// form), over all 44/54/68/69/72 rounds.
module tb_simon_key_schedule;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  simon_mode_e mode;
  logic [255:0] key;
  word_t rk;
  int checks = 0, failures = 0;

  simon_key_schedule dut (.clk, .rst_n, .load, .step, .mode, .key, .rk);

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
    int n, m, T, zj;
    mode = SIMON_128_128; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 25; t++) begin
      simon_cfg(t % 5, n, m, T, zj);
      mode = simon_mode_e'(t % 5);
      key = rand256();
      simon_keys(t % 5, key, ref_k);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0; step = 1;
      mode = simon_mode_e'((t + 1) % 5);        // mode is used only at load
      for (int i = 0; i < T; i++) begin
        checks++;
        if (rk !== ref_k[i]) begin
          failures++;
          $display("FAIL mode=%0d round %0d: rk=%h expected %h", t % 5, i, rk, ref_k[i]);
        end
        @(negedge clk);
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
