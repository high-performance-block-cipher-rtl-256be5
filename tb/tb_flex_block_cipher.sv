// tb_flex_block_cipher: end-to-end test of the top level at its default
// sizes (128-bit Speck, flexible Simon). It encrypts known-answer vectors
// and random blocks with every Speck key size and every Simon
// configuration, and makes each mechanism of the design happen:
//   speck_m2/m3/m4     Speck with 2, 3, 4 key words
//   simon_mode0..4     each Simon block/key configuration
//   alg_switch         consecutive blocks with different algorithms
//   back_to_back       a start on the edge that finishes the previous block
//   restart            a start while a block is in progress (the old block
//                      is abandoned, only the new result is reported)
// Each block's result and latency (done right after the T-th edge
// following the start edge) is checked against the reference model; a
// mechanism that never happened counts as a failure.
module tb_flex_block_cipher;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  logic clk = 0, rst_n = 0, start;
  alg_e alg;
  speck_key_e speck_key;
  simon_mode_e simon_mode;
  logic [127:0] pt, ct;
  logic [255:0] key;
  logic done, busy;
  int checks = 0, failures = 0;
  int n_speck [2:4];
  int n_simon [5];
  int n_switch = 0, n_b2b = 0, n_restart = 0;
  alg_e last_alg = ALG_SPECK;

  flex_block_cipher dut (.clk, .rst_n, .start, .alg, .speck_key, .simon_mode,
                         .pt, .key, .ct, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rounds and expected ciphertext of a block.
  function automatic int rounds(alg_e a, int cfg);
    int n, m, T, zj;
    if (a == ALG_SPECK) return speck_T(64, cfg);
    simon_cfg(cfg, n, m, T, zj);
    return T;
  endfunction

  function automatic logic [127:0] expected(alg_e a, int cfg, logic [255:0] k, logic [127:0] p);
    return (a == ALG_SPECK) ? speck_enc(64, cfg, k, p) : simon_enc(cfg, k, p);
  endfunction

  // cfg: number of key words for Speck, mode index for Simon.
  // Drives start on the next edge; returns at the negedge after that edge.
  task automatic give_start(alg_e a, int cfg, logic [255:0] k, logic [127:0] p);
    alg = a; key = k; pt = p; start = 1;
    if (a == ALG_SPECK) speck_key = speck_key_e'(cfg - 2);
    else simon_mode = simon_mode_e'(cfg);
    @(negedge clk);
    start = 0; key = rand256(); pt = rand128();
    alg = alg_e'(~a);
    if (a != last_alg) n_switch++;
    last_alg = a;
  endtask

  // Waits for done, having already seen `elapsed` edges since start.
  task automatic finish_block(alg_e a, int cfg, logic [255:0] k, logic [127:0] p,
                              int elapsed, string what);
    int cyc = elapsed;
    while (!done && cyc < 200) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL %s: busy low", what); end
      @(negedge clk); cyc++;
    end
    checks += 2;
    if (ct !== expected(a, cfg, k, p)) begin
      failures++;
      $display("FAIL %s: ct %h expected %h", what, ct, expected(a, cfg, k, p));
    end
    if (cyc != rounds(a, cfg)) begin
      failures++;
      $display("FAIL %s: latency %0d expected %0d", what, cyc, rounds(a, cfg));
    end
    if (a == ALG_SPECK) n_speck[cfg]++; else n_simon[cfg]++;
  endtask

  task automatic block(alg_e a, int cfg, logic [255:0] k, logic [127:0] p, string what);
    @(negedge clk);
    give_start(a, cfg, k, p);
    finish_block(a, cfg, k, p, 0, what);
  endtask

  initial begin
    logic [255:0] k, k2;
    logic [127:0] p, p2;
    alg_e a, a2;
    int cfg, cfg2, el;
    start = 0; alg = ALG_SPECK; speck_key = SPECK_KEY_2W; simon_mode = SIMON_128_128;
    pt = '0; key = '0;
    n_speck = '{default: 0}; n_simon = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;

    // known answers through the top
    @(negedge clk);
    give_start(ALG_SPECK, 2, 256'h0f0e0d0c0b0a0908_0706050403020100,
               128'h6c61766975716520_7469206564616d20);
    finish_block(ALG_SPECK, 2, 256'h0f0e0d0c0b0a0908_0706050403020100,
                 128'h6c61766975716520_7469206564616d20, 0, "Speck128/128 KAT");
    checks++;
    if (ct !== 128'ha65d985179783265_7860fedf5c570d18) begin
      failures++; $display("FAIL Speck128/128 KAT value %h", ct);
    end
    block(ALG_SIMON, 0, 256'h1b1a1918_13121110_0b0a0908_03020100, 128'h656b696c_20646e75, "Simon64/128 KAT");
    checks++;
    if (ct !== 128'h44c8fc20_b9dfa07a) begin
      failures++; $display("FAIL Simon64/128 KAT value %h", ct);
    end

    // random blocks, random algorithm and configuration
    for (int t = 0; t < 40; t++) begin
      a = alg_e'($urandom_range(0, 1));
      cfg = (a == ALG_SPECK) ? $urandom_range(2, 4) : $urandom_range(0, 4);
      block(a, cfg, rand256(), rand128(), $sformatf("random %0d", t));
    end

    // back-to-back and restart pairs
    for (int t = 0; t < 10; t++) begin
      a = alg_e'(t % 2); a2 = alg_e'((t / 2) % 2);
      cfg  = (a  == ALG_SPECK) ? 2 + t % 3 : t % 5;
      cfg2 = (a2 == ALG_SPECK) ? 2 + (t + 1) % 3 : (t + 3) % 5;
      k = rand256(); p = rand128(); k2 = rand256(); p2 = rand128();
      @(negedge clk);
      give_start(a, cfg, k, p);
      if (t < 5) begin
        // back-to-back: start the next block on the last edge of this one
        repeat (rounds(a, cfg) - 1) @(negedge clk);
        give_start(a2, cfg2, k2, p2);
        checks += 2;
        if (!done) begin failures++; $display("FAIL back-to-back %0d: no done", t); end
        if (ct !== expected(a, cfg, k, p)) begin
          failures++; $display("FAIL back-to-back %0d: first ct %h", t, ct);
        end
        if (a == ALG_SPECK) n_speck[cfg]++; else n_simon[cfg]++;
        n_b2b++;
        @(negedge clk);
        el = 1;
      end else begin
        // restart after a few rounds: no done may appear before the new block ends
        repeat (3 + t) @(negedge clk);
        give_start(a2, cfg2, k2, p2);
        n_restart++;
        el = 0;
      end
      finish_block(a2, cfg2, k2, p2, el, $sformatf("second block %0d", t));
    end

    for (int i = 2; i <= 4; i++) begin
      $display("speck_m%0d: %0d", i, n_speck[i]);
      checks++;
      if (n_speck[i] == 0) begin failures++; $display("FAIL speck_m%0d never exercised", i); end
    end
    for (int i = 0; i < 5; i++) begin
      $display("simon_mode%0d: %0d", i, n_simon[i]);
      checks++;
      if (n_simon[i] == 0) begin failures++; $display("FAIL simon_mode%0d never exercised", i); end
    end
    $display("alg_switch: %0d  back_to_back: %0d  restart: %0d", n_switch, n_b2b, n_restart);
    checks += 3;
    if (n_switch == 0)  begin failures++; $display("FAIL alg_switch never exercised"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL back_to_back never exercised"); end
    if (n_restart == 0) begin failures++; $display("FAIL restart never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
