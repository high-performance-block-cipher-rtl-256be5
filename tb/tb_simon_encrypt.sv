// tb_simon_encrypt: end-to-end checks of the flexible Simon core.
//  * published known-answer vectors for Simon64/128, 128/128, 128/192 and
//    128/256;
//  * random keys and blocks in all five configurations (including 96/144)
//    against the reference model, with random bits above the used key
//    and block widths, which the core must ignore;
//  * latency: done right after the T-th clock edge following the start
//    edge (T = 44, 54, 68, 69, 72), with busy high in between;
//  * a mode switch between consecutive blocks and a back-to-back start.
module tb_simon_encrypt;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  logic clk = 0, rst_n = 0, start;
  simon_mode_e mode;
  logic [127:0] pt, ct;
  logic [255:0] key;
  logic done, busy;
  int checks = 0, failures = 0;

  simon_encrypt dut (.clk, .rst_n, .start, .mode, .pt, .key, .ct, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endfunction

  task automatic run(int md, logic [255:0] k, logic [127:0] p, logic [127:0] exp, string what);
    int cyc, n, m, T, zj;
    simon_cfg(md, n, m, T, zj);
    @(negedge clk);
    mode = simon_mode_e'(md); key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0; key = rand256(); pt = rand128(); mode = simon_mode_e'((md + 2) % 5);
    cyc = 0;
    while (!done && cyc < 200) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL %s: busy low during block", what); end
      @(negedge clk); cyc++;
    end
    expect_eq(what, ct, exp);
    checks++;
    if (cyc != T) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, expected %0d", what, cyc, T);
    end
  endtask

  initial begin
    logic [255:0] k;
    logic [127:0] p;
    start = 0; mode = SIMON_128_128; pt = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    run(0, 256'h1b1a1918_13121110_0b0a0908_03020100, 128'h656b696c_20646e75,
        128'h44c8fc20_b9dfa07a, "KAT 64/128");
    run(2, 256'h0f0e0d0c0b0a0908_0706050403020100, 128'h6373656420737265_6c6c657661727420,
        128'h49681b1e1e54fe3f_65aa832af84e0bbc, "KAT 128/128");
    run(3, 256'h1716151413121110_0f0e0d0c0b0a0908_0706050403020100,
        128'h206572656874206e_6568772065626972, 128'hc4ac61effcdc0d4f_6c9c8d6e2597b85b, "KAT 128/192");
    run(4, 256'h1f1e1d1c1b1a1918_1716151413121110_0f0e0d0c0b0a0908_0706050403020100,
        128'h74206e69206d6f6f_6d69732061207369, 128'h8d2b5579afc8a3a0_3bf72a87efe7b868, "KAT 128/256");

    for (int t = 0; t < 25; t++) begin
      k = rand256(); p = rand128();
      run(t % 5, k, p, simon_enc(t % 5, k, p), $sformatf("random mode %0d", t % 5));
    end

    // back-to-back: 96/144 block, then a 64/128 block started on its last edge
    begin
      logic [255:0] k1, k2;
      logic [127:0] p1, p2;
      k1 = rand256(); p1 = rand128(); k2 = rand256(); p2 = rand128();
      @(negedge clk); mode = SIMON_96_144; key = k1; pt = p1; start = 1;
      @(negedge clk); start = 0;
      repeat (53) @(negedge clk);
      mode = SIMON_64_128; key = k2; pt = p2; start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL back-to-back: no done for block 1"); end
      expect_eq("back-to-back block 1", ct, simon_enc(1, k1, p1));
      repeat (44) @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL back-to-back: no done for block 2"); end
      expect_eq("back-to-back block 2", ct, simon_enc(0, k2, p2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
