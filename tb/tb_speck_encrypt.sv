// tb_speck_encrypt: end-to-end checks of the iterative Speck core.
//  * published known-answer vectors for Speck128/128, 128/192, 128/256
//    (n = 64) and Speck64/128 (a second instance with n = 32);
//  * random keys and blocks against the reference model, all key sizes;
//  * latency: done must be high right after the T-th clock edge following
//    the start edge
//    (T = 32, 33, 34 rounds), with busy high in between;
//  * back-to-back: a start given on the edge that ends a block.
module tb_speck_encrypt;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, start32;
  speck_key_e kw, kw32;
  logic [127:0] pt, ct;
  logic [255:0] key;
  logic [63:0]  pt32, ct32;
  logic [127:0] key32;
  logic done, busy, done32, busy32;
  int checks = 0, failures = 0;

  speck_encrypt dut (.clk, .rst_n, .start, .key_words(kw), .pt, .key, .ct, .done, .busy);
  speck_encrypt #(.N(32)) dut32 (.clk, .rst_n, .start(start32), .key_words(kw32), .pt(pt32),
                                 .key(key32), .ct(ct32), .done(done32), .busy(busy32));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // start one block, wait for done, check latency and result
  task automatic run(int m, logic [255:0] k, logic [127:0] p, logic [127:0] exp, string what);
    int cyc = 0;
    @(negedge clk);
    kw = speck_key_e'(m - 2); key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0; key = rand256(); pt = rand128();   // inputs sampled only at start
    cyc = 0;                                      // clock edges since the start edge
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL %s: busy low during block", what); end
      @(negedge clk); cyc++;
    end
    expect_eq(what, ct, exp);
    checks++;
    if (cyc != speck_T(64, m)) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, expected %0d", what, cyc, speck_T(64, m));
    end
  endtask

  initial begin
    logic [255:0] k;
    logic [127:0] p;
    int m;
    start = 0; start32 = 0; kw = SPECK_KEY_2W; kw32 = SPECK_KEY_4W;
    pt = '0; key = '0; pt32 = '0; key32 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    run(2, 256'h0f0e0d0c0b0a0908_0706050403020100,
        128'h6c61766975716520_7469206564616d20, 128'ha65d985179783265_7860fedf5c570d18, "KAT 128/128");
    run(3, 256'h1716151413121110_0f0e0d0c0b0a0908_0706050403020100,
        128'h7261482066656968_43206f7420746e65, 128'h1be4cf3a13135566_f9bc185de03c1886, "KAT 128/192");
    run(4, 256'h1f1e1d1c1b1a1918_1716151413121110_0f0e0d0c0b0a0908_0706050403020100,
        128'h65736f6874206e49_202e72656e6f6f70, 128'h4109010405c0f53e_4eeeb48d9c188f43, "KAT 128/256");

    // Speck64/128 on the n = 32 instance
    @(negedge clk);
    key32 = 128'h1b1a1918_13121110_0b0a0908_03020100; pt32 = 64'h3b726574_7475432d;
    start32 = 1;
    @(negedge clk); start32 = 0;
    repeat (40) begin
      if (done32) break;
      @(negedge clk);
    end
    expect_eq("KAT 64/128", 128'(ct32), 128'h8c6fa548_454e028b);

    for (int t = 0; t < 30; t++) begin
      m = 2 + (t % 3);
      k = rand256(); p = rand128();
      run(m, k, p, speck_enc(64, m, k, p), $sformatf("random m=%0d", m));
    end

    // back-to-back: second start on the edge that finishes the first block
    begin
      logic [255:0] k1, k2;
      logic [127:0] p1, p2;
      k1 = rand256(); p1 = rand128(); k2 = rand256(); p2 = rand128();
      @(negedge clk); kw = SPECK_KEY_2W; key = k1; pt = p1; start = 1;
      @(negedge clk); start = 0;
      repeat (31) @(negedge clk);          // next edge is edge 32, the last round
      kw = SPECK_KEY_4W; key = k2; pt = p2; start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!done) begin failures++; $display("FAIL back-to-back: no done for block 1"); end
      expect_eq("back-to-back block 1", ct, speck_enc(64, 2, k1, p1));
      repeat (34) @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL back-to-back: no done for block 2"); end
      expect_eq("back-to-back block 2", ct, speck_enc(64, 4, k2, p2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
