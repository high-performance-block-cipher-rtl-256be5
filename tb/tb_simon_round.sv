// tb_simon_round: checks the Simon round for the three word widths
// (32, 48, 64) against the reference formula, with random words. Words
// are given with zeros above n, as the cores keep them.
module tb_simon_round;
  import cipher_pkg::*;
  import cipher_ref_pkg::*;
  wsize_e ws;
  word_t x, y, k, xo, yo;
  int checks = 0, failures = 0;

  simon_round dut (.wsize(ws), .x, .y, .k, .x_out(xo), .y_out(yo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    w64_t ex;
    for (int i = 0; i < 1500; i++) begin
      ws = wsize_e'(i % 3);
      n  = (ws == W32) ? 32 : (ws == W48) ? 48 : 64;
      x = {$urandom, $urandom} & msk(n);
      y = {$urandom, $urandom} & msk(n);
      k = {$urandom, $urandom} & msk(n);
      #1;
      ex = y ^ (rol(x, 1, n) & rol(x, 8, n)) ^ rol(x, 2, n) ^ k;
      checks++;
      if (xo !== ex || yo !== x) begin
        failures++;
        $display("FAIL n=%0d x=%h y=%h k=%h -> %h %h, expected %h %h", n, x, y, k, xo, yo, ex, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
