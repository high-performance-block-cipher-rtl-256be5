// tb_speck_round: checks one Speck round against the reference formula
// x' = ((x >>> a) + y) ^ k, y' = (y <<< b) ^ x' for n = 64 (a=8, b=3) and
// n = 16 (a=7, b=2), with random words.
module tb_speck_round;
  import cipher_ref_pkg::*;
  logic [63:0] x64, y64, k64, xo64, yo64;
  logic [15:0] x16, y16, k16, xo16, yo16;
  int checks = 0, failures = 0;

  speck_round dut64 (.x(x64), .y(y64), .k(k64), .x_out(xo64), .y_out(yo64));
  speck_round #(.N(16)) dut16 (.x(x16), .y(y16), .k(k16), .x_out(xo16), .y_out(yo16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w64_t ex, ey;
    for (int i = 0; i < 1000; i++) begin
      x64 = {$urandom, $urandom}; y64 = {$urandom, $urandom}; k64 = {$urandom, $urandom};
      x16 = 16'($urandom); y16 = 16'($urandom); k16 = 16'($urandom);
      #1;
      ex = (ror(x64, 8, 64) + y64) ^ k64;
      ey = rol(y64, 3, 64) ^ ex;
      checks++;
      if ({xo64, yo64} !== {ex, ey}) begin
        failures++;
        $display("FAIL n=64 x=%h y=%h k=%h -> %h %h, expected %h %h", x64, y64, k64, xo64, yo64, ex, ey);
      end
      ex = ((ror(64'(x16), 7, 16) + 64'(y16)) & msk(16)) ^ 64'(k16);
      ey = rol(64'(y16), 2, 16) ^ ex;
      checks++;
      if ({xo16, yo16} !== {ex[15:0], ey[15:0]}) begin
        failures++;
        $display("FAIL n=16 x=%h y=%h k=%h -> %h %h", x16, y16, k16, xo16, yo16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
