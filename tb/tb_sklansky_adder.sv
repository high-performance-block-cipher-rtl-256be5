// tb_sklansky_adder: checks the Sklansky prefix adder against '+' mod 2^N
// for the default 64-bit width and for a 13-bit instance (a width that is
// not a power of two). Corner operands (carry through every bit, all
// ones, zero) are applied first, then random operands.
module tb_sklansky_adder;
  logic [63:0] a64, b64, s64;
  logic [12:0] a13, b13, s13;
  int checks = 0, failures = 0;

  sklansky_adder dut64 (.a(a64), .b(b64), .s(s64));
  sklansky_adder #(.N(13)) dut13 (.a(a13), .b(b13), .s(s13));

  task automatic check(logic [63:0] x, logic [63:0] y);
    logic [63:0] e64;
    logic [12:0] e13;
    a64 = x; b64 = y; a13 = x[12:0]; b13 = y[12:0];
    #1;
    e64 = x + y;
    e13 = x[12:0] + y[12:0];
    checks += 2;
    if (s64 !== e64) begin
      failures++;
      $display("FAIL 64: %h + %h = %h, expected %h", x, y, s64, e64);
    end
    if (s13 !== e13) begin
      failures++;
      $display("FAIL 13: %h + %h = %h, expected %h", x[12:0], y[12:0], s13, e13);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, 64'd1);
    check('1, '1);
    check('0, '0);
    check(64'h7fff_ffff_ffff_ffff, 64'd1);
    check(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaab);
    for (int i = 0; i < 64; i++) check(64'd1 << i, (64'd1 << i) - 1 | (64'd1 << i));
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
