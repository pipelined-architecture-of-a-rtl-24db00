// tb_fdnr_by: checks the FDNR product B(Y)*Y at 64 and 16 bits against the
// reference model: 4*Y (wrapped) when Y >= 1.0, zero below. Covers the
// boundary values 1.0 and 1.0 - 1 LSB, negative values, values whose
// product wraps, and random values.
module tb_fdnr_by;
  import prng_model_pkg::*;

  logic signed [63:0] y64, by64;
  logic signed [15:0] y16, by16;
  int checks = 0, failures = 0;
  int taken = 0;

  fdnr_by dut64 (.y(y64), .by(by64));
  fdnr_by #(.P_ARITH(16)) dut16 (.y(y16), .by(by16));

  task automatic check(longint v);
    longint e64, e16;
    y64 = v;
    y16 = 16'(v >>> 48);
    #1;
    e64 = fdnr_by(longint'(y64), 64);
    e16 = fdnr_by(longint'(y16), 16);
    if (e64 != 0) taken++;
    checks += 2;
    if (longint'(by64) != e64) begin
      failures++;
      $display("64b: y=%h by=%h expected %h", y64, by64, e64);
    end
    if (longint'(by16) != e16) begin
      failures++;
      $display("16b: y=%h by=%h expected %h", y16, by16, e16);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint one = longint'(1) <<< 60;
    check(one);
    check(one - 1);
    check(0);
    check(-one);
    check(one + (one >>> 1));      // 1.5 -> 6.0
    check(3 * one);                // 3.0 -> 12.0 wraps
    check(64'h7fff_ffff_ffff_ffff);
    check(64'h8000_0000_0000_0000);
    for (int i = 0; i < 2000; i++) check({$urandom, $urandom});
    checks++;
    if (taken == 0) begin
      failures++;
      $display("the Y >= 1 branch was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
