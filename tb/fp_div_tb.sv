// fp_div_tb: self-checking test of the binary32 and binary64 divider fp_div.
//
// Random operands of both formats over a wide exponent range, and pairs of nearly equal magnitude
// and opposite sign (cancellation), are applied. Each result must equal the
// correctly rounded value of the same operation done in real arithmetic and
// rounded by fp_ref_pkg::r2f. A few exact cases are checked by their bit pattern.
// Ends with the TB_RESULT line; a watchdog ends a run that hangs.
module fp_div_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  logic [63:0] a64, b64, y64, exp64;
  int checks = 0, failures = 0;

  fp_div dut (.a(a), .b(b), .y(y));
  fp_div #(.EW(11), .MW(52)) dut64 (.a(a64), .b(b64), .y(y64));

  task automatic check64(input logic [63:0] got, input logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL binary64 a=%h b=%h got=%h exp=%h", a64, b64, got, want);
    end
  endtask

  task automatic check(input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", a, b, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40000; n++) begin
      if (n % 4 == 3) begin
        a = rand_f(100, 150);
        b = {~a[31], a[30:23] - 8'(n % 2), 23'($urandom)};
        a64 = rand_d(1000, 1050);
        b64 = {~a64[63], a64[62:52] - 11'(n % 2), 20'($urandom), 32'($urandom)};
      end else if (n % 4 == 2) begin
        a = rand_f(120, 130);
        b = rand_f(120, 130);
        a64 = rand_d(1015, 1030);
        b64 = rand_d(1015, 1030);
      end else begin
        a = rand_f(70, 180);
        b = rand_f(70, 180);
        a64 = rand_d(700, 1300);
        b64 = rand_d(700, 1300);
      end
      #1;
      exp_y = r2f(f2r(a) / f2r(b));
      check(y, exp_y);
      exp64 = r2d(d2r(a64) / d2r(b64));
      check64(y64, exp64);
    end
    a = 32'h40400000; b = 32'h3f800000; #1;   // 3 and 1
    check(y, r2f(3.0 / 1.0));
    a = 32'h3f800000; b = 32'h40400000; #1;   // 1 and 3
    check(y, r2f(1.0 / 3.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
