// tb_lector_inv: checks the LECTOR inverter's logic function.
// Drives the input through both levels many times in a random order and
// compares y with the complement of a.
`timescale 1ns/1ps
module tb_lector_inv;
  logic a, y;
  int   checks = 0, failures = 0;

  lector_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = (i < 2) ? i[0] : 1'($urandom);
      #1;
      checks++;
      if (y !== ~a) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
