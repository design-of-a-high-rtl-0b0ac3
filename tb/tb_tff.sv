// tb_tff: checks the toggle flip-flop.
// Applies reset, then a random mix of clock pulses and idle periods, and
// after each compares q and qb with a bit kept by the testbench, which flips
// only when a pulse was given. Also checks that reset clears the bit at any
// time.
`timescale 1ns/1ps
module tb_tff;
  logic lclk = 1'b0, rst_n = 1'b1;
  logic q, qb;
  logic expect_q;
  int   checks = 0, failures = 0;

  tff dut (.lclk(lclk), .rst_n(rst_n), .q(q), .qb(qb));

  task automatic check(string what);
    checks++;
    if (q !== expect_q || qb !== ~expect_q) begin
      failures++;
      $display("FAIL %s: q=%b qb=%b expected q=%b", what, q, qb, expect_q);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_q = 1'b0;
    #1 rst_n = 1'b0;
    #5 check("reset");
    rst_n = 1'b1;
    #5;
    for (int i = 0; i < 200; i++) begin
      if (i % 50 == 49) begin
        rst_n = 1'b0; #1;
        expect_q = 1'b0;
        check("reset mid-run");
        rst_n = 1'b1; #1;
      end
      if ($urandom_range(0, 2) != 0) begin
        lclk = 1'b1; #5; lclk = 1'b0; #5;
        expect_q = ~expect_q;
        check("pulse");
      end else begin
        #10;
        check("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
