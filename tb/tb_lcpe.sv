// tb_lcpe: checks the local clock pre-evaluator exhaustively.
// For every section state and both directions it compares ci, cib and pall
// with the toggle conditions computed here bit by bit: ci[k] for an up count
// (bits below k all 1), cib[k] for a down count (bits below k all 0), pall
// for the whole section.
`timescale 1ns/1ps
module tb_lcpe;
  localparam int unsigned BITS = 4;
  logic            up;
  logic [BITS-1:0] q, qb, ci, cib;
  logic            pall;
  int   checks = 0, failures = 0;

  lcpe #(.BITS(BITS)) dut (.up(up), .q(q), .qb(qb), .ci(ci), .cib(cib), .pall(pall));

  assign qb = ~q;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++) begin
      for (int v = 0; v < (1 << BITS); v++) begin
        logic [BITS-1:0] exp_ci, exp_cib;
        logic            exp_pall;
        up = d[0];
        q  = BITS'(v);
        for (int k = 0; k < BITS; k++) begin
          bit ones, zeros;
          ones = 1; zeros = 1;
          for (int j = 0; j < k; j++) begin
            if (!q[j]) ones  = 0;
            if ( q[j]) zeros = 0;
          end
          exp_ci[k]  = up & ones;
          exp_cib[k] = !up & zeros;
        end
        exp_pall = up ? (q == '1) : (q == '0);
        #1;
        checks++;
        if (ci !== exp_ci || cib !== exp_cib || pall !== exp_pall) begin
          failures++;
          $display("FAIL up=%b q=%b ci=%b/%b cib=%b/%b pall=%b/%b",
                   up, q, ci, exp_ci, cib, exp_cib, pall, exp_pall);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
