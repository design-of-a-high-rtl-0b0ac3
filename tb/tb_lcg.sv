// tb_lcg: checks the local clock generator exhaustively.
// For every state of the lower four bits and both directions it sets q/qb
// while ck is low, raises ck and compares each local clock with the toggle
// rule (counting up, bit i toggles when bits below it are all 1; counting
// down, when they are all 0) and co with the all-1 / all-0 rule. It then
// changes q while ck is still high, as the flip-flops do right after the
// edge, and checks that no local clock is cut or added, and finally that all
// local clocks are low with ck low.
`timescale 1ns/1ps
module tb_lcg;
  localparam int unsigned BITS = 4;
  logic            ck = 1'b0, up;
  logic [BITS-1:0] q, qb, lc;
  logic            co;
  logic [BITS-1:0] exp_lc;
  logic            exp_co;
  int   checks = 0, failures = 0;

  lcg #(.BITS(BITS)) dut (.ck(ck), .up(up), .q(q), .qb(qb), .lc(lc), .co(co));

  assign qb = ~q;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up = 1'b1; q = '0;
    #5;
    for (int d = 0; d < 2; d++) begin
      for (int v = 0; v < (1 << BITS); v++) begin
        up = d[0];
        q  = BITS'(v);
        // reference: toggle rule for each bit
        for (int i = 0; i < BITS; i++) begin
          logic [BITS-1:0] mask;
          mask = BITS'((1 << i) - 1);
          exp_lc[i] = up ? ((q & mask) == mask) : ((q & mask) == '0);
        end
        exp_co = up ? (q == '1) : (q == '0);
        #5;
        checks++;
        if (lc !== '0) begin
          failures++; $display("FAIL lc high with ck low: %b", lc);
        end
        ck = 1'b1; #2;
        checks++;
        if (lc !== exp_lc || co !== exp_co) begin
          failures++;
          $display("FAIL up=%b q=%b lc=%b exp %b co=%b exp %b", up, q, lc, exp_lc, co, exp_co);
        end
        // flip-flops update during the high phase: pulses must hold
        q = q + (up ? 1 : -1);
        #3;
        checks++;
        if (lc !== exp_lc) begin
          failures++;
          $display("FAIL pulse changed while ck high: lc=%b exp %b", lc, exp_lc);
        end
        ck = 1'b0; #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
