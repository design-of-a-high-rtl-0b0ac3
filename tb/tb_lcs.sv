// tb_lcs: checks the local clock selector.
// Random and corner combinations of the real carry and the pre-evaluated
// carries are applied while ck is low; with ck high each local clock must
// equal ci_in AND (ci[k] OR cib[k]) and co must equal ci_in AND pall. The
// inputs are then changed during the high phase and the pulses must not
// change; with ck low all local clocks must be low.
`timescale 1ns/1ps
module tb_lcs;
  localparam int unsigned BITS = 4;
  logic            ck = 1'b0, ci_in, pall, co;
  logic [BITS-1:0] ci, cib, lc;
  logic [BITS-1:0] exp_lc;
  int   checks = 0, failures = 0;

  lcs #(.BITS(BITS)) dut (.ck(ck), .ci_in(ci_in), .ci(ci), .cib(cib), .pall(pall),
                          .lc(lc), .co(co));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      ci_in = (i < 2) ? i[0] : 1'($urandom);
      ci    = BITS'($urandom);
      cib   = BITS'($urandom);
      pall  = 1'($urandom);
      exp_lc = ci_in ? (ci | cib) : '0;
      #5;
      checks++;
      if (lc !== '0) begin
        failures++; $display("FAIL lc high with ck low: %b", lc);
      end
      ck = 1'b1; #2;
      checks++;
      if (lc !== exp_lc || co !== (ci_in & pall)) begin
        failures++;
        $display("FAIL ci_in=%b ci=%b cib=%b pall=%b lc=%b exp %b co=%b",
                 ci_in, ci, cib, pall, lc, exp_lc, co);
      end
      ci_in = ~ci_in; ci = ~ci; cib = ~cib;
      #3;
      checks++;
      if (lc !== exp_lc) begin
        failures++; $display("FAIL pulse changed while ck high: lc=%b exp %b", lc, exp_lc);
      end
      ck = 1'b0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
