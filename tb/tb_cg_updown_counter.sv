// tb_cg_updown_counter: end-to-end test of the clock-gated up/down counter at
// its default size (8 bits: four on the local clock generator, four in one
// pre-evaluated higher-order section).
//
// A reference count kept here is stepped once per clock in the direction set
// by up. After every rising edge the test compares
//   - q with the reference (one step per clock cycle),
//   - each local clock with whether that bit actually changed, so a bit that
//     stays put must get no pulse and a bit that changes must get one,
// and while ck is low it compares co with the terminal-count rule.
// The run counts up through a wrap, down through a wrap, then switches
// direction at random, with one reset in the middle. It counts how often each
// mechanism of the design occurred (up steps, down steps, direction changes,
// wraps each way, clocks issued by the selector of the higher section,
// clocks suppressed, carry out) and fails if any never occurred.
`timescale 1ns/1ps
module tb_cg_updown_counter;
  localparam int unsigned WIDTH = counter_pkg::LCG_BITS
                                + counter_pkg::SECTION_BITS * counter_pkg::HI_SECTIONS;
  localparam int unsigned LO    = counter_pkg::LCG_BITS;
  localparam realtime     TCK   = 10ns;

  logic             ck = 1'b0, rst_n = 1'b1, up = 1'b1;
  logic [WIDTH-1:0] q, lclk;
  logic             co;

  logic [WIDTH-1:0] ref_q;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_switch = 0, n_wrap_up = 0, n_wrap_down = 0;
  int n_hi_pulse = 0, n_suppressed = 0, n_co = 0, n_reset = 0;
  longint n_pulses = 0, n_cycles = 0;

  cg_updown_counter dut (.ck(ck), .rst_n(rst_n), .up(up), .q(q), .lclk(lclk), .co(co));

  always #(TCK/2) ck = ~ck;

  initial begin : watchdog
    #(TCK * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // One clock cycle with direction dir: set it while ck is low, check co,
  // take the edge, check the pulses and the new count.
  task automatic step(logic dir);
    logic [WIDTH-1:0] next_q;
    @(negedge ck);
    if (dir != up && n_cycles > 0) n_switch++;
    up = dir;
    #1;
    checks++;
    if (co !== (dir ? (ref_q == '1) : (ref_q == '0)))
      fail($sformatf("co=%b at q=%h up=%b", co, ref_q, dir));
    if (co) n_co++;
    next_q = dir ? ref_q + 1'b1 : ref_q - 1'b1;
    @(posedge ck);
    #1;
    checks++;
    if (lclk !== (ref_q ^ next_q))
      fail($sformatf("local clocks %b, expected %b (q %h -> %h)", lclk, ref_q ^ next_q, ref_q, next_q));
    checks++;
    if (q !== next_q)
      fail($sformatf("q=%h expected %h", q, next_q));
    // bookkeeping of mechanisms
    if (dir) n_up++; else n_down++;
    if ( dir && ref_q == '1) n_wrap_up++;
    if (!dir && ref_q == '0) n_wrap_down++;
    if (lclk[WIDTH-1:LO] != '0) n_hi_pulse++;
    n_pulses     += $countones(lclk);
    n_suppressed += WIDTH - $countones(lclk);
    n_cycles++;
    ref_q = next_q;
  endtask

  initial begin
    ref_q = '0;
    #1 rst_n = 1'b0;
    #(TCK * 2.25);
    checks++;
    if (q !== '0) fail($sformatf("after reset q=%h", q));
    // release just after a rising edge so the next step sees the next edge
    @(posedge ck) #1 rst_n = 1'b1;

    for (int i = 0; i < 300; i++) step(1'b1);   // up through FF -> 00
    for (int i = 0; i < 300; i++) step(1'b0);   // down through 00 -> FF
    for (int i = 0; i < 1500; i++) begin
      logic dir;
      dir = ($urandom_range(0, 9) < 2) ? ~up : up;
      step(dir);
      if (i == 700) begin
        @(negedge ck) rst_n = 1'b0;
        #1;
        checks++;
        if (q !== '0) fail($sformatf("asynchronous reset: q=%h", q));
        ref_q = '0;
        n_reset++;
        @(posedge ck) #1 rst_n = 1'b1;
      end
    end

    $display("up steps %0d, down steps %0d, direction changes %0d", n_up, n_down, n_switch);
    $display("wraps up %0d, wraps down %0d, carry out %0d, resets %0d",
             n_wrap_up, n_wrap_down, n_co, n_reset);
    $display("cycles with higher-section pulses %0d", n_hi_pulse);
    $display("local clock pulses %0d of %0d flip-flop cycles (%0d suppressed)",
             n_pulses, n_cycles * WIDTH, n_suppressed);
    if (n_up == 0)        fail("no up count");
    if (n_down == 0)      fail("no down count");
    if (n_switch == 0)    fail("no direction change");
    if (n_wrap_up == 0)   fail("no wrap counting up");
    if (n_wrap_down == 0) fail("no wrap counting down");
    if (n_co == 0)        fail("carry out never high");
    if (n_hi_pulse == 0)  fail("higher section never clocked");
    if (n_suppressed == 0) fail("no clock ever suppressed");
    if (n_reset == 0)     fail("no reset during the run");
    // An ungated counter clocks all WIDTH flip-flops every cycle; a counting
    // sequence flips about two bits per step, so gating must at least halve it.
    checks++;
    if (2 * n_pulses >= n_cycles * WIDTH) fail("clock gating does not reduce clock activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
