// tb_cg_updown_counter_16b: the counter extended to 16 bits, with three
// higher-order sections chained through the selectors' carry outputs.
//
// Runs a full cycle up (65536 counts, so the carry reaches the top section
// and wraps), a full cycle down, then random direction changes. After each
// clock it compares the count with a reference and each local clock with
// whether its bit changed; co is checked against the terminal-count rule.
// Fails if the top section was never clocked.
`timescale 1ns/1ps
module tb_cg_updown_counter_16b;
  localparam int unsigned LCG_BITS = 4, SECTION_BITS = 4, HI_SECTIONS = 3;
  localparam int unsigned WIDTH = LCG_BITS + SECTION_BITS * HI_SECTIONS;
  localparam realtime     TCK   = 10ns;

  logic             ck = 1'b0, rst_n = 1'b1, up = 1'b1;
  logic [WIDTH-1:0] q, lclk;
  logic             co;
  logic [WIDTH-1:0] ref_q;
  int checks = 0, failures = 0, n_top = 0, n_co = 0;

  cg_updown_counter #(.LCG_BITS(LCG_BITS), .SECTION_BITS(SECTION_BITS),
                      .HI_SECTIONS(HI_SECTIONS))
    dut (.ck(ck), .rst_n(rst_n), .up(up), .q(q), .lclk(lclk), .co(co));

  always #(TCK/2) ck = ~ck;

  initial begin : watchdog
    #(TCK * 200_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic step(logic dir);
    logic [WIDTH-1:0] next_q;
    @(negedge ck);
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
    if (lclk !== (ref_q ^ next_q) || q !== next_q)
      fail($sformatf("q %h -> %h (expected %h), local clocks %b", ref_q, q, next_q, lclk));
    if (lclk[WIDTH-1 -: SECTION_BITS] != '0) n_top++;
    ref_q = next_q;
  endtask

  initial begin
    ref_q = '0;
    #1 rst_n = 1'b0;
    #(TCK * 2.25);
    @(posedge ck) #1 rst_n = 1'b1;
    for (int i = 0; i < (1 << WIDTH) + 10; i++) step(1'b1);
    for (int i = 0; i < (1 << WIDTH) + 10; i++) step(1'b0);
    for (int i = 0; i < 2000; i++) step(($urandom_range(0, 9) < 3) ? ~up : up);
    $display("top-section clock cycles %0d, carry out %0d", n_top, n_co);
    if (n_top == 0) fail("top section never clocked");
    if (n_co < 2)   fail("carry out not seen in both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
