// tb_count_sequences: the two counting runs the design is demonstrated with,
// on the default 8-bit counter.
//
// Up run: from reset, up = 1 for a full cycle of 256 counts. The low nibble
// must go 0000, 0001, 0010, 0011, 0100, ... and the whole count must step by
// one per clock.
// Down run: up = 0 for a full cycle of 256 counts. The first step wraps 0 to
// all ones, so the low nibble goes 1111, 1110, 1101, 1100, ... and the count
// steps down by one per clock.
// In each run every bit must change exactly 256 / 2^i times
// (bit 0 every clock, the top bit twice), and each local clock must
// pulse exactly as often as its bit changes. Total local clock pulses are
// printed against the 8 x 256 an ungated clock tree would deliver.
`timescale 1ns/1ps
module tb_count_sequences;
  localparam int unsigned WIDTH = counter_pkg::LCG_BITS
                                + counter_pkg::SECTION_BITS * counter_pkg::HI_SECTIONS;
  localparam int unsigned STEPS = 1 << WIDTH;
  localparam realtime     TCK   = 10ns;

  logic             ck = 1'b0, rst_n = 1'b1, up = 1'b1;
  logic [WIDTH-1:0] q, lclk;
  logic             co;
  int checks = 0, failures = 0;

  cg_updown_counter dut (.ck(ck), .rst_n(rst_n), .up(up), .q(q), .lclk(lclk), .co(co));

  always #(TCK/2) ck = ~ck;

  // local clock pulses per bit, counted on the pulses themselves
  int pulses [WIDTH];
  for (genvar i = 0; i < WIDTH; i++) begin : g_cnt
    always @(posedge lclk[i]) if (rst_n) pulses[i]++;
  end

  initial begin : watchdog
    #(TCK * (4 * STEPS + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic run(logic dir, logic [3:0] first_nibbles [5]);
    logic [WIDTH-1:0] prev, expect_q;
    int flips [WIDTH];
    int total;
    foreach (pulses[i]) begin
      pulses[i] = 0;
      flips[i]  = 0;
    end
    // called with ck high or at a falling edge: the next rising edge counts
    up = dir;
    expect_q = q;
    for (int n = 0; n < STEPS; n++) begin
      prev = q;
      @(posedge ck); #1;
      expect_q = dir ? expect_q + 1'b1 : expect_q - 1'b1;
      checks++;
      if (q !== expect_q) fail($sformatf("step %0d: q=%b expected %b", n, q, expect_q));
      if (n < 5) begin
        checks++;
        if (q[3:0] !== first_nibbles[n])
          fail($sformatf("step %0d: low bits %b, expected %b", n, q[3:0], first_nibbles[n]));
      end
      for (int i = 0; i < WIDTH; i++) if (q[i] != prev[i]) flips[i]++;
    end
    @(negedge ck);
    total = 0;
    for (int i = 0; i < WIDTH; i++) begin
      checks++;
      if (flips[i] != int'(STEPS >> i))
        fail($sformatf("bit %0d changed %0d times, expected %0d", i, flips[i], STEPS >> i));
      checks++;
      if (pulses[i] != flips[i])
        fail($sformatf("bit %0d: %0d local clock pulses for %0d changes", i, pulses[i], flips[i]));
      total += pulses[i];
    end
    $display("%s run: %0d local clock pulses over %0d counts (ungated: %0d)",
             dir ? "up" : "down", total, STEPS, STEPS * WIDTH);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #(TCK * 2.25);
    checks++;
    if (q !== '0) fail($sformatf("after reset q=%h", q));
    @(posedge ck) #1 rst_n = 1'b1;
    run(1'b1, '{4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101});
    // start the down run from 0 so that it begins 1111, 1110, ...
    checks++;
    if (q !== '0) fail($sformatf("after a full up cycle q=%h", q));
    run(1'b0, '{4'b1111, 4'b1110, 4'b1101, 4'b1100, 4'b1011});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
