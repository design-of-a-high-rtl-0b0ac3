// counter_pkg: shared sizes and the count-direction type of the clock-gated
// up/down counter.
//
// The counter is split into a lower-order section of LCG_BITS bits, clocked by
// the local clock generator, and HI_SECTIONS higher-order sections of
// SECTION_BITS bits each, clocked through a pre-evaluator / selector pair.
// The defaults give the 8-bit counter (bits 0-3 on the generator, bits 4-7 on
// one pre-evaluator / selector pair) that the architecture is drawn with.
package counter_pkg;

  // Lower-order bits served by the local clock generator (FF0-FF3).
  localparam int unsigned LCG_BITS     = 4;
  // Bits in one higher-order section served by one LCPE + LCS pair (FF4-FF7).
  localparam int unsigned SECTION_BITS = 4;
  // Number of higher-order sections chained behind the generator.
  localparam int unsigned HI_SECTIONS  = 1;

  // Level of the UP control input.
  typedef enum logic {
    DIR_DOWN = 1'b0,
    DIR_UP   = 1'b1
  } dir_e;

endpackage
