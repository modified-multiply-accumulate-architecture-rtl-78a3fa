// Asserting logic of the SPSIT detection circuits.
//
// The detection logic looks at data that is still settling, so its raw
// outputs can glitch. Before they may freeze any latch they are asserted,
// that is released only after the data transient period. Two styles exist:
//   ASSERT_REG  the raw signals are sampled by registers. With RISE = 0 they
//               sample on the falling clock edge, half a period after the
//               data registers load, so the asserting delay is half a clock
//               period and the value holds until the next falling edge. With
//               RISE = 1 they sample, like the data registers they sit next
//               to, on the rising edge when load is high; the raw input must
//               then be computed from the data about to be loaded.
//   ASSERT_AND  the raw signals are ANDed with an asserting strobe
//               (assert_en) that the surrounding system raises once the data
//               has settled. With assert_en low nothing is frozen and the
//               logic simply computes every bit.
// In both styles the delay must exceed the data settling time and end before
// the latest point at which the frozen logic must still deliver its result.
// The half-period delay of the register style is this design's choice; the
// strobe of the AND style is left to the system. assert_en is not used in the
// register style, load only in the register style with RISE = 1. Reset
// clears the registers (nothing frozen).
module spsit_assert
  import spsit_pkg::*;
#(
  parameter int unsigned   N     = 1,          // number of control signals
  parameter assert_style_e STYLE = ASSERT_AND,
  parameter bit            RISE  = 1'b0        // ASSERT_REG: sample on the rising edge
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         assert_en, // asserting strobe (ASSERT_AND only)
  input  logic         load,      // register enable (ASSERT_REG with RISE only)
  input  logic [N-1:0] raw,       // detection outputs, possibly glitching
  output logic [N-1:0] asserted   // control signals released to the latches
);

  if (STYLE == ASSERT_REG && RISE) begin : g_reg_rise
    logic [N-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    q <= '0;
      else if (load) q <= raw;
    end
    assign asserted = q;
  end else if (STYLE == ASSERT_REG) begin : g_reg_fall
    logic [N-1:0] q;
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= raw;
    end
    assign asserted = q;
  end else begin : g_and
    assign asserted = raw & {N{assert_en}};
  end

endmodule
