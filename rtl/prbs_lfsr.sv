// prbs_lfsr: Fibonacci linear feedback shift register producing a PRBS.
//
// Stage WIDTH-1 (a7 for the default length) is the input end of the
// register; every stage below it copies its upper neighbour, so bits travel
// a7 -> a6 -> ... -> a0. The new value of the top stage is the XOR of all
// stages marked in TAPS (a7, a5, a3, a1 by default). The keystream bit is a0.
// Each stage is its own flip-flop in a generate loop, as in the published
// design.
//
// Interface: rstn is asynchronous, active low, and loads SEED. The register
// advances by one position on a rising clk edge when step is 1 and holds
// otherwise. state is the register (bit i = stage ai); state[0] is the
// keystream bit in use during the current cycle.
//
// With the default taps the feedback polynomial is x^8 + x^7 + x^5 + x^3 + x
// (a0 takes no part in the feedback, so a0 only delays a7..a1 by one step).
// From the all-ones seed the register takes one step into a cycle of 127
// states, so the keystream repeats every 127 steps. Length and taps follow the published
// design; the seed value, the step input and the asynchronous reset are this
// implementation's choices.
module prbs_lfsr
  import prbs_pkg::*;
#(
  parameter int unsigned       WIDTH = LFSR_W,
  parameter logic [WIDTH-1:0]  TAPS  = LFSR_TAPS,
  parameter logic [WIDTH-1:0]  SEED  = LFSR_SEED
) (
  input  logic             clk,
  input  logic             rstn,
  input  logic             step,
  output logic [WIDTH-1:0] state
);

  logic feedback;

  assign feedback = ^(state & TAPS);

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    logic next_bit;

    if (i == WIDTH - 1) begin : g_top
      assign next_bit = feedback;
    end else begin : g_shift
      assign next_bit = state[i+1];
    end

    always_ff @(posedge clk or negedge rstn) begin
      if (!rstn) begin
        state[i] <= SEED[i];
      end else if (step) begin
        state[i] <= next_bit;
      end
    end
  end

  // An all-zero register never leaves zero. When a0 is not tapped, a seed
  // with only a0 set shifts into zero one step later, so it is refused too.
  initial begin
    assert ((TAPS[0] ? SEED : SEED >> 1) != '0)
      else $error("prbs_lfsr: SEED would lock the register at zero");
  end

endmodule
