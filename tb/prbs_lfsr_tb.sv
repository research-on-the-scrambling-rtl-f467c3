// prbs_lfsr_tb: self-checking testbench for prbs_lfsr at its default size.
//
// The reference is the keystream written as a bit recurrence instead of a
// register: with the taps a7, a5, a3, a1 and shifting towards a0, the output
// bits obey s[n+8] = s[n+7] ^ s[n+5] ^ s[n+3] ^ s[n+1], starting from eight
// ones (the seed). The first 24 bits are also compared with a constant
// worked out by hand. The testbench advances the register with random
// stalls, checks that it holds while step is 0, that it repeats after 127
// steps and that an asynchronous reset mid-run reloads the seed.
module prbs_lfsr_tb;
  import prbs_pkg::*;

  localparam int unsigned NSTEPS = 400;
  // Keystream from the all-ones seed, first bit in the MSB.
  localparam logic [23:0] FIRST_BITS = 24'b1111_1111_0100_1001_0101_1101;

  logic              clk;
  logic              rstn = 1'b0;
  logic              step = 1'b0;
  logic [LFSR_W-1:0] state;

  int checks = 0;
  int failures = 0;
  bit s [NSTEPS+8];
  logic [LFSR_W-1:0] state_at [NSTEPS+1];

  prbs_lfsr dut (.clk(clk), .rstn(rstn), .step(step), .state(state));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int i = 0; i < 8; i++) s[i] = 1'b1;
    for (int i = 0; i < NSTEPS; i++) s[i+8] = s[i+7] ^ s[i+5] ^ s[i+3] ^ s[i+1];
    for (int i = 0; i < 24; i++)
      check(s[i] == FIRST_BITS[23-i], $sformatf("reference bit %0d", i));

    repeat (2) @(posedge clk);
    rstn = 1'b1;
    @(negedge clk);
    check(state == 8'hFF, "seed after reset");

    n = 0;
    while (n < NSTEPS) begin
      // The whole register must be the next eight keystream bits.
      for (int k = 0; k < 8; k++)
        check(state[k] == s[n+k], $sformatf("step %0d stage a%0d", n, k));
      state_at[n] = state;
      step = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step) n++;
      else check(state == state_at[n], $sformatf("hold at step %0d", n));
    end
    step = 1'b0;
    state_at[NSTEPS] = state;

    // Period 127 once the seed has been left.
    for (int i = 1; i + 127 <= NSTEPS; i++)
      check(state_at[i] == state_at[i+127], $sformatf("period at step %0d", i));
    check(state_at[1] != state_at[1+126], "no shorter period 126");

    // Asynchronous reset in mid-cycle reloads the seed without a clock edge.
    step = 1'b1;
    #2 rstn = 1'b0;
    #1 check(state == 8'hFF, "asynchronous reset");
    @(negedge clk);
    check(state == 8'hFF, "held in reset");
    rstn = 1'b1;
    @(negedge clk);
    check(state == state_at[1], "first step after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
