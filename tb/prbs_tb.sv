// prbs_tb: self-checking testbench for the prbs scrambler / descrambler cell.
//
// Part 1 walks through every row of the cell's truth table (reset clears
// dout, en = 0 passes data, en = 1 XORs every bit with the keystream bit)
// and replays the published example stimulus: with an all-ones seed the
// first eight enabled words come out inverted (aa -> 55, cc -> 33,
// f0 -> 0f, 0f -> f0) and a disabled word passes unchanged (f0 -> f0).
// Part 2 drives random data and random enables and compares dout, one clock
// after each input, with a model that keeps its own keystream as the bit
// recurrence s[n+8] = s[n+7] ^ s[n+5] ^ s[n+3] ^ s[n+1]. Part 3 feeds the
// scrambled words through a second cell and checks that the data returns.
module prbs_tb;
  import prbs_pkg::*;

  localparam int unsigned W = PRBS_DATA_W;
  localparam int unsigned NRAND = 1000;

  logic         clk;
  logic         rstn;
  logic         en;
  logic [W-1:0] din;
  logic [W-1:0] dout;
  logic         en2;
  logic [W-1:0] dout2;

  int checks = 0;
  int failures = 0;
  int ks_idx;             // keystream bits used so far by the model
  bit ks [4096];

  prbs dut (.clk(clk), .rstn(rstn), .en(en), .din(din), .dout(dout));
  // Second cell: descrambles dout, enabled one clock after the first.
  prbs dut2 (.clk(clk), .rstn(rstn), .en(en2), .din(dout), .dout(dout2));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model of the next dout for the current inputs; advances the keystream.
  function automatic logic [W-1:0] model(input logic e, input logic [W-1:0] d);
    logic [W-1:0] r;
    r = e ? (d ^ {W{ks[ks_idx]}}) : d;
    if (e) ks_idx++;
    return r;
  endfunction

  // Apply one word on the falling edge and check dout after the next rise.
  task automatic drive(input logic e, input logic [W-1:0] d, input string what);
    logic [W-1:0] exp;
    en = e;
    din = d;
    exp = model(e, d);
    @(posedge clk);
    #1;
    check(dout == exp, $sformatf("%s: en=%0b din=%h dout=%h expected %h", what, e, d, dout, exp));
    @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] d;
    logic [W-1:0] hist [$];

    for (int i = 0; i < 8; i++) ks[i] = 1'b1;
    for (int i = 0; i + 8 < 4096; i++) ks[i+8] = ks[i+7] ^ ks[i+5] ^ ks[i+3] ^ ks[i+1];
    ks_idx = 0;

    // Truth table row 1: reset forces dout to 0 whatever en and din are.
    rstn = 1'b1;
    en = 1'b1;
    en2 = 1'b0;
    din = 8'h5a;
    @(negedge clk);
    rstn = 1'b0;
    #1 check(dout == '0, "reset clears dout at once");
    repeat (2) @(negedge clk);
    check(dout == '0, "dout held at 0 in reset");
    en = 1'b0;
    @(negedge clk);
    check(dout == '0, "dout held at 0 in reset with en=0");
    rstn = 1'b1;

    // Published example: rows 2 to 5 of the truth table, exact values.
    drive(1'b0, 8'h00, "pass 00");
    check(dout == 8'h00, "example 00 -> 00");
    drive(1'b0, 8'haa, "pass aa");
    check(dout == 8'haa, "example aa -> aa");
    drive(1'b0, 8'hcc, "pass cc");
    drive(1'b0, 8'hf0, "pass f0");
    drive(1'b1, 8'haa, "scramble aa");
    check(dout == 8'h55, "example aa -> 55");
    drive(1'b1, 8'hcc, "scramble cc");
    check(dout == 8'h33, "example cc -> 33");
    drive(1'b1, 8'hf0, "scramble f0");
    check(dout == 8'h0f, "example f0 -> 0f");
    drive(1'b0, 8'hf0, "pass f0 again");
    check(dout == 8'hf0, "example f0 -> f0 with en=0");
    drive(1'b1, 8'h0f, "scramble 0f");
    check(dout == 8'hf0, "example 0f -> f0");
    // Four enabled words so far; four more keep a0 at 1, the ninth is 0.
    for (int i = 0; i < 4; i++) drive(1'b1, 8'h3c, "scramble 3c");
    check(dout == 8'hc3, "eighth enabled word inverted");
    drive(1'b1, 8'h3c, "scramble 3c (a0 = 0)");
    check(dout == 8'h3c, "ninth enabled word unchanged");
    drive(1'b0, 8'h00, "din 0, en 0");
    check(dout == 8'h00, "row: en=0 din=0 -> 0");

    // Random data and enables against the model.
    for (int i = 0; i < NRAND; i++) begin
      d = W'($urandom);
      drive(($urandom_range(0, 2) != 0), d, $sformatf("random word %0d", i));
    end

    // Scramble, then descramble in the second cell.
    rstn = 1'b0;
    @(negedge clk);
    rstn = 1'b1;
    ks_idx = 0;
    en2 = 1'b0;
    for (int i = 0; i < 600; i++) begin
      d = W'($urandom);
      hist.push_back(d);
      en = ($urandom_range(0, 3) != 0);
      din = d;
      @(posedge clk);
      #1;
      en2 = en;
      if (i >= 1) begin
        check(dout2 == hist[0], $sformatf("round trip word %0d: got %h expected %h",
                                          i - 1, dout2, hist[0]));
        void'(hist.pop_front());
      end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
