// prbs_link_tb: end-to-end testbench for prbs_link at its default parameters.
//
// Random words with random enable patterns go through the scrambler and the
// descrambler. Each clock the testbench checks that line equals the input of
// one clock earlier XORed with the model keystream (computed as the bit
// recurrence s[n+8] = s[n+7] ^ s[n+5] ^ s[n+3] ^ s[n+1] from an all-ones
// start) and that dout equals the input of two clocks earlier. Resets are
// applied in mid-stream. The testbench counts how often each mechanism
// occurred (reset, pass-through with en = 0, inversion by keystream bit 1,
// keystream bit 0, a full keystream period without reset, long runs of
// disabled words) and counts a failure for any that never did.
module prbs_link_tb;
  import prbs_pkg::*;

  localparam int unsigned W = PRBS_DATA_W;
  localparam int unsigned NCYC = 4000;

  logic         clk;
  logic         rstn;
  logic         en;
  logic [W-1:0] din;
  logic [W-1:0] line;
  logic [W-1:0] dout;

  int checks = 0;
  int failures = 0;
  bit ks [8192];

  int n_reset = 0, n_pass = 0, n_key1 = 0, n_key0 = 0, n_wrap = 0, n_idle_run = 0;

  prbs_link dut (.clk(clk), .rstn(rstn), .en(en), .din(din), .line(line), .dout(dout));

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
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int           ks_idx;
    int           idle_len;
    bit           valid1, valid2;   // a word entered 1 and 2 clocks ago
    logic [W-1:0] d1, d2;           // words entered 1 and 2 clocks ago
    logic [W-1:0] exp_line;
    logic         mode;             // 1: mostly enabled, 0: mostly disabled

    for (int i = 0; i < 8; i++) ks[i] = 1'b1;
    for (int i = 0; i + 8 < 8192; i++) ks[i+8] = ks[i+7] ^ ks[i+5] ^ ks[i+3] ^ ks[i+1];

    rstn = 1'b0;
    en = 1'b0;
    din = '0;
    repeat (3) @(negedge clk);
    check(line == '0 && dout == '0, "outputs cleared in reset");
    rstn = 1'b1;
    ks_idx = 0;
    valid1 = 1'b0;
    valid2 = 1'b0;
    d1 = '0;
    d2 = '0;
    idle_len = 0;
    mode = 1'b1;

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      if (cyc % 300 == 0) mode = ~mode;
      if (cyc == 1500 || cyc == 2900) begin
        // Reset in mid-stream: both ends restart from the seed together.
        rstn = 1'b0;
        #1;
        check(line == '0 && dout == '0, $sformatf("reset clears outputs at cycle %0d", cyc));
        @(negedge clk);
        rstn = 1'b1;
        n_reset++;
        ks_idx = 0;
        valid1 = 1'b0;
        valid2 = 1'b0;
      end

      en = mode ? ($urandom_range(0, 7) != 0) : ($urandom_range(0, 7) == 0);
      din = W'($urandom);
      exp_line = en ? (din ^ {W{ks[ks_idx]}}) : din;
      if (!en) n_pass++;
      else if (ks[ks_idx]) n_key1++;
      else n_key0++;
      if (en) begin
        ks_idx++;
        if (ks_idx == 1 + 127) n_wrap++;
        if (idle_len >= 8) n_idle_run++;
        idle_len = 0;
      end else begin
        idle_len++;
      end

      @(posedge clk);
      #1;
      check(line == exp_line, $sformatf("cycle %0d line %h expected %h", cyc, line, exp_line));
      d2 = d1;
      valid2 = valid1;
      d1 = din;
      valid1 = 1'b1;
      if (valid2)
        check(dout == d2, $sformatf("cycle %0d dout %h expected %h", cyc, dout, d2));
      @(negedge clk);
    end

    $display("mechanisms: reset=%0d pass=%0d key1=%0d key0=%0d period=%0d idle_runs=%0d",
             n_reset, n_pass, n_key1, n_key0, n_wrap, n_idle_run);
    check(n_reset > 0, "mid-stream reset never happened");
    check(n_pass > 0, "pass-through never happened");
    check(n_key1 > 0, "keystream bit 1 never used");
    check(n_key0 > 0, "keystream bit 0 never used");
    check(n_wrap > 0, "keystream never completed a period");
    check(n_idle_run > 0, "no long disabled run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
