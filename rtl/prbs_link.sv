// prbs_link: PRBS scrambler and descrambler connected back to back.
//
// Two copies of the prbs cell with the same seed and polynomial: the first
// scrambles din onto line, the second descrambles line into dout. The two
// LFSRs must take the same step for the same word. The scrambler's output is
// registered, so a word reaches the descrambler one clock after the
// scrambler used its keystream bit; the enable is therefore delayed by one
// register before it drives the descrambler. Both cells share clk and rstn,
// so reset resynchronises them.
//
// Interface: clk, rstn (active low), en, din[DATA_W-1:0] in;
// line[DATA_W-1:0] (the scrambled stream) and dout[DATA_W-1:0] out.
// Timing: line carries din one clock later; dout carries din two clocks
// later, restored exactly. While en is 0 both cells pass data through and
// their LFSRs hold. Using one cell for both ends and requiring a shared seed
// and polynomial follows the published design; the enable delay register is
// this implementation's way of keeping the two ends in step.
module prbs_link
  import prbs_pkg::*;
#(
  parameter int unsigned       DATA_W = PRBS_DATA_W,
  parameter logic [LFSR_W-1:0] SEED   = LFSR_SEED
) (
  input  logic              clk,
  input  logic              rstn,
  input  logic              en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] line,
  output logic [DATA_W-1:0] dout
);

  logic en_rx;

  prbs #(
    .DATA_W (DATA_W),
    .SEED   (SEED)
  ) u_scrambler (
    .clk  (clk),
    .rstn (rstn),
    .en   (en),
    .din  (din),
    .dout (line)
  );

  // The descrambler's enable follows the scrambled word through the
  // scrambler's output register.
  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      en_rx <= 1'b0;
    end else begin
      en_rx <= en;
    end
  end

  prbs #(
    .DATA_W (DATA_W),
    .SEED   (SEED)
  ) u_descrambler (
    .clk  (clk),
    .rstn (rstn),
    .en   (en_rx),
    .din  (line),
    .dout (dout)
  );

endmodule
