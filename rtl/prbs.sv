// prbs: PRBS scrambler / descrambler cell.
//
// The same cell scrambles at the transmitter and descrambles at the
// receiver, because XORing a word twice with the same keystream bit restores
// it. An eight-stage LFSR (prbs_lfsr) supplies the keystream bit a0; while
// en is 1 every data bit is XORed with that bit and the LFSR advances one
// step per clock. While en is 0 the data passes through unchanged and the
// LFSR holds.
//
//   rstn en din | dout (after the next rising clk edge)
//    0   -   -  | 0            (asynchronous)
//    1   0   d  | d
//    1   1   d  | d ^ {DATA_W{a0}}
//
// Interface: clk, rstn (active low), en, din[DATA_W-1:0] in;
// dout[DATA_W-1:0] out. dout is registered: it shows the result for the din
// and en sampled at the previous rising edge, one clock of latency, one word
// per clock. The truth table, the pin set, the LFSR structure and the 8-bit
// data width follow the published design; the output register, the LFSR
// holding while en is 0, the asynchronous reset and the all-ones seed are
// this implementation's choices.
module prbs
  import prbs_pkg::*;
#(
  parameter int unsigned          DATA_W = PRBS_DATA_W,
  parameter logic [LFSR_W-1:0]    SEED   = LFSR_SEED
) (
  input  logic              clk,
  input  logic              rstn,
  input  logic              en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [LFSR_W-1:0] lfsr_state;
  logic              key;

  prbs_lfsr #(
    .WIDTH (LFSR_W),
    .TAPS  (LFSR_TAPS),
    .SEED  (SEED)
  ) u_lfsr (
    .clk      (clk),
    .rstn     (rstn),
    .step     (en),
    .state    (lfsr_state)
  );

  // The keystream bit is the last stage, a0.
  assign key = lfsr_state[0];

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      dout <= '0;
    end else if (en) begin
      dout <= din ^ {DATA_W{key}};
    end else begin
      dout <= din;
    end
  end

endmodule
