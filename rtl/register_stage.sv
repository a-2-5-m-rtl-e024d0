// register_stage: latches the six 11:1 tristate multiplexer values.
//
// Once the tristate buses have settled, mux_reg_en (together with the word
// clock enable adv) captures all six values at once. The 11:1 multiplexers
// can then move to their next input and settle for a whole register period,
// while the six held words are read out through the 6:1 multiplexer. These
// registers run at the word rate divided by 12 (divided by 12 times the
// daisy-chain length). Reset value 0 is an own choice.
//
// Timing: q updates one clock after a cycle with adv & en.
module register_stage #(
  parameter int unsigned N = 6,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adv,
  input  logic                en,
  input  logic [N-1:0][W-1:0] din,
  output logic [N-1:0][W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (adv && en)  q <= din;
  end

endmodule
