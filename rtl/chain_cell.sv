// chain_cell: one stage of the daisy-chainable output shift register.
//
// A 2:1 multiplexer in front of a register. On a word clock (adv) with load
// set, the register takes the word from its 6:1 multiplexer; otherwise it
// takes the word from the previous register in the chain. Two cells make one
// 132:1 multiplexer's two-register shift register, and the chain continues
// through neighbouring 132:1 multiplexers, so several of them can share one
// output. These are the only registers running at the full word rate.
// The name of the load/shift select is this design's own; the multiplexer
// diagram draws the 2:1 MUX without naming its select.
//
// Timing: q updates one clock after a cycle with adv set.
module chain_cell #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         adv,
  input  logic         load,
  input  logic [W-1:0] load_d,
  input  logic [W-1:0] shift_d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (adv) q <= load ? load_d : shift_d;
  end

endmodule
