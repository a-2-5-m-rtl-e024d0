// vshift_reg: one vertical token shift register of the row driver.
//
// A bidirectional shift register with one stage per shared-pixel row. The
// external timing generator places a token at the first row through `tok`
// and then moves it one row per shift, forward (towards the last row) or
// backward, chosen shift by shift with `fw_bwn`. Moving a token back and
// forth lets one register address two rows within one row time, which is
// how the row driver reaches a 1 us charge transfer with a 618 ns sample
// time. The shift, direction and token inputs follow the register drawn in
// the row-driver diagram (x_CLK, x_FW/BWn, TOK_x).
//
// Own choices: the x_CLK edge is modelled as a clock enable `shift` on the
// common clock; a backward shift fills the last stage with 0, because the
// token input sits at the first-row end only; reset clears every stage.
//
// Timing: q changes one clock after a cycle with shift = 1.
module vshift_reg #(
  parameter int unsigned N = 1124
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         fw_bwn,
  input  logic         tok,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (shift) begin
      if (fw_bwn) q <= {q[N-2:0], tok};
      else        q <= {1'b0, q[N-1:1]};
    end
  end

endmodule
