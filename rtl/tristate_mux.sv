// tristate_mux: the 11:1 analog tristate multiplexer of the output mux.
//
// On the chip, eleven column ADC outputs share one long bus and each drives
// it through a tristate buffer enabled by one bit of mux_en. It is compact
// and low power but slow, so the value is given a full register-stage period
// to settle. Here the shared bus is written as its logic function: an AND-OR
// of the inputs with the one-hot enable, which gives 0 when no enable is set
// (a floating bus has no defined value). Two enables at once would be bus
// contention on the chip; the assertion flags it.
//
// Interface: din[i] is ADC word i, en[i] selects it. Purely combinational.
module tristate_mux #(
  parameter int unsigned N = 11,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0]        en,
  input  logic [N-1:0][W-1:0] din,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      dout |= din[i] & {W{en[i]}};
    end
  end

  // Bus contention: at most one driver enabled.
  always_comb begin
    assert ($onehot0(en)) else $error("tristate_mux: %0d drivers enabled", $countones(en));
  end

endmodule
