// stage_mux: the 6:1 multiplexer after the register stage.
//
// Selects one of the six register-stage words with the binary select
// load_sel[2:0]; its output is what the 2-deep output shift register loads.
// Select values 6 and 7 are unused and give 0 (own choice).
// Purely combinational.
module stage_mux #(
  parameter int unsigned N = 6,
  parameter int unsigned W = 16,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0]       sel,
  input  logic [N-1:0][W-1:0] din,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) begin
      if (sel == SW'(i)) dout = din[i];
    end
  end

endmodule
