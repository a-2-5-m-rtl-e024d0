// word_timer: word clock of the serial outputs.
//
// Divides the bit clock by the programmable serialization factor: `stb` is
// high for one clock in every ser_factor clocks. It is the clock enable of
// the output multiplexers and the load of the serializers, so that one
// multiplexer word is sent per serialized word. A helper of imager_top;
// the divider is this design's choice, since how the chip derives its
// word clock from the serial clock is not known.
module word_timer
  import imager_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(SER_MAX):0] ser_factor,
  output logic                     stb
);

  logic [$clog2(SER_MAX):0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (cnt + 1'b1 >= ser_factor) cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  assign stb = (cnt + 1'b1 >= ser_factor);

endmodule
