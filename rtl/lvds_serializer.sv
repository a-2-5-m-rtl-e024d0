// lvds_serializer: parallel-to-serial converter of one LVDS lane.
//
// Each 132:1 multiplexer output feeds two LVDS lanes. Per word, a lane
// sends ser_factor bits, least significant first: lane 0 the bits
// [f-1:0] of the word and lane 1 the bits [2f-1:f] (the caller selects them
// through `lane`). With 16-bit ADC words the factor is 8, with 12-bit words
// 6; the factor is programmable from 1 to 16. A word clock (load) must come
// every ser_factor clocks; the output shift register takes the next word at
// that clock and shifts one bit per clock. `frame` is high while the first
// bit of a word is on sdo and `valid` carries the word's data-valid flag.
// The drive stage (the LVDS pad) is not part of this RTL. Bit order, lane
// split and the frame marker are this design's own choices.
//
// Timing: sdo shows bit 0 of a word the clock after its load.
module lvds_serializer
  import imager_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(SER_MAX):0]   ser_factor,
  input  logic                       lane,
  input  logic                       load,
  input  logic [2*SER_MAX-1:0]       word,
  input  logic                       valid_in,
  output logic                       sdo,
  output logic                       frame,
  output logic                       valid
);

  logic [SER_MAX-1:0] sr;
  logic [2*SER_MAX-1:0] sel;

  // This lane's field of the word: [f-1:0] or [2f-1:f].
  assign sel = lane ? (word >> ser_factor) : word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      frame <= 1'b0;
      valid <= 1'b0;
    end else if (load) begin
      sr    <= sel[SER_MAX-1:0];
      frame <= 1'b1;
      valid <= valid_in;
    end else begin
      sr    <= sr >> 1;
      frame <= 1'b0;
    end
  end

  assign sdo = sr[0];

  assert property (@(posedge clk) disable iff (!rst_n)
                   ser_factor != 0 && 32'(ser_factor) <= SER_MAX);

endmodule
