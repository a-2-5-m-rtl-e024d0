// output_mux_side: the output multiplexer of one side of the column ADCs.
//
// 1056 column ADCs sit on each side (top and bottom) of the pixel array.
// Their 16-bit words are read out by eight 132:1 hybrid multiplexers, all
// driven by one sequencer. The multiplexers are always wired as a daisy
// chain: the output register of multiplexer k feeds the far end of the
// shift register of multiplexer k+1 (multiplexer 0 takes side_i). With
// chain length L = 1 << chain_log2 the sequencer loads only every 2*L word
// clocks, so in each run of L multiplexers the last one (k mod L = L-1)
// outputs all 2*L words of the run and the others' outputs carry nothing.
// L = 1 gives eight active outputs; L = 2, 4, 8 trade output lanes for
// readout time.
//
// Word order on active output k (own choice, follows from the column order
// of hybrid_mux132): for each tristate input p, for each 6:1 select s, for
// j = k down to k-L+1, group 0 then group 1: column j*132 + g*66 + s*11 + p.
//
// Interface: adc[c] is the word of ADC column c of this side; it must stay
// stable during a row readout. mux_o[k] is multiplexer k's output;
// out_valid marks the word clocks whose words are pixel data.
// Timing: as mux_sequencer; one row takes 1 + 132*L word clocks.
module output_mux_side
  import imager_pkg::*;
#(
  parameter int unsigned W      = PIX_W,
  parameter int unsigned NMUX   = MUX_PER_SIDE
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  word_stb,
  input  logic                                  start,
  input  logic [1:0]                            chain_log2,
  input  logic [NMUX*COLS_PER_MUX-1:0][W-1:0]   adc,
  input  logic [W-1:0]                          side_i,
  output logic [NMUX-1:0][W-1:0]                mux_o,
  output logic                                  out_valid,
  output logic                                  busy,
  output logic                                  row_done
);

  mux_ctrl_t ctrl;

  mux_sequencer u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .word_stb   (word_stb),
    .start      (start),
    .chain_log2 (chain_log2),
    .ctrl       (ctrl),
    .busy       (busy),
    .out_valid  (out_valid),
    .row_done   (row_done)
  );

  for (genvar k = 0; k < NMUX; k++) begin : g_mux
    hybrid_mux132 #(.W(W)) u_mux (
      .clk   (clk),
      .rst_n (rst_n),
      .ctrl  (ctrl),
      .din   (adc[k*COLS_PER_MUX +: COLS_PER_MUX]),
      .mux_i ((k == 0) ? side_i : mux_o[(k + NMUX - 1) % NMUX]),
      .mux_o (mux_o[k])
    );
  end

endmodule
