// imager_top: digital core of a 4224x2248-pixel, 360 fps CMOS imager.
//
// The pixel array is 2112x1124 four-shared pixels. Rows are addressed by
// the row driver: six token shift registers, clocked and steered forward
// and backward by an external timing generator, produce SEL, RST, TG_1/2
// and TG_0/3 for each shared row (to level shifters and the array, which
// are analog and outside this RTL). Every pixel column pair has a column
// ADC; 1056 ADCs sit above and 1056 below the array, and their 16-bit
// words are inputs here. Each side reads its ADCs out through eight 132:1
// hybrid multiplexers (slow tristate buses, a register stage, fast 2-deep
// daisy-chainable shift registers) and 16 LVDS lanes, two per multiplexer,
// each with a programmable serialization factor. At 1.8 Gb/s per lane the
// 32 lanes carry 3.6 Gpixel/s of 16-bit words, 58 Gb/s.
//
// The design runs on one clock, the serial bit clock. word_timer derives
// the word clock enable (one in ser_factor clocks) that moves the
// multiplexers and loads the serializers. A row readout starts with
// row_start while the ADC words are stable, and takes 1 + 132*L word
// clocks on both sides in parallel, L = 1 << chain_log2 being the daisy-
// chain length. With L = 1 all 32 lanes carry data; with L > 1 only the
// lanes of multiplexers k with k mod L = L-1 do. lvds_frame marks the first
// bit of each serialized word and lvds_valid whether the word is pixel data
// (one per side; all lanes of a side are in step).
//
// Own choices (the document does not give them): a single clock with
// enables instead of separate shift-register and serializer clocks, active-
// low asynchronous reset, the column order, the lane split, frame/valid
// outputs, and the output enables of the row-driver registers.
module imager_top
  import imager_pkg::*;
#(
  parameter int unsigned ROWS_N = ROWS,
  parameter int unsigned NMUX   = MUX_PER_SIDE,
  localparam int unsigned NCOL  = NMUX * COLS_PER_MUX,
  localparam int unsigned NLANE = NMUX * LANES_PER_MUX,
  localparam int unsigned SFW   = $clog2(SER_MAX) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // row driver (from the external timing generator / to the level shifters)
  input  vreg_ctrl_t                    vctrl [NUM_VREG],
  output logic [ROWS_N-1:0]             row_sel,
  output logic [ROWS_N-1:0]             row_rst,
  output logic [ROWS_N-1:0]             row_tg12,
  output logic [ROWS_N-1:0]             row_tg03,
  // column ADC words, side 0 = top, side 1 = bottom
  input  logic [1:0][NCOL-1:0][PIX_W-1:0] adc,
  // readout control
  input  logic                          row_start,
  input  logic [1:0]                    chain_log2,
  input  logic [SFW-1:0]                ser_factor,
  // LVDS lanes (to the LVDS drivers)
  output logic [1:0][NLANE-1:0]         lvds_sdo,
  output logic [1:0]                    lvds_frame,
  output logic [1:0]                    lvds_valid,
  output logic [1:0]                    mux_busy,
  output logic [1:0]                    row_done
);

  logic [ROWS_N-1:0] vtokens [NUM_VREG];

  row_driver #(.ROWS_N(ROWS_N)) u_rows (
    .clk    (clk),
    .rst_n  (rst_n),
    .vctrl  (vctrl),
    .sel    (row_sel),
    .rst    (row_rst),
    .tg12   (row_tg12),
    .tg03   (row_tg03),
    .tokens (vtokens)
  );

  logic word_stb;

  word_timer u_wt (
    .clk        (clk),
    .rst_n      (rst_n),
    .ser_factor (ser_factor),
    .stb        (word_stb)
  );

  for (genvar sd = 0; sd < 2; sd++) begin : g_side
    logic [NMUX-1:0][PIX_W-1:0] mux_o;
    logic                       out_valid;
    logic [NLANE-1:0]           frame, valid;

    output_mux_side #(.W(PIX_W), .NMUX(NMUX)) u_side (
      .clk        (clk),
      .rst_n      (rst_n),
      .word_stb   (word_stb),
      .start      (row_start),
      .chain_log2 (chain_log2),
      .adc        (adc[sd]),
      .side_i     ('0),
      .mux_o      (mux_o),
      .out_valid  (out_valid),
      .busy       (mux_busy[sd]),
      .row_done   (row_done[sd])
    );

    for (genvar ln = 0; ln < NLANE; ln++) begin : g_lane
      lvds_serializer u_ser (
        .clk        (clk),
        .rst_n      (rst_n),
        .ser_factor (ser_factor),
        .lane       (1'(ln % LANES_PER_MUX)),
        .load       (word_stb),
        .word       ({{(2*SER_MAX-PIX_W){1'b0}}, mux_o[ln / LANES_PER_MUX]}),
        .valid_in   (out_valid),
        .sdo        (lvds_sdo[sd][ln]),
        .frame      (frame[ln]),
        .valid      (valid[ln])
      );
    end

    assign lvds_frame[sd] = frame[0];
    assign lvds_valid[sd] = valid[0];
  end

endmodule
