// mux_sequencer: control of the hybrid output multiplexers for one row.
//
// One sequencer drives the shared control lines of all 132:1 multiplexers
// of a side. After `start` it walks the eleven tristate inputs; for each it
// latches the six settled values into the register stages, then reads them
// out through the 6:1 multiplexers, loading the output shift registers once
// every 2*L word clocks (L = daisy-chain length, 1 << chain_log2) and
// shifting in between. The register stage latches on the last word clock
// of the sixth load period, the same clock edge at which nothing is loaded,
// so the next load already sees the new values and the word stream has no
// gaps. Meanwhile mux_en already selects the next input, which therefore
// has 12*L word clocks to settle. One row takes 1 + 132*L word clocks.
//
// The control lines are the multiplexer diagram's; their timing is this
// design's own (the document gives none). `out_valid` tells whether the
// word now at mux_o is pixel data; `row_done` pulses with the last word
// clock of the row. chain_log2 must stay 0..3 (8 multiplexers per side) and
// must not change during a row.
//
// Timing: word_stb is the word clock enable; state and registers fed by
// ctrl advance on clocks with word_stb set.
module mux_sequencer
  import imager_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      word_stb,
  input  logic      start,
  input  logic [1:0] chain_log2,
  output mux_ctrl_t ctrl,
  output logic      busy,
  output logic      out_valid,
  output logic      row_done
);

  logic       active, primed;
  logic [3:0] pos;     // tristate input held in the register stages
  logic [2:0] sidx;    // 6:1 select of the current load period
  logic [3:0] widx;    // word clock within a load period
  logic [3:0] wlast;   // 2*L - 1

  assign wlast = 4'((2 << chain_log2) - 1);

  logic last_word, latch_next;
  assign last_word  = primed && (sidx == 3'(SMUX_N - 1)) && (widx == wlast);
  assign latch_next = last_word && (pos != 4'(AMUX_N - 1));

  always_comb begin
    ctrl            = '0;
    ctrl.adv        = word_stb;
    ctrl.load_sel   = sidx;
    ctrl.load       = primed && (widx == 4'd0);
    ctrl.mux_reg_en = active && (!primed || latch_next);
    if (active && !primed)
      ctrl.mux_en = AMUX_N'(1);
    else if (active && pos != 4'(AMUX_N - 1))
      ctrl.mux_en = AMUX_N'(1) << (pos + 4'd1);
  end

  assign busy     = active;
  assign row_done = word_stb && active && last_word && !latch_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      primed    <= 1'b0;
      pos       <= '0;
      sidx      <= '0;
      widx      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          primed <= 1'b0;
          pos    <= '0;
          sidx   <= '0;
          widx   <= '0;
        end
      end
      if (word_stb) begin
        out_valid <= active && primed;
        if (active) begin
          if (!primed) begin
            primed <= 1'b1;
          end else if (widx == wlast) begin
            widx <= '0;
            if (sidx == 3'(SMUX_N - 1)) begin
              sidx <= '0;
              if (latch_next) pos <= pos + 4'd1;
              else begin
                active <= 1'b0;
                primed <= 1'b0;
              end
            end else begin
              sidx <= sidx + 3'd1;
            end
          end else begin
            widx <= widx + 4'd1;
          end
        end
      end
    end
  end

  // The daisy-chain length may only change between rows.
  assert property (@(posedge clk) disable iff (!rst_n) active |=> (!active || $stable(chain_log2)));

endmodule
