// hybrid_mux132: one 132:1 hybrid output multiplexer.
//
// Reads 132 column ADC words out through one output word stream while
// keeping most of the hardware slow. It has two groups; each group has six
// 11:1 tristate multiplexers (all switched by the one-hot mux_en), a
// register stage that latches their six values on mux_reg_en, and a 6:1
// multiplexer (load_sel). The two 6:1 outputs load a two-register shift
// register (chain cells); between loads it shifts towards mux_o and takes
// mux_i at its far end, which is how several 132:1 multiplexers are daisy
// chained onto one output. Only the two chain registers run at the word
// rate; the 12 register-stage words run at the word rate divided by 12.
//
// Column order (own choice, not given): group g, tristate multiplexer m,
// tristate input p read column din[g*66 + m*11 + p]. Group 0 is the group
// whose chain register drives mux_o, so after a load mux_o shows group 0's
// word first and group 1's word on the next word clock.
//
// Interface: ctrl carries the shared control lines (imager_pkg::mux_ctrl_t);
// all registers advance only on ctrl.adv. Timing: a load or shift is seen
// at mux_o one clock after the cycle with ctrl.adv set.
module hybrid_mux132
  import imager_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  mux_ctrl_t                         ctrl,
  input  logic [COLS_PER_MUX-1:0][W-1:0]    din,
  input  logic [W-1:0]                      mux_i,
  output logic [W-1:0]                      mux_o
);

  localparam int unsigned GCOLS = AMUX_N * SMUX_N; // 66 columns per group

  logic [GROUPS-1:0][W-1:0] chain_q;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [SMUX_N-1:0][W-1:0] amux_out;
    logic [SMUX_N-1:0][W-1:0] stage_q;
    logic [W-1:0]             smux_out;

    for (genvar m = 0; m < SMUX_N; m++) begin : g_amux
      tristate_mux #(.N(AMUX_N), .W(W)) u_amux (
        .en   (ctrl.mux_en),
        .din  (din[g*GCOLS + m*AMUX_N +: AMUX_N]),
        .dout (amux_out[m])
      );
    end

    register_stage #(.N(SMUX_N), .W(W)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .adv   (ctrl.adv),
      .en    (ctrl.mux_reg_en),
      .din   (amux_out),
      .q     (stage_q)
    );

    stage_mux #(.N(SMUX_N), .W(W)) u_smux (
      .sel  (ctrl.load_sel),
      .din  (stage_q),
      .dout (smux_out)
    );

    chain_cell #(.W(W)) u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .adv     (ctrl.adv),
      .load    (ctrl.load),
      .load_d  (smux_out),
      .shift_d ((g == GROUPS-1) ? mux_i : chain_q[(g + 1) % GROUPS]),
      .q       (chain_q[g])
    );
  end

  assign mux_o = chain_q[0];

endmodule
