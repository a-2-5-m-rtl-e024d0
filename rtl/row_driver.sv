// row_driver: vertical row addressing of the 2112x1124 shared-pixel array.
//
// Six vertical token shift registers (select1, select2, reset1, reset2,
// transfer 1/2 and transfer 0/3) are driven by an external timing
// generator. Per shared row the two select registers are combined into
// SEL(n) and the two reset registers into RST(n); the two transfer
// registers drive TG_1/2(n) and TG_0/3(n) directly. These four lines per
// row then go through level shifters (not part of this RTL) to the pixels.
// With two select/reset registers one row can be read while another is
// being reset; with forward/backward shifting one transfer register serves
// the transfer pulses of two rows in one row time.
//
// Follows the row-driver diagram: the register set, the combining gates
// (printed with the symbol ">=", read as the OR ">=1") and the four outputs
// per row. Own choice: each register has an output enable `en` gating its
// token onto the row lines, because the timing diagram shows the transfer
// token passing over rows that are not pulsed.
//
// Interface: vctrl[r] are the controls of register r (see imager_pkg::vreg_e).
// Timing: register state changes one clock after a shift; outputs are
// combinational from the register state and the enables.
module row_driver
  import imager_pkg::*;
#(
  parameter int unsigned ROWS_N = ROWS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  vreg_ctrl_t        vctrl [NUM_VREG],
  output logic [ROWS_N-1:0] sel,
  output logic [ROWS_N-1:0] rst,
  output logic [ROWS_N-1:0] tg12,
  output logic [ROWS_N-1:0] tg03,
  output logic [ROWS_N-1:0] tokens [NUM_VREG]
);

  for (genvar r = 0; r < NUM_VREG; r++) begin : g_reg
    vshift_reg #(.N(ROWS_N)) u_sr (
      .clk    (clk),
      .rst_n  (rst_n),
      .shift  (vctrl[r].shift),
      .fw_bwn (vctrl[r].fw_bwn),
      .tok    (vctrl[r].tok),
      .q      (tokens[r])
    );
  end

  function automatic logic [ROWS_N-1:0] gate(input logic [ROWS_N-1:0] t, input logic e);
    return e ? t : '0;
  endfunction

  always_comb begin
    sel  = gate(tokens[VR_SEL1], vctrl[VR_SEL1].en) | gate(tokens[VR_SEL2], vctrl[VR_SEL2].en);
    rst  = gate(tokens[VR_RST1], vctrl[VR_RST1].en) | gate(tokens[VR_RST2], vctrl[VR_RST2].en);
    tg12 = gate(tokens[VR_TG12], vctrl[VR_TG12].en);
    tg03 = gate(tokens[VR_TG03], vctrl[VR_TG03].en);
  end

endmodule
