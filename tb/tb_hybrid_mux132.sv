// tb_hybrid_mux132: the 132:1 multiplexer under controls driven directly by
// the test (not by the sequencer). For each tristate input p the test
// latches the register stage, then for each 6:1 select loads the output
// shift register and shifts it three times, feeding random words into
// mux_i. Expected at mux_o: column g*66 + s*11 + p of group 0, then of
// group 1, then the two words shifted in through mux_i (daisy chain).
// Idle clocks between word clocks check that everything holds without adv.
module tb_hybrid_mux132;
  import imager_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  mux_ctrl_t ctrl;
  logic [COLS_PER_MUX-1:0][W-1:0] din;
  logic [W-1:0] mux_i, mux_o;
  int checks = 0, failures = 0;

  hybrid_mux132 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one word clock with the given controls, then one idle clock
  task automatic tick(input logic reg_en, input logic ld, input int s, input logic [W-1:0] mi);
    @(negedge clk);
    ctrl.adv = 1'b1;
    ctrl.mux_reg_en = reg_en;
    ctrl.load = ld;
    ctrl.load_sel = 3'(s);
    mux_i = mi;
    @(negedge clk);
    ctrl.adv = 1'b0;
    ctrl.mux_reg_en = 1'b0;
    ctrl.load = 1'b0;
    mux_i = W'($urandom);
  endtask

  task automatic expect_out(input logic [W-1:0] e, input string what);
    checks++;
    if (mux_o !== e) begin
      failures++;
      $display("FAIL %s: mux_o=%h expected %h", what, mux_o, e);
    end
  endtask

  initial begin
    ctrl = '0;
    mux_i = '0;
    for (int c = 0; c < COLS_PER_MUX; c++) din[c] = W'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < AMUX_N; p++) begin
      ctrl.mux_en = AMUX_N'(1) << p;
      tick(1'b1, 1'b0, 0, '0);
      // the tristate inputs move on; the register stage must hold
      ctrl.mux_en = (p + 1 < AMUX_N) ? AMUX_N'(1) << (p + 1) : '0;
      for (int s = 0; s < SMUX_N; s++) begin
        logic [W-1:0] x1, x2;
        x1 = W'($urandom);
        x2 = W'($urandom);
        tick(1'b0, 1'b1, s, '0);
        expect_out(din[0*66 + s*11 + p], "group 0");
        tick(1'b0, 1'b0, s, x1);
        expect_out(din[1*66 + s*11 + p], "group 1");
        tick(1'b0, 1'b0, s, x2);
        expect_out(x1, "chain 1");
        tick(1'b0, 1'b0, s, '0);
        expect_out(x2, "chain 2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
