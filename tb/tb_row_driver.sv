// tb_row_driver: the full 1124-row driver.
// Part 1 replays the transfer-token walk of the row-timing diagram for
// three row times (shared row counts v+2..v+4, 8 slots each), with n = 20:
// TG1/2 visits rows n+3, n+2, n+1, n+2, n+3, n+4, n+5, n+6, n+5, n+4, n+3,
// n+4 and is pulsed at n+1, n+6, n+3; TG0/3 visits n+2, n+3, n+4, n+5, n+4,
// n+3, n+2, n+3, n+4, n+5, n+6, n+7 and is pulsed at n+5, n+2, n+7. Each
// slot moves the token one row forward or backward. The test checks that
// exactly one row holds each token, at the expected row, and that the TG
// line of that row is driven only in the pulsed slots.
// Part 2 places the select1/select2 and reset1/reset2 tokens on random
// rows and checks SEL and RST as the OR of the enabled registers.
module tb_row_driver;
  import imager_pkg::*;
  localparam int R = ROWS;
  logic clk = 1'b0, rst_n = 1'b0;
  vreg_ctrl_t vctrl [NUM_VREG];
  logic [R-1:0] sel, rst, tg12, tg03;
  logic [R-1:0] tokens [NUM_VREG];
  int checks = 0, failures = 0, nfw = 0, nbw = 0, nboth = 0;

  row_driver #(.ROWS_N(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one shift of register r in the given direction with the given token
  task automatic shift(input int r, input logic fw, input logic tok);
    @(negedge clk);
    vctrl[r].shift  = 1'b1;
    vctrl[r].fw_bwn = fw;
    vctrl[r].tok    = tok;
    @(negedge clk);
    vctrl[r].shift  = 1'b0;
    vctrl[r].tok    = 1'b0;
    if (fw) nfw++; else nbw++;
  endtask

  // put a single token of register r on row `row` (register must be empty)
  task automatic place(input int r, input int row);
    shift(r, 1'b1, 1'b1);
    repeat (row) shift(r, 1'b1, 1'b0);
  endtask

  task automatic clear(input int r);
    repeat (R) shift(r, 1'b0, 1'b0);
  endtask

  localparam int NN = 20;
  int walk12[12] = '{NN+3, NN+2, NN+1, NN+2, NN+3, NN+4, NN+5, NN+6, NN+5, NN+4, NN+3, NN+4};
  int walk03[12] = '{NN+2, NN+3, NN+4, NN+5, NN+4, NN+3, NN+2, NN+3, NN+4, NN+5, NN+6, NN+7};
  bit puls12[12] = '{0, 0, 1, 0, 0, 0, 0, 1, 0, 0, 1, 0};
  bit puls03[12] = '{0, 0, 0, 1, 0, 0, 1, 0, 0, 0, 0, 1};

  initial begin
    foreach (vctrl[r]) vctrl[r] = '{tok: 1'b0, shift: 1'b0, fw_bwn: 1'b1, en: 1'b0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sel == '0 && rst == '0 && tg12 == '0 && tg03 == '0, "all lines low after reset");

    // ---- part 1: forward/backward transfer-token walk ----
    place(VR_TG12, walk12[0]);
    place(VR_TG03, walk03[0]);
    for (int t = 0; t < 12; t++) begin
      if (t > 0) begin
        shift(VR_TG12, walk12[t] > walk12[t-1], 1'b0);
        shift(VR_TG03, walk03[t] > walk03[t-1], 1'b0);
      end
      check($countones(tokens[VR_TG12]) == 1 && tokens[VR_TG12][walk12[t]],
            $sformatf("TG1/2 token at row %0d in slot %0d", walk12[t], t));
      check($countones(tokens[VR_TG03]) == 1 && tokens[VR_TG03][walk03[t]],
            $sformatf("TG0/3 token at row %0d in slot %0d", walk03[t], t));
      vctrl[VR_TG12].en = puls12[t];
      vctrl[VR_TG03].en = puls03[t];
      #1;
      check(tg12 == (puls12[t] ? (R'(1) << walk12[t]) : '0), $sformatf("TG_1/2 lines slot %0d", t));
      check(tg03 == (puls03[t] ? (R'(1) << walk03[t]) : '0), $sformatf("TG_0/3 lines slot %0d", t));
      @(negedge clk);
      vctrl[VR_TG12].en = 1'b0;
      vctrl[VR_TG03].en = 1'b0;
    end

    // ---- part 2: select and reset pairs combined per row ----
    for (int it = 0; it < 6; it++) begin
      automatic int a = $urandom % 60, b = $urandom % 60;
      foreach (vctrl[r]) if (r < VR_TG12) clear(r);
      place(VR_SEL1, a);
      place(VR_SEL2, b);
      place(VR_RST1, b);
      place(VR_RST2, a);
      for (int e = 0; e < 4; e++) begin
        automatic logic [R-1:0] es = '0, er = '0;
        vctrl[VR_SEL1].en = e[0]; vctrl[VR_SEL2].en = e[1];
        vctrl[VR_RST1].en = e[1]; vctrl[VR_RST2].en = e[0];
        if (e[0]) begin es[a] = 1'b1; er[a] = 1'b1; end
        if (e[1]) begin es[b] = 1'b1; er[b] = 1'b1; end
        if (e == 3) nboth++;
        #1;
        check(sel == es, $sformatf("SEL rows a=%0d b=%0d en=%0d", a, b, e));
        check(rst == er, $sformatf("RST rows a=%0d b=%0d en=%0d", a, b, e));
        @(negedge clk);
      end
      foreach (vctrl[r]) vctrl[r].en = 1'b0;
    end
    check(nfw > 0 && nbw > 0 && nboth > 0, "forward, backward and combined select seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
