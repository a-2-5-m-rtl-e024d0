// tb_row_timing: replays three row times of the dual-row readout pattern
// on the full row driver and checks it against a small model of the shared
// pixels (pixel_fd_model).
//
// A row time has 8 slots. The pattern addresses two pairs of shared rows
// at once: select1/reset1 work on rows n+1..n+4 and select2/reset2 on rows
// n+4..n+7, with n = 20. Both transfer registers follow a walk of one row
// per two slots, forward and backward, and pulse a row three times in
// the 24 slots. The slot, row and sample label of every pulse are listed
// below (R = reset level, A..D = photodiode of the 2x2 shared pixel).
// Before each pulse, the test moves the register's token to the pulse row,
// one forward or backward shift per row. In every slot it checks that the
// SEL, RST and TG lines of all 1124 rows carry exactly the pulsed rows.
// For every select pulse it checks that the floating diffusion holds the
// label's content: freshly reset for R, or exactly one photodiode's charge
// transferred after the last reset.
module tb_row_timing;
  import imager_pkg::*;
  localparam int R = ROWS, NN = 20, SLOTS = 26;

  logic clk = 1'b0, rst_n = 1'b0;
  vreg_ctrl_t vctrl [NUM_VREG];
  logic [R-1:0] sel, rst, tg12, tg03;
  logic [R-1:0] tokens [NUM_VREG];
  int checks = 0, failures = 0, nfw = 0, nbw = 0, nread = 0;

  row_driver #(.ROWS_N(R)) dut (.*);
  pixel_fd_model #(.ROWS_N(R)) pix ();

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

  // pulse: slot, register, row offset from n, sample label
  typedef struct { int slot; int reg_i; int row; byte lbl; } pulse_t;
  pulse_t pulses[$];

  task automatic add(input vreg_e reg_e, input int slot, input int row, input byte lbl);
    pulses.push_back('{slot, int'(reg_e), NN + row, lbl});
  endtask

  // transfer walks (row offset per 2-slot box) and pulsed boxes
  int walk12[13] = '{3, 2, 1, 2, 3, 4, 5, 6, 5, 4, 3, 4, 4};
  int walk03[13] = '{2, 3, 4, 5, 4, 3, 2, 3, 4, 5, 6, 7, 7};
  bit puls12[13] = '{0, 0, 1, 0, 0, 0, 0, 1, 0, 0, 1, 0, 0};
  bit puls03[13] = '{0, 0, 0, 1, 0, 0, 1, 0, 0, 0, 0, 1, 0};

  int pos[NUM_VREG];

  task automatic move_to(input int r, input int row);
    while (pos[r] != row) begin
      automatic logic fw = row > pos[r];
      @(negedge clk);
      vctrl[r].shift = 1'b1;
      vctrl[r].fw_bwn = fw;
      @(negedge clk);
      vctrl[r].shift = 1'b0;
      pos[r] += fw ? 1 : -1;
      if (fw) nfw++; else nbw++;
    end
  endtask

  task automatic place(input int r, input int row);
    @(negedge clk);
    vctrl[r].shift = 1'b1; vctrl[r].fw_bwn = 1'b1; vctrl[r].tok = 1'b1;
    @(negedge clk);
    vctrl[r].shift = 1'b0; vctrl[r].tok = 1'b0;
    pos[r] = 0;
    move_to(r, row);
  endtask

  initial begin
    // reset1 / select1
    add(VR_RST1, 0, 1, "F"); add(VR_RST1, 1, 2, "F"); add(VR_RST1, 8, 1, "F"); add(VR_RST1, 9, 2, "F");
    add(VR_RST1, 16, 3, "F"); add(VR_RST1, 17, 4, "F"); add(VR_RST1, 24, 3, "F"); add(VR_RST1, 25, 4, "F");
    add(VR_SEL1, 2, 1, "R"); add(VR_SEL1, 3, 2, "R"); add(VR_SEL1, 6, 1, "C"); add(VR_SEL1, 7, 2, "B");
    add(VR_SEL1, 10, 1, "R"); add(VR_SEL1, 11, 2, "R"); add(VR_SEL1, 14, 1, "D"); add(VR_SEL1, 15, 2, "A");
    add(VR_SEL1, 18, 3, "R"); add(VR_SEL1, 19, 4, "R"); add(VR_SEL1, 22, 3, "C"); add(VR_SEL1, 23, 4, "B");
    // reset2 / select2
    add(VR_RST2, 2, 4, "F"); add(VR_RST2, 3, 5, "F"); add(VR_RST2, 10, 6, "F"); add(VR_RST2, 11, 7, "F");
    add(VR_RST2, 18, 6, "F"); add(VR_RST2, 19, 7, "F");
    add(VR_SEL2, 0, 4, "C"); add(VR_SEL2, 1, 5, "B"); add(VR_SEL2, 4, 4, "R"); add(VR_SEL2, 5, 5, "R");
    add(VR_SEL2, 8, 4, "D"); add(VR_SEL2, 9, 5, "A"); add(VR_SEL2, 12, 6, "R"); add(VR_SEL2, 13, 7, "R");
    add(VR_SEL2, 16, 6, "C"); add(VR_SEL2, 17, 7, "B"); add(VR_SEL2, 20, 6, "R"); add(VR_SEL2, 21, 7, "R");
    add(VR_SEL2, 24, 6, "D"); add(VR_SEL2, 25, 7, "A");

    foreach (vctrl[r]) vctrl[r] = '{tok: 1'b0, shift: 1'b0, fw_bwn: 1'b1, en: 1'b0};
    pix.clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // initial token rows: first pulse row of each register
    for (int r = 0; r < NUM_VREG; r++) begin
      automatic int first = -1;
      if (r == VR_TG12) first = NN + walk12[0];
      else if (r == VR_TG03) first = NN + walk03[0];
      else foreach (pulses[i]) if (pulses[i].reg_i == r && first < 0) first = pulses[i].row;
      place(r, first);
    end

    for (int t = 0; t < SLOTS; t++) begin
      automatic logic [R-1:0] es = '0, er = '0, e12 = '0, e03 = '0;
      automatic int box = t / 2;
      // transfer tokens follow their walk box by box
      move_to(VR_TG12, NN + walk12[box]);
      move_to(VR_TG03, NN + walk03[box]);
      foreach (pulses[i]) if (pulses[i].slot == t) move_to(pulses[i].reg_i, pulses[i].row);
      @(negedge clk);
      foreach (pulses[i]) if (pulses[i].slot == t) begin
        vctrl[pulses[i].reg_i].en = 1'b1;
        if (pulses[i].reg_i inside {VR_SEL1, VR_SEL2}) es[pulses[i].row] = 1'b1;
        else er[pulses[i].row] = 1'b1;
      end
      vctrl[VR_TG12].en = puls12[box];
      vctrl[VR_TG03].en = puls03[box];
      if (puls12[box]) e12[NN + walk12[box]] = 1'b1;
      if (puls03[box]) e03[NN + walk03[box]] = 1'b1;
      #1;
      check(sel == es && rst == er && tg12 == e12 && tg03 == e03,
            $sformatf("row lines in slot %0d", t));
      // pixel model: sample what is selected, then reset and transfer
      foreach (pulses[i]) if (pulses[i].slot == t && pulses[i].reg_i inside {VR_SEL1, VR_SEL2}) begin
        automatic string got = pix.sample(pulses[i].row);
        automatic string exp = (pulses[i].lbl == "R") ? "R" :
                               $sformatf("%s%0d", string'(pulses[i].lbl), pulses[i].row - NN);
        nread++;
        check(got == exp ||
              (got == "?" && t < 2),
              $sformatf("slot %0d row n+%0d read %s, expected %s", t, pulses[i].row - NN, got, exp));
      end
      pix.apply(rst, tg12, tg03, (t % 2) == 0);
      @(negedge clk);
      foreach (vctrl[r]) vctrl[r].en = 1'b0;
    end
    check(nfw > 0 && nbw > 0 && nread == 26, $sformatf("coverage fw=%0d bw=%0d reads=%0d", nfw, nbw, nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
