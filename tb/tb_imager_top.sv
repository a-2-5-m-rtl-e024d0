// tb_imager_top: end-to-end test of the imager's digital core at its full
// size (1124 rows, 2 x 1056 columns, 32 LVDS lanes), no parameter changed.
//
// 1. Row addressing: the transfer-token walk of the row-timing diagram
//    (forward and backward shifts, pulses in three slots) and a row where
//    select1 and select2 address two rows at once.
// 2. Row readout through multiplexers and serializers, in three modes:
//    16-bit words, factor 8, no daisy chain (all 32 lanes); 12-bit words,
//    factor 6, chains of 2 (16 lanes); 16-bit words, factor 8, chain of 8
//    (4 lanes). The test deserializes every active lane (f bits LSB first
//    per lane, lane 1 holding the upper bits), and compares each word with
//    the ADC column the readout order predicts, counts the words (132*L per
//    active lane pair) and checks the row time: (1 + 132*L) word clocks of
//    f bit clocks.
// Each mechanism (forward shift, backward shift, transfer pulse, combined
// select, register-stage latch, load, chain shift, daisy transfer, each
// serialization factor) is counted and must occur.
module tb_imager_top;
  import imager_pkg::*;
  localparam int R = ROWS, NMUX = MUX_PER_SIDE, NCOL = NMUX * COLS_PER_MUX;
  localparam int NLANE = NMUX * LANES_PER_MUX;

  logic clk = 1'b0, rst_n = 1'b0;
  vreg_ctrl_t vctrl [NUM_VREG];
  logic [R-1:0] row_sel, row_rst, row_tg12, row_tg03;
  logic [1:0][NCOL-1:0][PIX_W-1:0] adc;
  logic row_start = 1'b0;
  logic [1:0] chain_log2 = 2'd0;
  logic [4:0] ser_factor = 5'd8;
  logic [1:0][NLANE-1:0] lvds_sdo;
  logic [1:0] lvds_frame, lvds_valid, mux_busy, row_done;

  imager_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fw = 0, n_bw = 0, n_tgpulse = 0, n_dualsel = 0;
  int n_latch = 0, n_load = 0, n_shift = 0, n_daisy = 0, n_f8 = 0, n_f6 = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // mechanism counters taken from the multiplexer controls of side 0
  always @(posedge clk) if (rst_n && dut.g_side[0].u_side.ctrl.adv) begin
    if (dut.g_side[0].u_side.ctrl.mux_reg_en) n_latch++;
    if (dut.g_side[0].u_side.busy) begin
      if (dut.g_side[0].u_side.ctrl.load) n_load++; else n_shift++;
    end
  end

  // ---------------- row driver ----------------
  task automatic vshift(input int r, input logic fw, input logic tok);
    @(negedge clk);
    vctrl[r].shift = 1'b1; vctrl[r].fw_bwn = fw; vctrl[r].tok = tok;
    @(negedge clk);
    vctrl[r].shift = 1'b0; vctrl[r].tok = 1'b0;
    if (fw) n_fw++; else n_bw++;
  endtask

  task automatic place(input int r, input int row);
    vshift(r, 1'b1, 1'b1);
    repeat (row) vshift(r, 1'b1, 1'b0);
  endtask

  localparam int NN = 100;
  int walk12[12] = '{NN+3, NN+2, NN+1, NN+2, NN+3, NN+4, NN+5, NN+6, NN+5, NN+4, NN+3, NN+4};
  bit puls12[12] = '{0, 0, 1, 0, 0, 0, 0, 1, 0, 0, 1, 0};

  task automatic row_addressing();
    place(VR_TG12, walk12[0]);
    for (int t = 0; t < 12; t++) begin
      if (t > 0) vshift(VR_TG12, walk12[t] > walk12[t-1], 1'b0);
      vctrl[VR_TG12].en = puls12[t];
      #1;
      check(row_tg12 == (puls12[t] ? (R'(1) << walk12[t]) : '0),
            $sformatf("TG_1/2 lines in slot %0d", t));
      if (puls12[t]) n_tgpulse++;
      @(negedge clk);
      vctrl[VR_TG12].en = 1'b0;
    end
    // select1 on row 5, select2 on row 9: both rows selected at once
    place(VR_SEL1, 5);
    place(VR_SEL2, 9);
    vctrl[VR_SEL1].en = 1'b1;
    vctrl[VR_SEL2].en = 1'b1;
    #1;
    check(row_sel == ((R'(1) << 5) | (R'(1) << 9)), "two rows selected");
    if (row_sel[5] && row_sel[9]) n_dualsel++;
    @(negedge clk);
    vctrl[VR_SEL1].en = 1'b0;
    vctrl[VR_SEL2].en = 1'b0;
    #1;
    check(row_sel == '0 && row_rst == '0 && row_tg03 == '0, "lines idle");
  endtask

  // ---------------- readout ----------------
  task automatic readout(input int f, input int cl, input int bits);
    automatic int L = 1 << cl;
    automatic int exp_col[NMUX][$];
    automatic int nword[2][NMUX];
    automatic logic [SER_MAX-1:0] sh0[2][NMUX], sh1[2][NMUX];
    automatic int bitidx[2] = '{-1, -1};
    automatic logic wvalid[2];
    automatic int clocks = 0, limit;
    automatic bit seen_done = 0;
    ser_factor = 5'(f);
    chain_log2 = 2'(cl);
    for (int sd = 0; sd < 2; sd++)
      for (int c = 0; c < NCOL; c++) adc[sd][c] = PIX_W'($urandom & ((1 << bits) - 1));
    for (int k = L - 1; k < NMUX; k += L)
      for (int p = 0; p < AMUX_N; p++)
        for (int s = 0; s < SMUX_N; s++)
          for (int j = k; j > k - L; j--)
            for (int g = 0; g < GROUPS; g++)
              exp_col[k].push_back(j*COLS_PER_MUX + g*AMUX_N*SMUX_N + s*AMUX_N + p);
    foreach (nword[sd, k]) nword[sd][k] = 0;
    repeat (3 * f) @(negedge clk);
    row_start = 1'b1;
    @(negedge clk);
    row_start = 1'b0;
    limit = (1 + COLS_PER_MUX * L) * f + 4 * f;
    // bit-level receiver, sampled at falling edges
    while (clocks < limit) begin
      clocks++;
      for (int sd = 0; sd < 2; sd++) begin
        if (lvds_frame[sd]) begin
          bitidx[sd] = 0;
          wvalid[sd] = lvds_valid[sd];
        end
        if (bitidx[sd] >= 0 && bitidx[sd] < f) begin
          for (int k = L - 1; k < NMUX; k += L) begin
            sh0[sd][k][bitidx[sd]] = lvds_sdo[sd][2*k];
            sh1[sd][k][bitidx[sd]] = lvds_sdo[sd][2*k+1];
          end
          if (bitidx[sd] == f - 1 && wvalid[sd]) begin
            for (int k = L - 1; k < NMUX; k += L) begin
              automatic logic [31:0] w = 32'(sh0[sd][k] & ((1 << f) - 1)) |
                                         (32'(sh1[sd][k] & ((1 << f) - 1)) << f);
              automatic int i = nword[sd][k];
              checks++;
              if (i >= exp_col[k].size()) begin
                failures++;
                $display("FAIL side %0d lanes of mux %0d: extra word", sd, k);
              end else begin
                if (w[PIX_W-1:0] !== adc[sd][exp_col[k][i]]) begin
                  failures++;
                  $display("FAIL f=%0d L=%0d side %0d mux %0d word %0d: %h expected %h (col %0d)",
                           f, L, sd, k, i, w, adc[sd][exp_col[k][i]], exp_col[k][i]);
                end
                if (exp_col[k][i] / COLS_PER_MUX != k) n_daisy++;
              end
              nword[sd][k]++;
            end
            if (f == 8) n_f8++;
            if (f == 6) n_f6++;
          end
          bitidx[sd]++;
        end
      end
      if (row_done[0]) begin
        seen_done = 1;
        // row time: the readout is done (1 + 132*L) word clocks after start,
        // to within one word clock of phase
        check(clocks >= COLS_PER_MUX * L * f && clocks <= (2 + COLS_PER_MUX * L) * f,
              $sformatf("row time %0d clocks for f=%0d L=%0d", clocks, f, L));
      end
      @(negedge clk);
    end
    for (int sd = 0; sd < 2; sd++)
      for (int k = L - 1; k < NMUX; k += L)
        check(nword[sd][k] == COLS_PER_MUX * L,
              $sformatf("side %0d mux %0d sent %0d words, f=%0d L=%0d", sd, k, nword[sd][k], f, L));
    check(seen_done, "row_done seen");
    check(mux_busy == 2'b00, "multiplexers idle after the row");
  endtask

  initial begin
    foreach (vctrl[r]) vctrl[r] = '{tok: 1'b0, shift: 1'b0, fw_bwn: 1'b1, en: 1'b0};
    adc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    row_addressing();
    readout(8, 0, 16);   // 16-bit, all 32 lanes
    readout(6, 1, 12);   // 12-bit, daisy chains of two
    readout(8, 3, 16);   // 16-bit, one chain of eight per side
    check(n_fw > 0,      "forward shifts");
    check(n_bw > 0,      "backward shifts");
    check(n_tgpulse > 0, "transfer pulses");
    check(n_dualsel > 0, "two rows selected");
    check(n_latch > 0,   "register-stage latches");
    check(n_load > 0,    "output register loads");
    check(n_shift > 0,   "output register shifts");
    check(n_daisy > 0,   "words through the daisy chain");
    check(n_f8 > 0 && n_f6 > 0, "serialization factors 8 and 6");
    $display("mechanisms: fw=%0d bw=%0d tgpulse=%0d dualsel=%0d latch=%0d load=%0d shift=%0d daisy=%0d f8=%0d f6=%0d",
             n_fw, n_bw, n_tgpulse, n_dualsel, n_latch, n_load, n_shift, n_daisy, n_f8, n_f6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
