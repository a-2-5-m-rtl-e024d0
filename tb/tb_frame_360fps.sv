// tb_frame_360fps: one full frame through the output data path, at the
// full size and with no parameter changed.
//
// A 360 fps frame has 1124 shared rows and, with digital double sampling,
// 8 samples per shared row and column ADC (4 reset levels and 4 signals),
// each 618 ns long. This test reads all 1124 x 8 = 8992 samples of both
// sides back to back through the 16 multiplexers and 32 lanes (16-bit
// words, serialization factor 8, no daisy chain). ADC words are generated
// from the sample number and column (a fixed hash). A receiver
// deserializes every lane and compares every word, 2 x 1056 x 8992 in
// all. It also checks that each sample is read in at most 1112 bit clocks,
// which is 618 ns at 1.8 Gb/s per lane, and reports the frame time in bit
// clocks.
module tb_frame_360fps;
  import imager_pkg::*;
  localparam int R = ROWS, NMUX = MUX_PER_SIDE, NCOL = NMUX * COLS_PER_MUX;
  localparam int NLANE = NMUX * LANES_PER_MUX;
  localparam int SAMPLES = ROWS * 8;
  localparam int F = 8;
  localparam int SAMPLE_CLOCKS = 1112;   // 618 ns x 1.8 Gb/s

  logic clk = 1'b0, rst_n = 1'b0;
  vreg_ctrl_t vctrl [NUM_VREG];
  logic [R-1:0] row_sel, row_rst, row_tg12, row_tg03;
  logic [1:0][NCOL-1:0][PIX_W-1:0] adc;
  logic row_start = 1'b0;
  logic [1:0] chain_log2 = 2'd0;
  logic [4:0] ser_factor = 5'(F);
  logic [1:0][NLANE-1:0] lvds_sdo;
  logic [1:0] lvds_frame, lvds_valid, mux_busy, row_done;

  imager_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint clocks = 0;

  function automatic logic [PIX_W-1:0] pixel(input int q, input int side, input int col);
    logic [31:0] h;
    h = 32'(q) * 32'd2654435761 ^ (32'(col) * 32'd40503 + 32'(side) * 32'd977);
    h = h ^ (h >> 13);
    return h[PIX_W-1:0];
  endfunction

  function automatic int column(input int k, input int i);
    int p = i / (2 * SMUX_N), s = (i % (2 * SMUX_N)) / 2, g = i % 2;
    return k * COLS_PER_MUX + g * AMUX_N * SMUX_N + s * AMUX_N + p;
  endfunction

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) clocks <= clocks + 1;

  // receiver: one word counter per side, all 8 multiplexers in step
  int nword[2] = '{0, 0};
  int bitidx[2] = '{-1, -1};
  logic wvalid[2];
  logic [F-1:0] sh0[2][NMUX], sh1[2][NMUX];
  int bad = 0;

  always @(negedge clk) if (rst_n) begin
    for (int sd = 0; sd < 2; sd++) begin
      if (lvds_frame[sd]) begin
        bitidx[sd] = 0;
        wvalid[sd] = lvds_valid[sd];
      end
      if (bitidx[sd] >= 0 && bitidx[sd] < F) begin
        for (int k = 0; k < NMUX; k++) begin
          sh0[sd][k][bitidx[sd]] = lvds_sdo[sd][2*k];
          sh1[sd][k][bitidx[sd]] = lvds_sdo[sd][2*k+1];
        end
        if (bitidx[sd] == F - 1 && wvalid[sd]) begin
          automatic int q = nword[sd] / COLS_PER_MUX, i = nword[sd] % COLS_PER_MUX;
          for (int k = 0; k < NMUX; k++) begin
            automatic logic [PIX_W-1:0] w = {sh1[sd][k], sh0[sd][k]};
            automatic logic [PIX_W-1:0] e = pixel(q, sd, column(k, i));
            checks++;
            if (w !== e) begin
              failures++;
              if (bad++ < 10) $display("FAIL sample %0d side %0d mux %0d word %0d: %h expected %h", q, sd, k, i, w, e);
            end
          end
          nword[sd]++;
        end
        bitidx[sd]++;
      end
    end
  end

  initial begin
    longint t0, tprev, worst = 0;
    foreach (vctrl[r]) vctrl[r] = '{tok: 1'b0, shift: 1'b0, fw_bwn: 1'b1, en: 1'b0};
    adc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t0 = clocks;
    tprev = clocks;
    for (int q = 0; q < SAMPLES; q++) begin
      for (int sd = 0; sd < 2; sd++)
        for (int c = 0; c < NCOL; c++) adc[sd][c] = pixel(q, sd, c);
      row_start = 1'b1;
      @(negedge clk);
      row_start = 1'b0;
      do @(posedge clk); while (!row_done[0]);
      @(negedge clk);
      if (clocks - tprev > worst) worst = clocks - tprev;
      tprev = clocks;
    end
    repeat (3 * F) @(negedge clk);
    checks++;
    if (nword[0] != SAMPLES * COLS_PER_MUX || nword[1] != SAMPLES * COLS_PER_MUX) begin
      failures++;
      $display("FAIL words received %0d / %0d, expected %0d", nword[0], nword[1], SAMPLES * COLS_PER_MUX);
    end
    checks++;
    if (worst > SAMPLE_CLOCKS) begin
      failures++;
      $display("FAIL a sample took %0d bit clocks, more than %0d", worst, SAMPLE_CLOCKS);
    end
    $display("frame: %0d samples in %0d bit clocks (%0d per sample at most); %0d words per side",
             SAMPLES, tprev - t0, worst, nword[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
