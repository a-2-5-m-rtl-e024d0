// tb_output_mux_side: one side (eight 132:1 multiplexers, 1056 columns)
// reads random ADC rows at daisy-chain lengths 1, 2, 4 and 8, with a word
// clock every other clock. On every word clock whose word is valid the
// test takes the word of each active output (multiplexer k with
// k mod L = L-1) and compares it with the expected column order: for each
// tristate input p, each 6:1 select s, multiplexers k down to k-L+1, group
// 0 then 1, column j*132 + g*66 + s*11 + p. Also checks the number of
// words per output (132*L) and the row length (1 + 132*L word clocks).
module tb_output_mux_side;
  import imager_pkg::*;
  localparam int W = 16, NMUX = MUX_PER_SIDE, NCOL = NMUX * COLS_PER_MUX;
  logic clk = 1'b0, rst_n = 1'b0, word_stb, start = 1'b0;
  logic [1:0] chain_log2 = 2'd0;
  logic [NCOL-1:0][W-1:0] adc;
  logic [W-1:0] side_i = '0;
  logic [NMUX-1:0][W-1:0] mux_o;
  logic out_valid, busy, row_done;
  int checks = 0, failures = 0;

  output_mux_side #(.W(W), .NMUX(NMUX)) dut (.*);

  always #5 clk = ~clk;
  logic ph = 1'b0;
  always @(posedge clk) ph <= ~ph;
  assign word_stb = ph;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cl = 0; cl < 4; cl++) begin
      automatic int L = 1 << cl;
      automatic int idx[NMUX];
      automatic int ticks = 0;
      automatic bit done = 0;
      automatic int exp_col[NMUX][$];
      for (int c = 0; c < NCOL; c++) adc[c] = W'($urandom);
      // expected column sequence of each active output
      for (int k = L - 1; k < NMUX; k += L)
        for (int p = 0; p < AMUX_N; p++)
          for (int s = 0; s < SMUX_N; s++)
            for (int j = k; j > k - L; j--)
              for (int g = 0; g < GROUPS; g++)
                exp_col[k].push_back(j*COLS_PER_MUX + g*AMUX_N*SMUX_N + s*AMUX_N + p);
      foreach (idx[k]) idx[k] = 0;
      chain_log2 = 2'(cl);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // sample at falling edges: the values seen by the next rising edge
      while (!done) begin
        if (word_stb) begin
          ticks++;
          if (out_valid) begin
            for (int k = L - 1; k < NMUX; k += L) begin
              checks++;
              if (idx[k] >= exp_col[k].size()) begin
                failures++;
                $display("FAIL L=%0d out %0d: extra word", L, k);
              end else if (mux_o[k] !== adc[exp_col[k][idx[k]]]) begin
                failures++;
                $display("FAIL L=%0d out %0d word %0d: %h expected col %0d = %h",
                         L, k, idx[k], mux_o[k], exp_col[k][idx[k]], adc[exp_col[k][idx[k]]]);
              end
              idx[k]++;
            end
          end
          if (row_done) done = 1;
        end
        @(negedge clk);
      end
      // the last word is at the outputs after the row_done word clock
      while (!word_stb) @(negedge clk);
      if (out_valid)
        for (int k = L - 1; k < NMUX; k += L) begin
          checks++;
          if (mux_o[k] !== adc[exp_col[k][idx[k]]]) failures++;
          idx[k]++;
        end
      for (int k = L - 1; k < NMUX; k += L) begin
        checks++;
        if (idx[k] != COLS_PER_MUX * L) begin
          failures++;
          $display("FAIL L=%0d out %0d: %0d words", L, k, idx[k]);
        end
      end
      checks++;
      if (ticks != 1 + COLS_PER_MUX * L) begin
        failures++;
        $display("FAIL L=%0d: row took %0d word clocks", L, ticks);
      end
      repeat (4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
