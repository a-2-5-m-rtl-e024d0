// tb_mux_sequencer: one row for each daisy-chain length 1, 2, 4 and 8,
// with a word clock every third clock. Checks per row: 1 + 132*L word
// clocks from the first word clock to row_done, 132*L words marked valid,
// 66 loads, 11 register-stage latches 12*L word clocks apart (the register
// stage runs at the word rate divided by 12*L), one-hot (or no) tristate
// enable, a load exactly every 2*L word clocks with load_sel counting
// 0..5, and the tristate enable selecting input p+1 while the register
// stage holds p.
module tb_mux_sequencer;
  import imager_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, word_stb, start = 1'b0;
  logic [1:0] chain_log2 = 2'd0;
  mux_ctrl_t ctrl;
  logic busy, out_valid, row_done;
  int checks = 0, failures = 0;

  mux_sequencer dut (.*);

  always #5 clk = ~clk;

  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
  end
  assign word_stb = (div == 2);

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cl = 0; cl < 4; cl++) begin
      automatic int L = 1 << cl;
      automatic int ticks = 0, nvalid = 0, nload = 0, nlatch = 0, since_load = 0;
      automatic int expect_sel = 0, held = -1, last_latch = -1;
      automatic bit done = 0;
      chain_log2 = 2'(cl);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      // sample at falling edges: the values seen by the next rising edge
      while (!done) begin
        if (word_stb) begin
          ticks++;
          if (out_valid) nvalid++;
          check($onehot0(ctrl.mux_en), "mux_en one-hot");
          if (ctrl.mux_reg_en) begin
            // the register stage runs at the word rate divided by 12*L
            if (last_latch >= 0) check(ticks - last_latch == 12 * L, "latch period 12L");
            last_latch = ticks;
            held++;
            nlatch++;
            check(ctrl.mux_en == (AMUX_N'(1) << held), "latched input enabled");
          end else if (held >= 0 && held < AMUX_N - 1) begin
            check(ctrl.mux_en == (AMUX_N'(1) << (held + 1)), "next input settling");
          end
          if (ctrl.load) begin
            if (nload > 0) check(since_load == 2 * L, "load period 2L");
            check(int'(ctrl.load_sel) == expect_sel, "load_sel order");
            expect_sel = (expect_sel + 1) % SMUX_N;
            nload++;
            since_load = 0;
          end
          since_load++;
          if (row_done) done = 1;
        end
        @(negedge clk);
      end
      // count words valid after the last word clock
      while (!word_stb) @(negedge clk);
      if (out_valid) nvalid++;
      check(ticks == 1 + COLS_PER_MUX * L, $sformatf("row length %0d for L=%0d", ticks, L));
      check(nvalid == COLS_PER_MUX * L, $sformatf("valid words %0d", nvalid));
      check(nload == AMUX_N * SMUX_N, $sformatf("loads %0d", nload));
      check(nlatch == AMUX_N, $sformatf("latches %0d", nlatch));
      check(!busy, $sformatf("idle after row pos=%0d s=%0d w=%0d act=%b", dut.pos, dut.sidx, dut.widx, dut.active));
      repeat (10) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
