// tb_register_stage: the six words are captured only on a clock with both
// the word clock enable and mux_reg_en set, and held otherwise.
module tb_register_stage;
  localparam int N = 6, W = 16;
  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, en = 1'b0;
  logic [N-1:0][W-1:0] din, q, model;
  int checks = 0, failures = 0;

  register_stage #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) din[i] = W'($urandom);
      adv = 1'($urandom);
      en  = 1'($urandom);
      if (adv && en) model = din;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d adv=%b en=%b", t, adv, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
