// tb_stage_mux: self-checking test of the 6:1 multiplexer; selects 0..5
// pass the selected word, 6 and 7 give 0.
module tb_stage_mux;
  localparam int N = 6, W = 16;
  logic [2:0]          sel;
  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        dout;
  int checks = 0, failures = 0;

  stage_mux #(.N(N), .W(W)) dut (.sel(sel), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < N; i++) din[i] = W'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (dout !== ((s < N) ? din[s] : W'(0))) begin
          failures++;
          $display("FAIL sel=%0d dout=%h", s, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
