// tb_tristate_mux: self-checking test of the 11:1 tristate multiplexer.
// Random ADC words; every one-hot enable must pass exactly that word, and
// no enable must give 0.
module tb_tristate_mux;
  localparam int N = 11, W = 16;
  logic [N-1:0]        en;
  logic [N-1:0][W-1:0] din;
  logic [W-1:0]        dout;
  int checks = 0, failures = 0;

  tristate_mux #(.N(N), .W(W)) dut (.en(en), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < N; i++) din[i] = W'($urandom);
      for (int i = 0; i <= N; i++) begin
        en = (i == N) ? '0 : (N'(1) << i);
        #1;
        checks++;
        if (dout !== ((i == N) ? W'(0) : din[i])) begin
          failures++;
          $display("FAIL en=%b dout=%h", en, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
