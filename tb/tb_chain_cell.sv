// tb_chain_cell: on a word clock the cell loads load_d when load is set and
// takes shift_d otherwise; without a word clock it holds.
module tb_chain_cell;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0, load = 1'b0;
  logic [W-1:0] load_d, shift_d, q, model;
  int checks = 0, failures = 0, nload = 0, nshift = 0;

  chain_cell #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_d = '0; shift_d = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      load_d  = W'($urandom);
      shift_d = W'($urandom);
      adv  = 1'($urandom);
      load = 1'($urandom);
      if (adv) begin
        model = load ? load_d : shift_d;
        if (load) nload++; else nshift++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d adv=%b load=%b q=%h exp=%h", t, adv, load, q, model);
      end
    end
    checks++;
    if (nload == 0 || nshift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
