// tb_vshift_reg: random forward/backward shifts with random tokens on the
// full 1124-row register, compared each clock with a model that keeps a
// list of token row numbers. Checks token entry at row 0, forward and
// backward moves and tokens leaving at either end.
module tb_vshift_reg;
  localparam int N = 1124;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, fw_bwn = 1'b1, tok = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0, nfw = 0, nbw = 0, nout = 0;
  int pos[$];

  vshift_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N-1:0] exp;
    exp = '0;
    foreach (pos[i]) exp[pos[i]] = 1'b1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL tokens=%0d ones=%0d", pos.size(), $countones(q));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      automatic int nq[$];
      @(negedge clk);
      shift  = ($urandom % 4) != 0;
      // mostly forward so tokens reach the far end as well
      fw_bwn = (t < 3000) ? (($urandom % 8) != 0) : (($urandom % 3) == 0);
      tok    = ($urandom % 200) == 0;
      if (shift) begin
        foreach (pos[i]) begin
          automatic int p = fw_bwn ? pos[i] + 1 : pos[i] - 1;
          if (p >= 0 && p < N) nq.push_back(p); else nout++;
        end
        if (fw_bwn && tok) nq.push_back(0);
        if (fw_bwn) nfw++; else nbw++;
        pos = nq;
      end
      @(posedge clk);
      #1;
      check();
    end
    checks++;
    if (nfw == 0 || nbw == 0 || nout == 0) begin
      failures++;
      $display("FAIL coverage fw=%0d bw=%0d out=%0d", nfw, nbw, nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
