// tb_lvds_serializer: both lanes, serialization factors 8 (16-bit words)
// and 6 (12-bit words) and a few others. A word clock every f clocks loads
// a random word; the test collects f bits from each lane, least significant
// first, and checks them against bits [f-1:0] (lane 0) and [2f-1:f]
// (lane 1), together with the frame and valid outputs.
module tb_lvds_serializer;
  import imager_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(SER_MAX):0] ser_factor;
  logic load = 1'b0, valid_in = 1'b0;
  logic [2*SER_MAX-1:0] word;
  logic [1:0] sdo, frame, valid;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < 2; l++) begin : g_l
    lvds_serializer dut (
      .clk(clk), .rst_n(rst_n), .ser_factor(ser_factor), .lane(1'(l)),
      .load(load), .word(word), .valid_in(valid_in),
      .sdo(sdo[l]), .frame(frame[l]), .valid(valid[l]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int factors[5] = '{8, 6, 16, 1, 5};
    ser_factor = 8;
    word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (factors[fi]) begin
      automatic int f = factors[fi];
      ser_factor = 5'(f);
      for (int w = 0; w < 40; w++) begin
        logic [2*SER_MAX-1:0] wd;
        logic vin;
        logic [SER_MAX-1:0] got0, got1;
        wd  = {16'h0, 16'($urandom)};
        vin = 1'($urandom);
        @(negedge clk);
        word = wd; valid_in = vin; load = 1'b1;
        @(negedge clk);
        load = 1'b0;
        word = '0;
        got0 = '0; got1 = '0;
        for (int b = 0; b < f; b++) begin
          if (b > 0) @(negedge clk);
          checks++;
          if (frame !== ((b == 0) ? 2'b11 : 2'b00) || valid !== {2{vin}}) begin
            failures++;
            $display("FAIL frame/valid f=%0d b=%0d", f, b);
          end
          got0[b] = sdo[0];
          got1[b] = sdo[1];
          if (b == f - 1) load = 1'b0;
        end
        checks++;
        if (got0 !== SER_MAX'(wd & ((32'd1 << f) - 1)) ||
            got1 !== SER_MAX'((wd >> f) & ((32'd1 << f) - 1))) begin
          failures++;
          $display("FAIL f=%0d word=%h lane0=%h lane1=%h", f, wd, got0, got1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
