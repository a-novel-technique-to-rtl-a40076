// tb_mux2: exhaustive self-check of the 2-channel multiplexer.
module tb_mux2;
  logic clk = 1'b0;
  logic in0, in1, sel, y;
  int   checks = 0, failures = 0;

  mux2 dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      @(posedge clk);
      checks++;
      if (y !== ((sel & in1) | (~sel & in0))) begin
        failures++;
        $display("FAIL sel=%0b in1=%0b in0=%0b y=%0b", sel, in1, in0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
