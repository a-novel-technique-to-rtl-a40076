// tb_lut3: exhaustive self-check of the 3-input LUT.
// Every one of the 256 control words is applied with every one of the 8
// input combinations; the expected output is computed by shifting the word
// right by the input index. Also checks the two worked examples of the
// MPSLM description (01001001 -> ABC'+A'BC+A'B'C', 00101000 -> AB'C+A'BC)
// from their sum-of-products form.
module tb_lut3;
  logic       clk = 1'b0;
  logic [7:0] cw;
  logic [2:0] x;
  logic       y;
  int         checks = 0, failures = 0;

  lut3 dut (.cw(cw), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic sop1(logic [2:0] v);  // ABC' + A'BC + A'B'C'
    logic A = v[2], B = v[1], C = v[0];
    return (A & B & ~C) | (~A & B & C) | (~A & ~B & ~C);
  endfunction

  function automatic logic sop2(logic [2:0] v);  // AB'C + A'BC
    logic A = v[2], B = v[1], C = v[0];
    return (A & ~B & C) | (~A & B & C);
  endfunction

  initial begin
    for (int w = 0; w < 256; w++) begin
      for (int i = 0; i < 8; i++) begin
        cw = 8'(w); x = 3'(i);
        @(posedge clk);
        checks++;
        if (y !== 1'((w >> i) & 1)) begin
          failures++;
          $display("FAIL cw=%02h x=%0d y=%0b", cw, x, y);
        end
      end
    end
    for (int i = 0; i < 8; i++) begin
      x = 3'(i);
      cw = 8'b0100_1001; @(posedge clk); checks++;
      if (y !== sop1(x)) begin failures++; $display("FAIL example 1 x=%0d", i); end
      cw = 8'b0010_1000; @(posedge clk); checks++;
      if (y !== sop2(x)) begin failures++; $display("FAIL example 2 x=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
