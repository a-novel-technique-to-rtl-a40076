// tb_bit_flip_logic: self-check of the Bit Flipping Logic.
// Random register words and SIN values; the expected output is built bit by
// bit (invert where the SIN bit is 1). Also checks that a cleared register
// yields the SIN and that storing T ^ SIN returns T.
module tb_bit_flip_logic;
  logic       clk = 1'b0;
  logic [7:0] cw_in, flip, cw_out, exp_v, t;
  int         checks = 0, failures = 0;

  bit_flip_logic #(.W(8)) dut (.cw_in(cw_in), .flip(flip), .cw_out(cw_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] e, string what);
    checks++;
    if (cw_out !== e) begin
      failures++;
      $display("FAIL %s cw_in=%02h flip=%02h out=%02h exp=%02h", what, cw_in, flip, cw_out, e);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      cw_in = 8'($urandom); flip = 8'($urandom);
      for (int i = 0; i < 8; i++) exp_v[i] = flip[i] ? ~cw_in[i] : cw_in[i];
      @(posedge clk);
      check(exp_v, "random");
    end
    for (int s = 0; s < 256; s++) begin
      flip = 8'(s); cw_in = 8'h00;
      @(posedge clk);
      check(flip, "default");
      t = 8'($urandom);
      for (int i = 0; i < 8; i++) cw_in[i] = (t[i] != flip[i]);
      @(posedge clk);
      check(t, "roundtrip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
