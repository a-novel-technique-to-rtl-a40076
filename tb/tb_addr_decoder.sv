// tb_addr_decoder: exhaustive self-check of the register address decoder.
// For every address with en = 0 and en = 1 the strobes must be all zero
// (en = 0 or address 7) or exactly the strobe of the address.
module tb_addr_decoder;
  logic       clk = 1'b0;
  logic       en;
  logic [2:0] addr;
  logic [6:0] sel;
  int         checks = 0, failures = 0;

  addr_decoder #(.AW(3), .N_OUT(7)) dut (.en(en), .addr(addr), .sel(sel));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int ad = 0; ad < 8; ad++) begin
        logic [6:0] exp_v;
        en = 1'(e); addr = 3'(ad);
        exp_v = '0;
        if (e == 1 && ad < 7) exp_v[ad] = 1'b1;
        @(posedge clk);
        checks++;
        if (sel !== exp_v) begin
          failures++;
          $display("FAIL en=%0b addr=%0d sel=%b exp=%b", en, addr, sel, exp_v);
        end
        checks++;
        if ($countones(sel) > 1) begin
          failures++;
          $display("FAIL more than one strobe");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
