// tb_output_block: self-check of the output enable stage.
// Random function values and OCwR contents; an output must equal its input
// where its OCwR bit is 0 and be 0 where the bit is 1. Also checks that the
// reset value of OCwR (all '0') enables every output.
module tb_output_block;
  logic       clk = 1'b0;
  logic [6:0] f_in, f_out, exp_v;
  logic [7:0] oe_cfg;
  int         checks = 0, failures = 0;

  output_block #(.N_F(7), .W(8)) dut (.f_in(f_in), .oe_cfg(oe_cfg), .f_out(f_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      f_in = 7'($urandom);
      oe_cfg = (n < 128) ? 8'h00 : 8'($urandom);
      for (int i = 0; i < 7; i++) exp_v[i] = oe_cfg[i] ? 1'b0 : f_in[i];
      @(posedge clk);
      checks++;
      if (f_out !== exp_v) begin
        failures++;
        $display("FAIL f_in=%b oe=%b f_out=%b exp=%b", f_in, oe_cfg, f_out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
