// tb_cw_reg: self-check of the control word register.
// Checks the all-zero value after reset, a write visible one clock edge
// later, holding while we = 0, and an asynchronous reset in mid-run,
// against a reference model kept in the testbench.
module tb_cw_reg;
  logic       clk = 1'b0;
  logic       rst_n, we;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  cw_reg #(.W(8)) dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s q=%02h exp=%02h", what, q, model);
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; d = 8'hA5; model = 8'h00;
    #12;
    check("reset");
    @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); d = 8'($urandom);
      if (n == 500) begin
        #1 rst_n = 1'b0; model = 8'h00;
        #1 check("async reset");
        #1 rst_n = 1'b1;
      end
      @(posedge clk);
      if (we) model = d;
      #1 check("write/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
