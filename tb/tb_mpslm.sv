// tb_mpslm: end-to-end self-check of the MPSLM at its default parameters.
//
// A reference model (register copies plus the LUT/mux equations written out
// here) predicts F1..F7 for all 32 input combinations after every step.
// Steps, each counted and required to happen at least once:
//   default    - after reset the cell implements the SIN function; F1 is also
//                compared with the sum of products ABC' + A'BC + A'B'C'
//                (variables C, D, E) that SIN 01001001 stands for.
//   program    - a 32-bit truth table T is loaded as T ^ {4{SIN}} in program
//                mode; while Pm = 1 the outputs must still show the SIN.
//   function   - in function mode F7 must equal T for all 32 inputs, F5/F6
//                the 4-variable halves and F1..F4 the bytes.
//   wrong_cw   - T loaded without the SIN gives a different function.
//   locked     - a write attempted in function mode changes nothing.
//   unmapped   - writes to addresses 4, 5, 7 change nothing.
//   disable    - OCwR bits force outputs to 0; the mask applies from the
//                clock edge that writes it (one-edge write latency).
//   reset      - a mid-run reset restores the SIN function.
module tb_mpslm;
  import mpslm_pkg::*;

  localparam logic [7:0] SIN_REF = 8'b0100_1001;

  logic       clk = 1'b0;
  logic       rst_n, pm, a, b;
  logic [2:0] addr, cde;
  logic [7:0] data;
  logic [6:0] f;

  logic [7:0] m_cwr [4];
  logic [7:0] m_ocwr;

  int checks = 0, failures = 0;
  int n_default = 0, n_program = 0, n_prog_sin = 0, n_function = 0;
  int n_wrong = 0, n_locked = 0, n_unmapped = 0, n_disable = 0, n_reset = 0;

  mpslm dut (
    .clk(clk), .rst_n(rst_n), .pm(pm), .addr(addr), .data(data),
    .a(a), .b(b), .cde(cde), .f(f)
  );

  always #100 clk = ~clk;  // slow enough for a 32-step sweep per phase

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs for inputs v = {A,B,C,D,E}.
  function automatic logic [6:0] model(logic [4:0] v);
    logic [7:0] eff [4];
    logic [3:0] l;
    logic       f5, f6, f7;
    for (int k = 0; k < 4; k++) begin
      eff[k] = pm ? SIN_REF : (m_cwr[k] ^ SIN_REF);
      l[k]   = eff[k][v[2:0]];
    end
    f5 = v[3] ? l[1] : l[0];
    f6 = v[3] ? l[3] : l[2];
    f7 = v[4] ? f6 : f5;
    return {f7, f6, f5, l} & ~m_ocwr[6:0];
  endfunction


  // Compare all 32 input combinations with the model; returns mismatches.
  task automatic sweep(string what);
    for (int v = 0; v < 32; v++) begin
      {a, b, cde} = 5'(v);
      #1;
      checks++;
      if (f !== model(5'(v))) begin
        failures++;
        $display("FAIL %s v=%05b f=%07b exp=%07b", what, v[4:0], f, model(5'(v)));
      end
    end
  endtask

  task automatic write(logic [2:0] ad, logic [7:0] dt);
    @(negedge clk);
    pm = 1'b1; addr = ad; data = dt;
    @(posedge clk);
    if (ad < 4) m_cwr[ad[1:0]] = dt;
    else if (ad == 3'd6) m_ocwr = dt;
    #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #3;
    foreach (m_cwr[k]) m_cwr[k] = '0;
    m_ocwr = '0;
    rst_n = 1'b1;
    #1;
  endtask

  initial begin
    logic [31:0] t;
    logic        differs;
    pm = 1'b0; addr = '0; data = '0; a = 0; b = 0; cde = '0;
    do_reset();

    // Default function from the SIN.
    pm = 1'b0;
    sweep("default");
    for (int v = 0; v < 8; v++) begin
      logic A, B, C;
      cde = 3'(v); {A, B, C} = cde;
      #1; checks++;
      if (f[0] !== ((A & B & ~C) | (~A & B & C) | (~A & ~B & ~C))) begin
        failures++; $display("FAIL default SOP v=%0d", v);
      end
    end
    n_default++;

    for (int iter = 0; iter < 24; iter++) begin
      t = $urandom;
      // Program the wanted function.
      for (int k = 0; k < 4; k++) write(3'(k), t[8*k +: 8] ^ SIN_REF);
      n_program++;
      sweep("program mode shows SIN");
      if (m_cwr[0] != 8'h00) n_prog_sin++;
      @(negedge clk); pm = 1'b0;
      sweep("function");
      if (m_ocwr == 8'h00) begin
        for (int v = 0; v < 32; v++) begin
          {a, b, cde} = 5'(v);
          #1; checks++;
          if (f[6] !== t[v] || f[4] !== t[{1'b0, v[3:0]}] || f[5] !== t[{1'b1, v[3:0]}]
              || f[3'(v[4:3])] !== t[v]) begin
            failures++;
            $display("FAIL truth table v=%05b f=%07b t=%08h", v[4:0], f, t);
          end
        end
        n_function++;
      end

      // Same bytes without the SIN applied: a different function.
      for (int k = 0; k < 4; k++) write(3'(k), t[8*k +: 8]);
      @(negedge clk); pm = 1'b0;
      sweep("wrong control word");
      differs = 1'b0;
      for (int v = 0; v < 32; v++) begin
        {a, b, cde} = 5'(v); #1;
        if (m_ocwr[6] == 1'b0 && f[6] !== t[v]) differs = 1'b1;
      end
      if (m_ocwr[6] == 1'b0) begin
        checks++;
        if (!differs) begin failures++; $display("FAIL wrong word gave the right function"); end
        else n_wrong++;
      end

      // Writes in function mode are ignored.
      @(negedge clk); pm = 1'b0; addr = 3'(iter % 4); data = ~m_cwr[iter % 4];
      @(posedge clk); #1;
      sweep("locked");
      n_locked++;

      // Addresses with no register.
      write(3'd4, 8'($urandom));
      write(3'd5, 8'($urandom));
      write(3'd7, 8'($urandom));
      @(negedge clk); pm = 1'b0;
      sweep("unmapped");
      n_unmapped++;

      // Output disable, with its one-edge latency.
      begin
        logic [7:0] mask;
        mask = (iter % 3 == 2) ? 8'h00 : 8'($urandom);
        @(negedge clk);
        pm = 1'b1; addr = 3'd6; data = mask;
        #1;
        sweep("before OCwR edge");
        @(posedge clk);
        m_ocwr = mask;
        #1;
        sweep("after OCwR edge");
        @(negedge clk); pm = 1'b0;
        sweep("masked");
        if (mask[6:0] != 0) n_disable++;
      end

      if (iter == 12) begin
        do_reset();
        sweep("after reset");
        n_reset++;
      end
    end

    checks++; if (n_default  == 0) begin failures++; $display("FAIL never: default"); end
    checks++; if (n_program  == 0) begin failures++; $display("FAIL never: program"); end
    checks++; if (n_prog_sin == 0) begin failures++; $display("FAIL never: program shows SIN"); end
    checks++; if (n_function == 0) begin failures++; $display("FAIL never: function"); end
    checks++; if (n_wrong    == 0) begin failures++; $display("FAIL never: wrong_cw"); end
    checks++; if (n_locked   == 0) begin failures++; $display("FAIL never: locked"); end
    checks++; if (n_unmapped == 0) begin failures++; $display("FAIL never: unmapped"); end
    checks++; if (n_disable  == 0) begin failures++; $display("FAIL never: disable"); end
    checks++; if (n_reset    == 0) begin failures++; $display("FAIL never: reset"); end
    $display("mechanisms: default=%0d program=%0d program_shows_sin=%0d function=%0d wrong_cw=%0d locked=%0d unmapped=%0d disable=%0d reset=%0d",
             n_default, n_program, n_prog_sin, n_function, n_wrong, n_locked, n_unmapped, n_disable, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
