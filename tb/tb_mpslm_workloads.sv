// tb_mpslm_workloads: the functions the MPSLM description is exercised with.
//
//  * The eight 3-variable functions of P, Q, R (P = C, Q = D, R = E; A, B
//    unused) listed in the device utilization comparison, loaded one per LUT
//    into the default-SIN module (control word = truth table ^ SIN) and
//    checked on F1..F4 over all 32 inputs.
//  * The same eight loaded the literal way - the M1 byte only, the other
//    three bytes left '0' - and checked on F1.
//  * Default function of a module with SIN 00101000: AB'C + A'BC.
//  * A full adder (sum on F1, carry on F2, inputs C, D, E) on two modules with
//    SIN 00010011 and 10000001: the two control words differ, and each
//    module's words give a wrong function on the other module.
//  * A 4-variable function on F5 (parity of B, C, D, E) and a 5-variable
//    function on F7 (majority of A..E).
// Expected values come from the sum-of-products forms written below.
module tb_mpslm_workloads;
  import mpslm_pkg::*;

  localparam int NM = 4;
  localparam logic [7:0] SINS [NM] = '{8'b0100_1001, 8'b0010_1000,
                                       8'b0001_0011, 8'b1000_0001};

  logic       clk = 1'b0;
  logic       rst_n;
  logic [NM-1:0] pm;
  logic       a, b;
  logic [2:0] addr, cde;
  logic [7:0] data;
  logic [6:0] f [NM];

  int checks = 0, failures = 0;
  int n_table = 0, n_literal = 0, n_sin2 = 0, n_fa = 0, n_cross = 0, n_f5 = 0, n_f7 = 0;

  mpslm #(.SIN(8'b0100_1001)) u0 (.clk, .rst_n, .pm(pm[0]), .addr, .data, .a, .b, .cde, .f(f[0]));
  mpslm #(.SIN(8'b0010_1000)) u1 (.clk, .rst_n, .pm(pm[1]), .addr, .data, .a, .b, .cde, .f(f[1]));
  mpslm #(.SIN(8'b0001_0011)) u2 (.clk, .rst_n, .pm(pm[2]), .addr, .data, .a, .b, .cde, .f(f[2]));
  mpslm #(.SIN(8'b1000_0001)) u3 (.clk, .rst_n, .pm(pm[3]), .addr, .data, .a, .b, .cde, .f(f[3]));

  always #100 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The eight functions of the comparison table.
  function automatic logic tab_fn(int n, logic P, logic Q, logic R);
    case (n)
      0: return P & ~Q & R;
      1: return (~P & Q & R) | (~P & ~Q & R);
      2: return (~P & Q & R) | (P & ~Q & ~R);
      3: return (~P & Q) | (Q & ~R);
      4: return (P & ~Q) | (~P & Q & R);
      5: return (~P & Q & R) | (P & Q & ~R) | (~P & ~Q & ~R);
      6: return (~P & Q) | (Q & R) | (P & ~Q & ~R);
      default: return (P & Q & R) | (~P & ~Q & ~R) | (~P & Q & R);
    endcase
  endfunction

  function automatic logic [7:0] tt3(int n);
    logic [7:0] t;
    for (int i = 0; i < 8; i++) t[i] = tab_fn(n, i[2], i[1], i[0]);
    return t;
  endfunction

  task automatic write(int m, logic [2:0] ad, logic [7:0] dt);
    @(negedge clk);
    pm = '0; pm[m] = 1'b1; addr = ad; data = dt;
    @(posedge clk);
    #1;
    @(negedge clk);
    pm = '0;
  endtask

  task automatic expect1(logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b cde=%03b got=%0b want=%0b", what, a, b, cde, got, want);
    end
  endtask

  initial begin
    logic [7:0] fa_s [NM], fa_c [NM];
    logic       bad;
    pm = '0; addr = '0; data = '0; a = 0; b = 0; cde = '0;
    rst_n = 1'b0; #3 rst_n = 1'b1;

    // Default function of the second SIN.
    for (int v = 0; v < 8; v++) begin
      logic A, B, C;
      cde = 3'(v); {A, B, C} = cde; #1;
      expect1(f[1][0], (A & ~B & C) | (~A & B & C), "SIN 00101000 default");
    end
    n_sin2++;

    // Table functions, four at a time on M1..M4.
    for (int g = 0; g < 2; g++) begin
      for (int k = 0; k < 4; k++) write(0, 3'(k), tt3(4*g + k) ^ SINS[0]);
      for (int v = 0; v < 32; v++) begin
        {a, b, cde} = 5'(v); #1;
        for (int k = 0; k < 4; k++)
          expect1(f[0][k], tab_fn(4*g + k, cde[2], cde[1], cde[0]), $sformatf("table fn %0d", 4*g + k));
      end
      n_table += 4;
    end

    // Literal loading: only the M1 byte carries the function.
    for (int n = 0; n < 8; n++) begin
      for (int k = 1; k < 4; k++) write(0, 3'(k), 8'h00);
      write(0, 3'd0, tt3(n) ^ SINS[0]);
      for (int v = 0; v < 8; v++) begin
        cde = 3'(v); #1;
        expect1(f[0][0], tab_fn(n, cde[2], cde[1], cde[0]), $sformatf("literal fn %0d", n));
        expect1(f[0][1], SINS[0][v], "untouched LUT keeps SIN");
      end
      n_literal++;
    end

    // Full adder on the SIN 00010011 and 10000001 modules.
    for (int m = 2; m < 4; m++) begin
      logic [7:0] s_tt, c_tt;
      for (int i = 0; i < 8; i++) begin
        s_tt[i] = i[2] ^ i[1] ^ i[0];
        c_tt[i] = (i[2] & i[1]) | (i[2] & i[0]) | (i[1] & i[0]);
      end
      fa_s[m] = s_tt ^ SINS[m];
      fa_c[m] = c_tt ^ SINS[m];
      write(m, 3'd0, fa_s[m]);
      write(m, 3'd1, fa_c[m]);
      for (int v = 0; v < 8; v++) begin
        cde = 3'(v); #1;
        expect1(f[m][0], cde[2] ^ cde[1] ^ cde[0], "full adder sum");
        expect1(f[m][1], (cde[2] & cde[1]) | (cde[2] & cde[0]) | (cde[1] & cde[0]), "full adder carry");
      end
      n_fa++;
    end
    checks++;
    if (fa_s[2] == fa_s[3] || fa_c[2] == fa_c[3]) begin
      failures++; $display("FAIL full adder words equal on both modules");
    end
    // Cross-load: each module's words on the other module.
    for (int m = 2; m < 4; m++) begin
      automatic int o = 5 - m;
      write(m, 3'd0, fa_s[o]);
      write(m, 3'd1, fa_c[o]);
      bad = 1'b0;
      for (int v = 0; v < 8; v++) begin
        cde = 3'(v); #1;
        if (f[m][0] !== (cde[2] ^ cde[1] ^ cde[0])) bad = 1'b1;
      end
      checks++;
      if (!bad) begin failures++; $display("FAIL foreign words still give a full adder"); end
      else n_cross++;
    end

    // 4-variable parity on F5 and 5-variable majority on F7.
    begin
      logic [31:0] t;
      for (int v = 0; v < 32; v++) begin
        logic [4:0] x;
        x = 5'(v);
        t[v] = $countones(x) >= 3 ? 1'b1 : 1'b0;
        if (x[4] == 1'b0) t[v] = ^x[3:0];
      end
      for (int k = 0; k < 4; k++) write(0, 3'(k), t[8*k +: 8] ^ SINS[0]);
      for (int v = 0; v < 32; v++) begin
        {a, b, cde} = 5'(v); #1;
        expect1(f[0][4], ^{b, cde}, "F5 parity");
        if (a) expect1(f[0][6], ($countones({a, b, cde}) >= 3), "F7 majority half");
        else   expect1(f[0][6], ^{b, cde}, "F7 parity half");
      end
      n_f5++; n_f7++;
    end

    checks++; if (n_table == 0 || n_literal == 0 || n_sin2 == 0 || n_fa == 0 ||
                  n_cross == 0 || n_f5 == 0 || n_f7 == 0) begin
      failures++; $display("FAIL a workload was not run");
    end
    $display("workloads: table=%0d literal=%0d sin2_default=%0d full_adder=%0d cross=%0d f5=%0d f7=%0d",
             n_table, n_literal, n_sin2, n_fa, n_cross, n_f5, n_f7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
