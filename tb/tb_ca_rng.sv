// tb_ca_rng: self-checking test of the cellular-automaton generator.
// Two instances (4 cells, 7 cells with their primitive rule vectors) run
// freely; every transition is compared with a rule-90/150 model written
// here cell by cell, the period must be exactly 2^CELLS - 1 with no state
// repeated inside it, and the state must hold while en is low.
module tb_ca_rng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] s4;
  logic [6:0] s7;
  int checks = 0, failures = 0;

  ca_rng #(.CELLS(4), .RULES(4'hB), .SEED(4'h1)) dut4 (.clk, .rst_n, .en, .state(s4));
  ca_rng #(.CELLS(7), .RULES(7'h32), .SEED(7'h01)) dut7 (.clk, .rst_n, .en, .state(s7));

  always #5 clk = ~clk;

  function automatic logic [6:0] model(logic [6:0] s, logic [6:0] rules, int n);
    logic [6:0] r = '0;
    for (int i = 0; i < n; i++) begin
      logic l, rt;
      l  = (i == n - 1) ? 1'b0 : s[i+1];
      rt = (i == 0)     ? 1'b0 : s[i-1];
      r[i] = rules[i] ? (l ^ s[i] ^ rt) : (l ^ rt);
    end
    return r;
  endfunction

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    bit seen4 [16];
    bit seen7 [128];
    logic [3:0] p4; logic [6:0] p7;
    int per4, per7;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(s4 == 4'h1 && s7 == 7'h01, "seed");
    p4 = s4; p7 = s7;
    @(posedge clk); #1;
    chk(s4 == p4 && s7 == p7, "hold while en low");
    en = 1;
    per4 = 0; per7 = 0;
    for (int n = 1; n <= 127; n++) begin
      p4 = s4; p7 = s7;
      @(posedge clk); #1;
      chk(s4 == model({3'b0, p4}, 7'h0B, 4)[3:0], "rule4");
      chk(s7 == model(p7, 7'h32, 7), "rule7");
      if (per4 == 0) begin
        if (s4 == 4'h1) per4 = n;
        else begin chk(!seen4[s4] && s4 != 0, "repeat4"); seen4[s4] = 1; end
      end
      if (per7 == 0) begin
        if (s7 == 7'h01) per7 = n;
        else begin chk(!seen7[s7] && s7 != 0, "repeat7"); seen7[s7] = 1; end
      end
    end
    chk(per4 == 15, "period 4 cells");
    chk(per7 == 127, "period 7 cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
