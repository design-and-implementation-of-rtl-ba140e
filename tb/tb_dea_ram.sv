// tb_dea_ram: self-checking test of the single-port RAM at the fitness
// memory size used in the engine tests (64 words). Writes random data to
// every word, reads them back in random order, and checks the one-cycle
// read latency and the read-old-data behaviour on a write.
module tb_dea_ram;
  localparam int W = 64;
  logic clk = 0, we = 0;
  logic [5:0] addr = 0;
  logic [63:0] x = 0, y;
  logic [63:0] ref_m [W];
  int checks = 0, failures = 0;

  dea_ram #(.WORDS(W), .WIDTH(64)) dut (.clk, .we, .addr, .x, .y);

  always #5 clk = ~clk;

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      we = 1; addr = 6'(k); x = {$urandom, $urandom};
      ref_m[k] = x;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 500; n++) begin
      int a, prev;
      prev = int'(addr);
      a = $urandom % W;
      @(negedge clk) addr = 6'(a);
      #1 chk(y == ref_m[prev], "output held until the clock edge");
      @(posedge clk); #1;
      chk(y == ref_m[a], "read");
    end
    // write and read the same word in one cycle: y shows the old word
    @(negedge clk) begin we = 1; addr = 6'd5; x = 64'hDEAD_BEEF_0123_4567; end
    @(posedge clk); #1;
    chk(y == ref_m[5], "read-old on write");
    ref_m[5] = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk) we = 0;
    @(posedge clk); #1;
    chk(y == ref_m[5], "new data next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
