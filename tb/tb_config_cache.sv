// Self-checking test of config_cache: random word writes against a model,
// whole-line reads.
module tb_config_cache;
  logic clk = 0, we = 0; logic [9:0] waddr = 0; logic [31:0] wdata = 0;
  logic [5:0] raddr = 0; logic [511:0] rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [1024];
  always #5 clk = ~clk;
  config_cache #(.LINES(64), .LINE_BITS(512)) dut (.*);
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom(); model[i] = wdata;
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); we = 1; waddr = 10'($urandom()); wdata = $urandom(); model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int l = 0; l < 64; l++) begin
      raddr = 6'(l); #1;
      for (int w = 0; w < 16; w++) begin
        checks++;
        if (rdata[w*32 +: 32] != model[l*16 + w]) begin failures++; $display("FAIL line %0d word %0d", l, w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
