// Self-checking test of fabric: 16 "+1" stripes loaded one per cycle, then a
// stream of words through all of them (output = input + 16 per byte, one
// result per cycle after a 15-cycle fill), and a second run with the
// pipeline starting at physical stripe 5 and wrapping round the ring.
module tb_fabric;
  import prp_pkg::*;
  import prp_tb_pkg::*;
  localparam int P = 16;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  logic [P-1:0] load = '0, active = '0, first = '0;
  logic [511:0] cfg_in = '0; logic [127:0] state_in = '0, in_word = '0, out_word, save_word;
  logic [3:0] last_sel = '0, save_sel = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fabric #(.P(P), .N(16), .B(8)) dut (.*);

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [127:0] sent[$];
  int cyc = 0, first_out = -1, first_in = -1, nout = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (en && out_valid) begin
    checks++;
    if (sent.size() == 0 || out_word != add_bytes(sent[0], P)) begin
      failures++; $display("FAIL: out %h exp %h cyc %0d", out_word, add_bytes(sent[0], P), cyc);
    end
    if (sent.size()) void'(sent.pop_front());
    if (first_out < 0) first_out = cyc;
    nout++;
  end

  task automatic run(int start);
    first_out = -1; nout = 0;
    en = 1; active = '0; first = '0;
    for (int p = 0; p < P; p++) begin
      @(negedge clk); load = '0; load[(start + p) % P] = 1'b1; cfg_in = line_inc(); state_in = '0;
    end
    @(negedge clk); load = '0; active = '1; first[start] = 1'b1; last_sel = 4'((start + P - 1) % P);
    first_in = cyc;
    for (int i = 0; i < 50; i++) begin
      in_word = {$urandom(), $urandom(), $urandom(), $urandom()};
      in_valid = 1'(i < 30);
      if (in_valid) sent.push_back(in_word);
      @(negedge clk);
    end
    chk(sent.size() == 0 && nout == 30, "all words came out");
    chk(first_out - first_in == P - 1, $sformatf("latency %0d", first_out - first_in));
    save_sel = 4'(start); #1;
    chk(save_word != '0, "save port shows registers");
  endtask

  initial begin
    #22 rst_n = 1;
    run(0);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
