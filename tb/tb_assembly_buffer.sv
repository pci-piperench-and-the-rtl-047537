// Self-checking test of assembly_buffer: several mask / shift-size /
// shift-count patterns, expected words built by an independent slot model,
// one push per (count+1) words, and back-pressure from a full FIFO.
module tb_assembly_buffer;
  logic clk = 0, rst_n = 0;
  logic cfg_load = 0; logic [3:0] cfg_mask = 0; logic [1:0] cfg_shift = 0, cfg_count = 0;
  logic [31:0] in_word = 0; logic in_valid = 0, in_ready;
  logic [127:0] out_word; logic out_valid, out_full = 0;
  int checks = 0, failures = 0;
  logic [127:0] exp_q[$];

  always #5 clk = ~clk;
  assembly_buffer dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (out_valid) begin
    checks++;
    if (exp_q.size() == 0 || out_word != exp_q[0]) begin
      failures++; $display("FAIL: word %h expected %h", out_word, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  // model state
  logic [127:0] mbuf;
  task automatic run_pattern(int mask, int shft, int cnt, int nwords);
    int m, c, pushes_before, got;
    logic [31:0] w;
    @(negedge clk); cfg_mask = 4'(mask); cfg_shift = 2'(shft); cfg_count = 2'(cnt); cfg_load = 1;
    @(negedge clk); cfg_load = 0;
    m = mask; c = cnt;
    for (int i = 0; i < nwords; i++) begin
      w = $urandom();
      for (int s = 0; s < 4; s++) if (m[s]) mbuf[s*32 +: 32] = w;
      if (c > 0) begin m = (m << shft) & 4'hf; c--; end
      else begin exp_q.push_back(mbuf); m = mask; c = cnt; end
      in_word = w; in_valid = 1;
      // random back-pressure
      if ($urandom_range(0, 3) == 0) begin
        out_full = 1; @(negedge clk);
        chk(!in_ready, "not ready while FIFO full"); out_full = 0;
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("all words pushed for pattern %0h/%0d/%0d", mask, shft, cnt));
  endtask

  initial begin
    mbuf = '0;
    #22 rst_n = 1;
    run_pattern(4'b0001, 1, 3, 16);  // four words -> slots 0,1,2,3
    run_pattern(4'b0011, 2, 1, 12);  // two words, each into two slots
    run_pattern(4'b1111, 0, 0, 5);   // one word broadcast to all slots
    run_pattern(4'b0001, 2, 1, 8);   // two words -> slots 0 and 2; 1 and 3 keep old data
    run_pattern(4'b0001, 0, 0, 6);   // one word per fabric word, slot 0
    run_pattern(4'b0010, 1, 2, 9);   // three words -> slots 1,2,3
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
