// Self-checking test of output_controller: data packets with several
// disassembly patterns, a state-dump packet with a short last row, a
// zero-length packet, pass-through words held back while a packet is
// pending, and random back-pressure on the output.
module tb_output_controller;
  import prp_pkg::*;
  logic clk = 0, rst_n = 0;
  out_job_t job = '0; logic job_push = 0, job_ready;
  logic [127:0] of_data; logic of_empty, of_pop;
  logic [31:0] pt_data = 0; logic pt_valid = 0, pt_ready;
  logic [31:0] out_data; logic out_valid, out_ready = 1, busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_controller dut (.*);

  logic [127:0] of_q[$];
  logic [31:0] exp_q[$];
  assign of_empty = (of_q.size() == 0);
  assign of_data  = of_empty ? '0 : of_q[0];
  int n_pt_blocked = 0;
  always @(posedge clk) begin
    logic pop;
    pop = of_pop;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data != exp_q[0]) begin
        failures++; $display("FAIL: out %h expected %h", out_data, exp_q.size() ? exp_q[0] : 32'hx);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    if (pt_valid && !pt_ready) n_pt_blocked++;
    #1;
    if (pop) void'(of_q.pop_front());
    out_ready = ($urandom_range(0, 4) != 0);
  end

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic data_job(int nfab, int start, int step, int cnt, bit more);
    marker_t m;
    m = '0; m.more = more; m.size = 16'(nfab * (cnt + 1));
    exp_q.push_back(m);
    @(negedge clk);
    job = '0; job.more = more; job.nwords = m.size; job.start = 2'(start); job.step = 2'(step); job.count = 2'(cnt);
    job_push = 1; @(negedge clk); job_push = 0;
    for (int i = 0; i < nfab; i++) begin
      logic [127:0] w; int s;
      w = {$urandom(), $urandom(), $urandom(), $urandom()};
      of_q.push_back(w);
      s = start;
      for (int k = 0; k <= cnt; k++) begin exp_q.push_back(w[s*32 +: 32]); s = (s + step) % 4; end
    end
  endtask

  task automatic wait_done();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #22 rst_n = 1;
    data_job(5, 0, 1, 3, 1);   // all four slots
    wait_done();
    data_job(4, 2, 0, 0, 0);   // one word per entry, from slot 2
    wait_done();
    data_job(3, 1, 2, 1, 1);   // slots 1 and 3
    wait_done();
    data_job(0, 0, 0, 0, 0);   // zero-length packet: marker only
    wait_done();
    begin // state dump of 6 words: two rows, the second cut short
      marker_t m; logic [127:0] r0, r1;
      m = '0; m.more = 0; m.size = 16'd6; exp_q.push_back(m);
      r0 = {$urandom(), $urandom(), $urandom(), $urandom()}; r1 = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int k = 0; k < 4; k++) exp_q.push_back(r0[k*32 +: 32]);
      for (int k = 0; k < 2; k++) exp_q.push_back(r1[k*32 +: 32]);
      @(negedge clk); job = '0; job.dump = 1; job.nwords = 16'd6; job_push = 1;
      @(negedge clk); job_push = 0;
      repeat (5) @(negedge clk);
      of_q.push_back(r0); of_q.push_back(r1);
      wait_done();
      chk(of_q.size() == 0, "dump consumed both rows");
    end
    // pass-through while a data packet waits for its fabric result
    begin
      marker_t m; logic [127:0] w;
      w = {$urandom(), $urandom(), $urandom(), $urandom()};
      m = '0; m.size = 16'd4; exp_q.push_back(m);
      @(negedge clk); job = '0; job.nwords = 16'd4; job.start = 0; job.step = 1; job.count = 3; job_push = 1;
      @(negedge clk); job_push = 0; pt_data = 32'h0000_0002; pt_valid = 1;
      repeat (10) @(negedge clk);
      chk(!pt_ready && n_pt_blocked > 5 && exp_q.size() == 0, "pass-through held while an output packet is pending");
      for (int k = 0; k < 4; k++) exp_q.push_back(w[k*32 +: 32]);
      exp_q.push_back(32'h0000_0002);
      of_q.push_back(w);
      while (!(pt_valid && pt_ready)) @(posedge clk);
      @(negedge clk); pt_valid = 0;
      wait_done();
    end
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
