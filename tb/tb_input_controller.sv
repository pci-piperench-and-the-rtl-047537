// Self-checking test of input_controller: configuration, initial-state,
// data (two packets of one stream, the second with the flush bit clear) and
// state-dump packets for this chip; a header for a chip further down the
// chain (passed on with its chip ID decremented); bare packets with no header
// held (passed on untouched).  Commands, assembly-buffer words, output
// requests and pass-through words are compared with expectations built from
// the packet list; every destination applies random back-pressure.
module tb_input_controller;
  import prp_pkg::*;
  import prp_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data; logic in_valid, in_ready;
  cmd_t cmd; logic cmd_push, cmd_full = 0;
  logic ab_load; logic [3:0] ab_mask; logic [1:0] ab_shift, ab_count;
  logic [31:0] ab_word; logic ab_valid, ab_ready = 1;
  out_job_t job; logic job_push, job_ready = 1;
  logic [31:0] pt_data; logic pt_valid, pt_ready = 1;
  logic hdr_active;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  input_controller #(.CACHE_LINES(64)) dut (.*);

  logic [31:0] src_q[$];
  assign in_valid = (src_q.size() != 0);
  assign in_data  = in_valid ? src_q[0] : '0;

  cmd_t exp_cmd[$]; logic [31:0] exp_ab[$], exp_pt[$]; out_job_t exp_job[$];
  int n_load = 0;
  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    logic take;
    take = in_valid && in_ready;
    if (cmd_push && !cmd_full) begin
      chk(exp_cmd.size() != 0 && cmd == exp_cmd[0], $sformatf("cmd op=%0d addr=%0d data=%h", cmd.op, cmd.addr, cmd.data));
      if (exp_cmd.size()) void'(exp_cmd.pop_front());
    end
    if (ab_valid && ab_ready) begin
      chk(exp_ab.size() != 0 && ab_word == exp_ab[0], "assembly word");
      if (exp_ab.size()) void'(exp_ab.pop_front());
    end
    if (ab_load) begin
      n_load++;
      chk(ab_mask == 4'b0001 && ab_shift == 2'd1 && ab_count == 2'd3, "assembly pattern from the I/O word");
    end
    if (job_push && job_ready) begin
      chk(exp_job.size() != 0 && job == exp_job[0], $sformatf("job n=%0d more=%b dump=%b", job.nwords, job.more, job.dump));
      if (exp_job.size()) void'(exp_job.pop_front());
    end
    if (pt_valid && pt_ready) begin
      chk(exp_pt.size() != 0 && pt_data == exp_pt[0], $sformatf("pass-through %h", pt_data));
      if (exp_pt.size()) void'(exp_pt.pop_front());
    end
    #1;
    if (take) void'(src_q.pop_front());
    cmd_full = ($urandom_range(0, 5) == 0);
    ab_ready = ($urandom_range(0, 5) != 0);
    pt_ready = ($urandom_range(0, 5) != 0);
  end

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cmd_t mk(cmd_op_e op, int addr, logic [31:0] data);
    cmd_t c; c.op = op; c.addr = 16'(addr); c.data = data; return c;
  endfunction
  function automatic out_job_t dj(int n, bit more);
    out_job_t j; j = '0; j.nwords = 16'(n); j.more = more; j.start = 0; j.step = 1; j.count = 1; return j;
  endfunction

  initial begin
    logic [31:0] w;
    #22 rst_n = 1;
    // configuration packet: 20 words from line 2 (I/O word of the app at line 2)
    src_q.push_back(hdr(PKT_CONFIG, 0, 2)); src_q.push_back(mrk(20, 0));
    for (int i = 0; i < 20; i++) begin
      w = (i == 0) ? iocfg(1, 1, 3, 0, 1, 1, 3) : $urandom();
      src_q.push_back(w); exp_cmd.push_back(mk(CMD_CFG_WR, 32 + i, w));
    end
    // initial state: 3 words at row 5
    src_q.push_back(hdr(PKT_STATE, 0, 5)); src_q.push_back(mrk(3, 0));
    for (int i = 0; i < 3; i++) begin
      w = $urandom(); src_q.push_back(w); exp_cmd.push_back(mk(CMD_STATE_WR, 20 + i, w));
    end
    // header for chip 2 -> passed on as a header for chip 1
    src_q.push_back(hdr(PKT_DATA, 2, 7)); exp_pt.push_back(hdr(PKT_DATA, 1, 7));
    // bare packet with no header held -> passed on untouched
    src_q.push_back(mrk(2, 1)); exp_pt.push_back(mrk(2, 1));
    for (int i = 0; i < 2; i++) begin w = $urandom(); src_q.push_back(w); exp_pt.push_back(w); end
    // data stream for this chip: app at line 2, packets of 8 and 4 words
    src_q.push_back(hdr(PKT_DATA, 0, 2)); exp_cmd.push_back(mk(CMD_START, 2, 0));
    src_q.push_back(mrk(8, 1)); exp_job.push_back(dj(4, 1));
    for (int i = 0; i < 8; i++) begin w = $urandom(); src_q.push_back(w); exp_ab.push_back(w); end
    src_q.push_back(mrk(4, 0)); exp_job.push_back(dj(2, 0));
    for (int i = 0; i < 4; i++) begin w = $urandom(); src_q.push_back(w); exp_ab.push_back(w); end
    exp_cmd.push_back(mk(CMD_END, 0, 3));
    // state dump of 6 words from row 5
    src_q.push_back(hdr(PKT_DUMP, 0, 5)); src_q.push_back(mrk(6, 0));
    exp_cmd.push_back(mk(CMD_DUMP, 5, 6));
    begin out_job_t j; j = '0; j.dump = 1; j.nwords = 16'd6; exp_job.push_back(j); end
    // a bare packet after the stream ended is not ours any more
    src_q.push_back(mrk(1, 0)); exp_pt.push_back(mrk(1, 0));
    w = $urandom(); src_q.push_back(w); exp_pt.push_back(w);

    while (src_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(exp_cmd.size() == 0 && exp_ab.size() == 0 && exp_job.size() == 0 && exp_pt.size() == 0,
        $sformatf("all outputs seen (cmd %0d ab %0d job %0d pt %0d left)", exp_cmd.size(), exp_ab.size(), exp_job.size(), exp_pt.size()));
    chk(n_load == 1, "assembly buffer loaded once");
    chk(!hdr_active, "data header dropped after the flush packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
