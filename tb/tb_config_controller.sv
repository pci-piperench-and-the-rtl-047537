// Self-checking test of config_controller driving a full-size fabric.
//   app A (line 0):  3 "+1" stripes, fits the fabric      -> out = in + 3
//   app B (line 8):  20 "+1" stripes, virtualised on 16    -> out = in + 20,
//                    throughput about 15 words per 20 cycles
//   app C (line 40): accumulator stripe + "+1" stripe with initial state
//                    written by STATE_WR, then the saved state read by DUMP
// Command queue, input FIFO and output FIFO are modelled by queues; the
// output FIFO is held full for a while and the input runs dry mid-stream, so
// both stall conditions occur.
module tb_config_controller;
  import prp_pkg::*;
  import prp_tb_pkg::*;
  localparam int P = 16;
  logic clk = 0, rst_n = 0;
  cmd_t cmd; logic cmd_empty, cmd_pop;
  logic in_empty, in_pop, out_full = 0, out_push;
  logic [127:0] out_data;
  logic f_en, f_out_valid; logic [P-1:0] f_load, f_active, f_first;
  logic [511:0] f_cfg; logic [127:0] f_state, f_out_word, f_save_word;
  logic [3:0] f_last_sel, f_save_sel;
  logic busy, stall, swap;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  config_controller #(.P(P), .N(16), .B(8), .CACHE_LINES(64)) dut (.*);
  fabric #(.P(P), .N(16), .B(8)) u_fab (
    .clk(clk), .rst_n(rst_n), .en(f_en), .load(f_load), .active(f_active), .first(f_first),
    .cfg_in(f_cfg), .state_in(f_state), .in_word(in_head), .in_valid(!in_empty),
    .last_sel(f_last_sel), .out_word(f_out_word), .out_valid(f_out_valid),
    .save_sel(f_save_sel), .save_word(f_save_word));

  cmd_t cmd_q[$];
  logic [127:0] in_q[$], out_q[$], in_head;
  int n_stall = 0, n_swap = 0, cyc = 0;
  // queue models: handshakes are read before the edge, heads are updated by
  // non-blocking assignment so the design never sees a queue change mid-edge
  always @(posedge clk) begin
    cyc++;
    if (cmd_pop && cmd_q.size()) void'(cmd_q.pop_front());
    if (in_pop && in_q.size()) void'(in_q.pop_front());
    if (out_push) out_q.push_back(out_data);
    if (stall) n_stall++;
    if (swap) n_swap++;
    cmd_empty <= (cmd_q.size() == 0);
    cmd       <= cmd_q.size() ? cmd_q[0] : '0;
    in_empty  <= (in_q.size() == 0);
    in_head   <= in_q.size() ? in_q[0] : '0;
  end

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cmd_t mk(cmd_op_e op, int addr, logic [31:0] data);
    cmd_t c; c.op = op; c.addr = 16'(addr); c.data = data; return c;
  endfunction
  task automatic put_line(int line, logic [511:0] l);
    for (int w = 0; w < 16; w++) cmd_q.push_back(mk(CMD_CFG_WR, line * 16 + w, l[w*32 +: 32]));
  endtask
  task automatic wait_idle();
    repeat (3) @(posedge clk);
    while (busy || cmd_q.size() != 0) @(posedge clk);
  endtask

  logic [127:0] sent[$], acc;
  initial begin
    int t0, t1;
    #22 rst_n = 1;
    // configuration
    put_line(0, 512'(iocfg(1, 1, 3, 0, 1, 3, 3)));
    for (int v = 0; v < 3; v++) put_line(1 + v, line_inc());
    put_line(8, 512'(iocfg(1, 1, 3, 0, 1, 3, 20)));
    for (int v = 0; v < 20; v++) put_line(9 + v, line_inc());
    put_line(40, 512'(iocfg(1, 1, 3, 0, 1, 3, 2)));
    put_line(41, line_acc());
    put_line(42, line_inc());
    wait_idle();

    // app A: fits
    cmd_q.push_back(mk(CMD_START, 0, 0));
    for (int i = 0; i < 10; i++) begin sent.push_back({4{$urandom()}}); in_q.push_back(sent[$]); end
    cmd_q.push_back(mk(CMD_END, 0, 10));
    t0 = cyc; wait_idle(); t1 = cyc;
    chk(out_q.size() == 10, $sformatf("app A: 10 results, got %0d", out_q.size()));
    while (out_q.size()) chk(out_q.pop_front() == add_bytes(sent.pop_front(), 3), "app A result");
    chk(t1 - t0 <= 3 + 10 + 3 + P + 6, $sformatf("app A: one word per cycle (%0d cycles)", t1 - t0));

    // app B: virtualised, with the output FIFO full for a while
    cmd_q.push_back(mk(CMD_START, 8, 0));
    for (int i = 0; i < 60; i++) begin sent.push_back({4{$urandom()}}); in_q.push_back(sent[$]); end
    cmd_q.push_back(mk(CMD_END, 0, 60));
    t0 = cyc;
    repeat (60) @(posedge clk);
    out_full = 1; repeat (25) @(posedge clk); out_full = 0;
    wait_idle(); t1 = cyc;
    chk(out_q.size() == 60, $sformatf("app B: 60 results, got %0d", out_q.size()));
    while (out_q.size()) begin logic [127:0] o, e; o = out_q.pop_front(); e = sent.pop_front(); chk(o == add_bytes(e, 20), $sformatf("app B result %h in %h", o, e)); end
    chk(n_swap > 60, $sformatf("app B: stripes swapped (%0d)", n_swap));
    // 60 words at 15 per 20 cycles = 80 cycles, + 25 blocked + fill/drain
    chk(t1 - t0 >= 80 + 25 && t1 - t0 <= 80 + 25 + 3 * 20 + P + 10, $sformatf("app B: throughput (%0d cycles)", t1 - t0));

    // app C: initial state, input running dry mid-stream, state saved and dumped
    acc = {4{$urandom()}};
    for (int w = 0; w < 4; w++) cmd_q.push_back(mk(CMD_STATE_WR, 41 * 4 + w, acc[w*32 +: 32]));
    cmd_q.push_back(mk(CMD_START, 40, 0));
    for (int i = 0; i < 5; i++) begin sent.push_back({4{$urandom()}}); in_q.push_back(sent[$]); end
    repeat (30) @(posedge clk);
    chk(n_stall > 20, "fabric stalls while the input is empty before END");
    chk(out_q.size() == 4, $sformatf("app C: results held in the pipeline (%0d out)", out_q.size()));
    for (int i = 0; i < 5; i++) begin sent.push_back({4{$urandom()}}); in_q.push_back(sent[$]); end
    cmd_q.push_back(mk(CMD_END, 0, 10));
    wait_idle();
    chk(out_q.size() == 10, "app C: 10 results");
    while (out_q.size()) begin
      acc = sum_bytes(acc, sent.pop_front());
      chk(out_q.pop_front() == add_bytes(acc, 1), "app C running sum");
    end
    cmd_q.push_back(mk(CMD_DUMP, 41, 4));
    wait_idle();
    chk(out_q.size() == 1 && out_q[0] == acc, "app C: dumped state is the final sum");
    $display("stalls=%0d swaps=%0d", n_stall, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
