// End-to-end test of two PCI-PipeRench chips, at full size, chained as on a
// multi-chip card: the host stream enters chip 0, chip 0's output feeds chip
// 1, chip 1's output returns to the host.  PCI clock 30 ns, fabric clock
// 10 ns.
//   1. Configuration: chip 0 gets a 3-stripe "+1" application (line 0) and a
//      2-stripe accumulate-then-"+1" application (line 30); chip 1 gets a
//      20-stripe "+1" application (line 0), larger than its 16 stripes.
//      Chip 1's packets pass through chip 0: its header with the chip ID
//      decremented, its marker and contents as a bare packet.
//   2. A two-packet stream through both chips (4 PCI words per fabric word
//      each way): chip 0 stalls between the packets, chip 1 scrolls its
//      virtual pipeline, both drain on the flush bit.  Result: every byte
//      + 23.  The host side applies random back-pressure.
//   3. Chip 0 alone: initial state, a stream of single-word fabric inputs
//      broadcast to all four slots (running sum + 1), then a state dump.
//      Chip 1 has no header held and passes these packets through.
// Each of those mechanisms is counted; one that never happens is a failure.
module tb_pci_piperench;
  import prp_pkg::*;
  import prp_tb_pkg::*;
  logic pci_clk = 0, pipe_clk = 0, pci_rst_n = 0, pipe_rst_n = 0;
  always #15 pci_clk = ~pci_clk;
  always #5  pipe_clk = ~pipe_clk;

  logic [31:0] h_data, m_data, r_data;
  logic h_valid, h_ready, m_valid, m_ready, r_valid, r_ready;
  logic busy0, busy1;

  pci_piperench u0 (.pci_clk, .pci_rst_n, .pipe_clk, .pipe_rst_n,
    .in_data(h_data), .in_valid(h_valid), .in_ready(h_ready),
    .out_data(m_data), .out_valid(m_valid), .out_ready(m_ready), .busy(busy0),
    .fab_stall(), .fab_swap());
  pci_piperench u1 (.pci_clk, .pci_rst_n, .pipe_clk, .pipe_rst_n,
    .in_data(m_data), .in_valid(m_valid), .in_ready(m_ready),
    .out_data(r_data), .out_valid(r_valid), .out_ready(r_ready), .busy(busy1),
    .fab_stall(), .fab_swap());

  int checks = 0, failures = 0;
  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // host side: send queue and receive queue
  logic [31:0] tx_q[$], rx_q[$];
  logic rx_stall = 0;
  int pci_cyc = 0;
  always @(posedge pci_clk) begin
    logic take;
    pci_cyc++;
    take = h_valid && h_ready;
    if (r_valid && r_ready) rx_q.push_back(r_data);
    #1;
    if (take) void'(tx_q.pop_front());
    h_valid = (tx_q.size() != 0);
    h_data  = h_valid ? tx_q[0] : '0;
    r_ready = !rx_stall && ($urandom_range(0, 3) != 0);
  end

  // mechanism counters
  int n_stall0 = 0, n_swap1 = 0, n_hdr_pt = 0, n_bare_pt1 = 0, n_ofull = 0, n_drain = 0, n_dump = 0;
  always @(posedge pipe_clk) begin
    if (u0.u_cfgctl.stall && u0.u_cfgctl.st == 2) n_stall0++;
    if (u1.u_cfgctl.swap) n_swap1++;
    if ((u0.u_cfgctl.stall && u0.of_full) || (u1.u_cfgctl.stall && u1.of_full)) n_ofull++;
    if (u0.u_cfgctl.st == 2 && u0.u_cfgctl.drain) n_drain++;
    if (u0.u_cfgctl.st == 4) n_dump++;
  end
  always @(posedge pci_clk) begin
    if (u0.pt_valid && u0.pt_ready && u0.u_inctl.st == 0 && u0.pt_data[31]) n_hdr_pt++;
    if (u1.pt_valid && u1.pt_ready && u1.u_inctl.st == 0 && !u1.pt_data[31]) n_bare_pt1++;
  end

  initial begin
    #20_000_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send_cfg(int chip, int line, logic [511:0] lines[$]);
    tx_q.push_back(hdr(PKT_CONFIG, chip, line));
    tx_q.push_back(mrk(16 * lines.size(), 0));
    foreach (lines[i]) for (int w = 0; w < 16; w++) tx_q.push_back(lines[i][w*32 +: 32]);
  endtask

  task automatic wait_quiet();
    while (tx_q.size() != 0) @(posedge pci_clk);
    repeat (20) @(posedge pci_clk);
    while (busy0 || busy1) @(posedge pci_clk);
    repeat (10) @(posedge pci_clk);
  endtask

  task automatic expect_word(logic [31:0] e, string what);
    chk(rx_q.size() != 0 && rx_q[0] == e, $sformatf("%s: got %h expected %h", what, rx_q.size() ? rx_q[0] : 32'h0, e));
    if (rx_q.size()) void'(rx_q.pop_front());
  endtask

  initial begin
    logic [511:0] ls[$];
    logic [127:0] fw[$], acc;
    logic [31:0] w;
    int t0, t1;
    h_valid = 0; h_data = 0; r_ready = 0;
    #100 pci_rst_n = 1; pipe_rst_n = 1;
    repeat (5) @(posedge pci_clk);

    // 1. configuration
    ls = {};
    ls.push_back(512'(iocfg(4'b0001, 1, 3, 0, 1, 3, 3)));
    repeat (3) ls.push_back(line_inc());
    send_cfg(0, 0, ls);
    ls = {};
    ls.push_back(512'(iocfg(4'b1111, 0, 0, 0, 0, 0, 2)));
    ls.push_back(line_acc());
    ls.push_back(line_inc());
    send_cfg(0, 30, ls);
    ls = {};
    ls.push_back(512'(iocfg(4'b0001, 1, 3, 0, 1, 3, 20)));
    repeat (20) ls.push_back(line_inc());
    send_cfg(1, 0, ls);
    wait_quiet();
    chk(rx_q.size() == 0, "configuration produces no output");

    // 2. two-packet stream through both chips
    tx_q.push_back(hdr(PKT_DATA, 0, 0));
    tx_q.push_back(hdr(PKT_DATA, 1, 0));
    tx_q.push_back(mrk(128, 1));
    for (int i = 0; i < 32; i++) begin
      fw.push_back({$urandom(), $urandom(), $urandom(), $urandom()});
      for (int s = 0; s < 4; s++) tx_q.push_back(fw[$][s*32 +: 32]);
    end
    t0 = pci_cyc;
    while (tx_q.size() != 0) @(posedge pci_clk);
    t1 = pci_cyc;
    // one word per PCI cycle, slowed only by the host reading 3 words in 4
    chk(t1 - t0 <= 128 * 3 / 2, $sformatf("a 128-word packet crosses both chips near PCI rate (%0d PCI cycles)", t1 - t0));
    rx_stall = 1;              // host stops reading for a while: output FIFOs fill
    repeat (200) @(posedge pci_clk);
    rx_stall = 0;
    tx_q.push_back(mrk(16, 0));
    for (int i = 0; i < 4; i++) begin
      fw.push_back({$urandom(), $urandom(), $urandom(), $urandom()});
      for (int s = 0; s < 4; s++) tx_q.push_back(fw[$][s*32 +: 32]);
    end
    wait_quiet();
    expect_word(mrk(128, 1), "first output marker");
    for (int i = 0; i < 32; i++) begin
      logic [127:0] e; e = add_bytes(fw.pop_front(), 23);
      for (int s = 0; s < 4; s++) expect_word(e[s*32 +: 32], "stream result");
    end
    expect_word(mrk(16, 0), "second output marker");
    for (int i = 0; i < 4; i++) begin
      logic [127:0] e; e = add_bytes(fw.pop_front(), 23);
      for (int s = 0; s < 4; s++) expect_word(e[s*32 +: 32], "stream result");
    end
    chk(rx_q.size() == 0, "nothing extra after the stream");

    // 3. chip 0: initial state, accumulate, dump
    acc = {$urandom(), $urandom(), $urandom(), $urandom()};
    tx_q.push_back(hdr(PKT_STATE, 0, 31));
    tx_q.push_back(mrk(4, 0));
    for (int s = 0; s < 4; s++) tx_q.push_back(acc[s*32 +: 32]);
    tx_q.push_back(hdr(PKT_DATA, 0, 30));
    tx_q.push_back(mrk(6, 0));
    for (int i = 0; i < 6; i++) begin
      w = $urandom(); tx_q.push_back(w); fw.push_back({4{w}});
    end
    tx_q.push_back(hdr(PKT_DUMP, 0, 31));
    tx_q.push_back(mrk(4, 0));
    wait_quiet();
    expect_word(mrk(6, 0), "accumulator output marker");
    for (int i = 0; i < 6; i++) begin
      logic [127:0] e;
      acc = sum_bytes(acc, fw.pop_front());
      e = add_bytes(acc, 1);
      expect_word(e[31:0], "running sum + 1");
    end
    expect_word(mrk(4, 0), "dump marker");
    for (int s = 0; s < 4; s++) expect_word(acc[s*32 +: 32], "dumped state");
    chk(rx_q.size() == 0, "nothing extra after the dump");

    $display("mechanisms: stall=%0d swap=%0d header-pass=%0d bare-pass=%0d out-full=%0d drain=%0d dump=%0d",
             n_stall0, n_swap1, n_hdr_pt, n_bare_pt1, n_ofull, n_drain, n_dump);
    chk(n_stall0 > 0, "chip 0 stalled for input");
    chk(n_swap1 > 0, "chip 1 swapped virtual stripes");
    chk(n_hdr_pt >= 2, "headers passed down the chain");
    chk(n_bare_pt1 > 0, "bare packets passed through chip 1");
    chk(n_ofull > 0, "fabric stalled on a full output FIFO");
    chk(n_drain > 0, "pipeline drained on the flush bit");
    chk(n_dump > 0, "state dumped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
