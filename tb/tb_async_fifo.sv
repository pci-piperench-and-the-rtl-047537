// Self-checking test of async_fifo: random pushes and pops on unrelated
// clocks, order and contents against a queue, plus full and empty flags.
module tb_async_fifo;
  localparam int W = 128, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen = 0, ren = 0, wfull, rempty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int npushed = 0, npopped = 0;
  initial begin
    #20 wrst_n = 1; rrst_n = 1;
    @(posedge rclk); #1;
    chk(rempty, "empty after reset");
    // fill without reading: must report full after exactly D words
    for (int i = 0; i < D; i++) begin
      @(negedge wclk);
      chk(!wfull, "not full before D words");
      wdata = {4{$urandom()}}; wen = 1; q.push_back(wdata);
      @(posedge wclk); #1 wen = 0;
    end
    @(negedge wclk);
    chk(wfull, "full after D words");
    // drain it
    repeat (10) @(posedge rclk);
    while (q.size() > 0) begin
      @(negedge rclk);
      if (!rempty) begin
        chk(rdata == q.pop_front(), "drain order");
        ren = 1; @(posedge rclk); #1 ren = 0;
      end
    end
    repeat (10) @(posedge rclk);
    chk(rempty, "empty after drain");
    // random traffic
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          @(negedge wclk);
          while (wfull || ($urandom_range(0, 3) == 0)) @(negedge wclk);
          wdata = {$urandom(), $urandom(), $urandom(), $urandom()};
          q.push_back(wdata); wen = 1;
          @(posedge wclk); #1 wen = 0;
        end
      end
      begin
        while (npopped < 300) begin
          @(negedge rclk);
          if (!rempty && $urandom_range(0, 2) != 0) begin
            chk(rdata == q.pop_front(), "random order");
            npopped++;
            ren = 1; @(posedge rclk); #1 ren = 0;
          end
        end
      end
    join
    repeat (10) @(posedge rclk);
    chk(rempty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
