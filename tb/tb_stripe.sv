// Self-checking test of stripe: configuration load with state restore, a
// per-byte accumulator using the stripe's own registers through the crossbar,
// an unregistered left-neighbour source, the zero source for a PE reading a
// PE to its right, register hold on bubbles and on en = 0.
module tb_stripe;
  import prp_pkg::*;
  import prp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, load = 0, active = 0, take_input = 0, in_valid = 0, prev_valid = 0;
  logic [511:0] cfg_in = '0; logic [127:0] state_in = '0, in_bus = '0, prev_regs = '0;
  logic [127:0] regs, result; logic valid, res_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  stripe #(.N(16), .B(8)) dut (.*);

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [127:0] acc, x;
  initial begin
    logic [511:0] l;
    pe_cfg_t c;
    l = line_acc();
    // PE 1: A = unregistered result of PE 0, B = source word 1  -> y1 = y0 + src1
    c = '0; c.srca = 6'd32; c.srcb = 6'd1; c.lut = 8'h96; l[1*32 +: 32] = c;
    // PE 2: A = unregistered result of PE 5 (to its right) -> zero; B = src2 -> y2 = src2
    c = '0; c.srca = 6'd37; c.srcb = 6'd2; c.lut = 8'h96; l[2*32 +: 32] = c;
    #22 rst_n = 1;
    acc = {4{$urandom()}};
    @(negedge clk); en = 1; load = 1; cfg_in = l; state_in = acc;
    @(negedge clk); load = 0;
    chk(regs == acc && !valid, "state restored on load");
    active = 1;
    for (int t = 0; t < 20; t++) begin
      logic [7:0] y0;
      x = {4{$urandom()}};
      take_input = t[0]; in_bus = x; prev_regs = x;
      in_valid = 1'(t != 7); prev_valid = in_valid;
      en = 1'(t != 11);
      #1;
      y0 = acc[7:0] + x[7:0];
      chk(res_valid == in_valid, "res_valid follows source");
      chk(result[15:8] == 8'(y0 + x[15:8]), "unregistered left source");
      chk(result[23:16] == x[23:16], "right source reads zero");
      @(negedge clk);
      if (in_valid && en) begin
        acc = sum_bytes(acc, x);
        acc[15:8] = y0 + x[15:8];
        acc[23:16] = x[23:16];
      end
      chk(regs[127:24] == acc[127:24] && regs[7:0] == acc[7:0], "accumulator bytes");
      chk(regs[23:8] == acc[23:8], "mixed bytes");
      if (en) chk(valid == in_valid, "valid register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
