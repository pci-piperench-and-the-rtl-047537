// Self-checking test of pe: add, subtract, carry chaining, AND, shifts,
// zero detect and the zero-flag LUT input, each checked against arithmetic
// computed in the testbench.
module tb_pe;
  import prp_pkg::*;
  pe_cfg_t cfg; logic [7:0] a, b, y; logic cin, zin, cout, zout;
  int checks = 0, failures = 0;
  pe #(.B(8)) dut (.*);

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [8:0] s;
      a = 8'($urandom()); b = 8'($urandom()); cin = 1'($urandom()); zin = 1'($urandom());
      // add with carry-in from the left PE
      cfg = '0; cfg.lut = 8'h96; cfg.cin_mode = 2'd2; #1;
      s = 9'(a) + 9'(b) + 9'(cin);
      chk(y == s[7:0] && cout == s[8], $sformatf("add %h+%h+%b -> %h/%b", a, b, cin, y, cout));
      // subtract a-b
      cfg = '0; cfg.lut = 8'h69; cfg.binv = 1; cfg.cin_mode = 2'd1; #1;
      chk(y == 8'(a - b) && cout == (a >= b), $sformatf("sub %h-%h -> %h", a, b, y));
      // AND (indices {a,b,c} = 6,7)
      cfg = '0; cfg.lut = 8'hC0; #1;
      chk(y == (a & b), "and");
      // shifted pass of A
      cfg = '0; cfg.lut = 8'hF0; cfg.shamt = 3'(t % 8); #1;
      chk(y == 8'(a << (t % 8)), "shift left");
      cfg.shr = 1; #1;
      chk(y == (a >> (t % 8)), "shift right");
      // select by zero flag of the left PE: c ? a : b  (indices with c=1 take a)
      cfg = '0; cfg.lut = 8'hE4; cfg.csel = 1; #1;
      chk(y == (zin ? a : b), "select by zero flag");
      // zero detect with chaining
      cfg = '0; cfg.lut = 8'h69; cfg.binv = 1; cfg.cin_mode = 2'd1; cfg.zchain = 1; b = a; #1;
      chk(y == 0 && zout == zin, "zero detect chained");
      cfg.zchain = 0; #1;
      chk(zout == 1'b1, "zero detect");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
