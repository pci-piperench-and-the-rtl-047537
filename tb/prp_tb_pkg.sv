// Helpers shared by the PCI-PipeRench testbenches: packet-word builders and
// a few stripe configurations with easily predicted results.
//   inc stripe : every PE adds 1 to its byte of the previous stripe (A = word i,
//                B = zero, carry-in 1, LUT = sum)
//   acc stripe : every PE adds its byte of the previous stripe to its own
//                register (a running sum per byte; the register is state)
package prp_tb_pkg;
  import prp_pkg::*;

  function automatic logic [31:0] hdr(pkt_type_e t, int chip, int addr);
    header_t h;
    h = '0; h.is_header = 1'b1; h.ptype = t; h.chip_id = 4'(chip); h.addr = 16'(addr);
    return h;
  endfunction

  function automatic logic [31:0] mrk(int size, bit more);
    marker_t m;
    m = '0; m.more = more; m.size = 16'(size);
    return m;
  endfunction

  function automatic logic [31:0] iocfg(int mask, int shft, int cnt, int ostart, int ostep, int ocnt, int nv);
    io_cfg_t c;
    c = '0; c.in_mask = 4'(mask); c.in_shift = 2'(shft); c.in_count = 2'(cnt);
    c.out_start = 2'(ostart); c.out_step = 2'(ostep); c.out_count = 2'(ocnt); c.nvstripes = 6'(nv);
    return c;
  endfunction

  function automatic pe_cfg_t pe_inc(int i);
    pe_cfg_t c;
    c = '0; c.srca = 6'(i); c.srcb = 6'd48; c.lut = 8'h96; c.cin_mode = 2'd1;
    return c;
  endfunction

  function automatic pe_cfg_t pe_acc(int i);
    pe_cfg_t c;
    c = '0; c.srca = 6'(i); c.srcb = 6'(16 + i); c.lut = 8'h96; c.cin_mode = 2'd0;
    return c;
  endfunction

  function automatic logic [511:0] line_inc();
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = pe_inc(i);
    return l;
  endfunction

  function automatic logic [511:0] line_acc();
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = pe_acc(i);
    return l;
  endfunction

  // add k to every byte of a 128-bit word
  function automatic logic [127:0] add_bytes(logic [127:0] w, int k);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[i*8 +: 8] = w[i*8 +: 8] + 8'(k);
    return r;
  endfunction

  function automatic logic [127:0] sum_bytes(logic [127:0] x, logic [127:0] y);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[i*8 +: 8] = x[i*8 +: 8] + y[i*8 +: 8];
    return r;
  endfunction
endpackage
