// Dual-clock FIFO.
//
// The chip runs its PCI-side logic on the PCI clock and the fabric on a faster
// clock; the document places a FIFO whose two ports run at different clocks at
// each crossing.  This one is the usual Gray-code design: binary pointers
// with one extra wrap bit live in their own domain, their Gray codes cross
// through two-flop synchronizers, and full/empty are computed from the
// synchronized copies, so both flags are conservative.
//
// Interface: write side (wclk, wrst_n, wen, wdata, wfull), read side (rclk,
// rrst_n, ren, rdata, rempty).  rdata shows the head of the queue while
// rempty is low (first-word fall-through); ren pops it.  Pushing when full or
// popping when empty is ignored (and flagged by an assertion).  A word written
// becomes visible on the read side two to three read clocks later.
//
// The assertions disable themselves during reset, so each reset is read both
// as an asynchronous flop reset and by a clocked check; a lint report of that
// (SYNCASYNCNET) is expected and harmless.
//
// DEPTH must be a power of two.  The default of 16 entries is the document's
// rule that the wide FIFOs need only be as deep as there are physical stripes.
module async_fifo #(
  parameter int WIDTH = 128,
  parameter int DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wen && !wfull);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin  <= wbin_nx;
      wgray <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end
  // full: synchronized read pointer equals write pointer with the top two Gray bits inverted
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  logic [AW:0] rbin_nx;
  assign rbin_nx = rbin + (AW+1)'(ren && !rempty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin  <= rbin_nx;
      rgray <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH) else $error("async_fifo: DEPTH must be a power of two >= 4");
  end
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) !(wen && wfull))
    else $warning("async_fifo: push while full ignored");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(ren && rempty))
    else $warning("async_fifo: pop while empty ignored");
endmodule
