// Configuration cache.
//
// Each line is as wide as one stripe's configuration: 16 PEs x 32 bits = 512
// bits, that is 16 32-bit words.  An application occupies consecutive lines:
// its first line holds the I/O controller configuration word (word 0), the
// following lines its virtual stripes in order.  Configuration packets write
// it one 32-bit word at a time at a word address (line * 16 + word); the
// configuration controller reads a whole line.
//
// The document does not give the number of lines; 64 is this design's choice.
// The read is combinational so that a stripe can be loaded in every fabric
// cycle while the pipeline scrolls; writes take effect at the clock edge.
module config_cache
  import prp_pkg::*;
#(
  parameter int LINES = 64,
  parameter int LINE_BITS = 512,
  localparam int WPL = LINE_BITS / PCI_W,
  localparam int LW  = $clog2(LINES),
  localparam int WW  = $clog2(LINES * WPL)
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [WW-1:0]        waddr,
  input  logic [PCI_W-1:0]     wdata,
  input  logic [LW-1:0]        raddr,
  output logic [LINE_BITS-1:0] rdata
);
  logic [PCI_W-1:0] mem [LINES * WPL];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int w = 0; w < WPL; w++)
      rdata[w*PCI_W +: PCI_W] = mem[int'(raddr) * WPL + w];
  end
endmodule
