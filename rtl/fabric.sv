// PipeRench fabric: P physical stripes in a ring.
//
// Physical stripe p reads the registers of stripe p-1 (stripe 0 reads stripe
// P-1), so a virtual pipeline longer than the fabric can scroll round the ring
// while one stripe at a time is reconfigured.  A stripe flagged first[p]
// holds the first virtual stripe and reads the 128-bit input bus instead.
// All per-stripe control (load, active, first) and the choice of which
// stripe's result is the pipeline output (last_sel) come from the
// configuration controller; the same configuration line and restored state
// row are offered to every stripe and taken by the one whose load bit is set.
//
// Timing: everything advances only when en is high (the stall).  out_word /
// out_valid are the unregistered result of the stripe holding the last
// virtual stripe in this cycle.  save_word shows the registers of stripe
// save_sel, for the controller to store on swap-out.  The ring and the
// separate last-stripe output are this design's reading of the document's
// "scrolling" description.
module fabric
  import prp_pkg::*;
#(
  parameter int P = 16,
  parameter int N = 16,
  parameter int B = 8,
  localparam int SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [P-1:0]          load,
  input  logic [P-1:0]          active,
  input  logic [P-1:0]          first,
  input  logic [N*PE_CFG_W-1:0] cfg_in,
  input  logic [N*B-1:0]        state_in,
  input  logic [N*B-1:0]        in_word,
  input  logic                  in_valid,
  input  logic [SW-1:0]         last_sel,
  output logic [N*B-1:0]        out_word,
  output logic                  out_valid,
  input  logic [SW-1:0]         save_sel,
  output logic [N*B-1:0]        save_word
);
  logic [N*B-1:0] regs   [P];
  logic [N*B-1:0] result [P];
  logic [P-1:0]   valid, res_valid;

  for (genvar p = 0; p < P; p++) begin : g_stripe
    localparam int PREV = (p + P - 1) % P;
    stripe #(.N(N), .B(B)) u_stripe (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .load      (load[p]),
      .cfg_in    (cfg_in),
      .state_in  (state_in),
      .active    (active[p]),
      .take_input(first[p]),
      .in_bus    (in_word),
      .in_valid  (in_valid),
      .prev_regs (regs[PREV]),
      .prev_valid(valid[PREV]),
      .regs      (regs[p]),
      .valid     (valid[p]),
      .result    (result[p]),
      .res_valid (res_valid[p])
    );
  end

  assign out_word  = result[last_sel];
  assign out_valid = res_valid[last_sel];
  assign save_word = regs[save_sel];
endmodule
