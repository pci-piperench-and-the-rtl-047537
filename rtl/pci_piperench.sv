// PCI-PipeRench: a PipeRench pipeline-reconfigurable fabric packaged as a
// coprocessor that talks to its host only through a stream of 32-bit packet
// words (from and to the card's 32-bit FIFOs next to the PCI interface chip).
//
// Structure, as in the document:
//   PCI clock domain  : input controller (packet decode, chip-ID routing,
//                       pass-through), assembly buffer (1-4 PCI words -> one
//                       128-bit word), output controller (output packets).
//   dual-clock FIFOs  : 128-bit input FIFO and 128-bit output FIFO, each as
//                       deep as the fabric has physical stripes; plus a small
//                       command FIFO (this design's) carrying configuration
//                       and state writes, start, end-of-stream and dump.
//   fabric domain     : configuration controller with configuration cache and
//                       state memory; the fabric of P stripes of N B-bit PEs.
// Chips chain by wiring out_* of one to in_* of the next; headers with a
// non-zero chip ID and bare packets without a held header pass through.
//
// Interface: pci_clk/pci_rst_n and pipe_clk/pipe_rst_n (asynchronous,
// active-low; release both before sending packets); in_data/in_valid/in_ready
// and out_data/out_valid/out_ready are valid/ready word streams in the PCI
// domain.  busy is high while anything is still being processed.
// fab_stall and fab_swap are fabric-domain status flags for monitoring: the
// fabric is held this cycle, and a stripe is being reconfigured this cycle.
//
// Lint notes: both resets are used asynchronously by the flops and
// synchronously by the disable-iff clauses of the FIFO assertions; the lint
// report of a reset used both ways (SYNCASYNCNET) is therefore intended.  Reserved bits of the
// packed header, marker, I/O and PE words are left unread on purpose.
module pci_piperench
  import prp_pkg::*;
#(
  parameter int P_STRIPES   = 16,
  parameter int N_PES       = 16,
  parameter int B_BITS      = 8,
  parameter int CACHE_LINES = 64,
  parameter int FIFO_DEPTH  = 16,
  localparam int SW = (P_STRIPES > 1) ? $clog2(P_STRIPES) : 1
) (
  input  logic              pci_clk,
  input  logic              pci_rst_n,
  input  logic              pipe_clk,
  input  logic              pipe_rst_n,
  input  logic [PCI_W-1:0]  in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [PCI_W-1:0]  out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              busy,
  output logic              fab_stall,
  output logic              fab_swap
);
  initial assert (N_PES * B_BITS == FAB_W) else $error("pci_piperench: N_PES*B_BITS must be 128");

  // ---------------- PCI domain ----------------
  cmd_t cmd_w;
  logic cmd_push, cmd_full;
  logic ab_load, ab_valid, ab_ready;
  logic [3:0] ab_mask; logic [1:0] ab_shift, ab_count;
  logic [PCI_W-1:0] ab_word;
  out_job_t job; logic job_push, job_ready;
  logic [PCI_W-1:0] pt_data; logic pt_valid, pt_ready;
  logic hdr_active, oc_busy;
  logic [FAB_W-1:0] asm_word; logic asm_push, if_full;
  logic [FAB_W-1:0] of_rdata; logic of_empty, of_pop;

  input_controller #(.CACHE_LINES(CACHE_LINES)) u_inctl (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .cmd(cmd_w), .cmd_push(cmd_push), .cmd_full(cmd_full),
    .ab_load(ab_load), .ab_mask(ab_mask), .ab_shift(ab_shift), .ab_count(ab_count),
    .ab_word(ab_word), .ab_valid(ab_valid), .ab_ready(ab_ready),
    .job(job), .job_push(job_push), .job_ready(job_ready),
    .pt_data(pt_data), .pt_valid(pt_valid), .pt_ready(pt_ready),
    .hdr_active(hdr_active)
  );

  assembly_buffer u_asm (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .cfg_load(ab_load), .cfg_mask(ab_mask), .cfg_shift(ab_shift), .cfg_count(ab_count),
    .in_word(ab_word), .in_valid(ab_valid), .in_ready(ab_ready),
    .out_word(asm_word), .out_valid(asm_push), .out_full(if_full)
  );

  output_controller u_outctl (
    .clk(pci_clk), .rst_n(pci_rst_n),
    .job(job), .job_push(job_push), .job_ready(job_ready),
    .of_data(of_rdata), .of_empty(of_empty), .of_pop(of_pop),
    .pt_data(pt_data), .pt_valid(pt_valid), .pt_ready(pt_ready),
    .out_data(out_data), .out_valid(out_valid), .out_ready(out_ready),
    .busy(oc_busy)
  );

  // ---------------- clock-domain crossings ----------------
  cmd_t cmd_r; logic cmd_empty, cmd_pop;
  logic [FAB_W-1:0] if_rdata; logic if_empty, if_pop;
  logic [FAB_W-1:0] of_wdata; logic of_push, of_full;

  async_fifo #(.WIDTH($bits(cmd_t)), .DEPTH(8)) u_cmd_fifo (
    .wclk(pci_clk), .wrst_n(pci_rst_n), .wen(cmd_push), .wdata(cmd_w), .wfull(cmd_full),
    .rclk(pipe_clk), .rrst_n(pipe_rst_n), .ren(cmd_pop), .rdata(cmd_r), .rempty(cmd_empty)
  );
  async_fifo #(.WIDTH(FAB_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .wclk(pci_clk), .wrst_n(pci_rst_n), .wen(asm_push), .wdata(asm_word), .wfull(if_full),
    .rclk(pipe_clk), .rrst_n(pipe_rst_n), .ren(if_pop), .rdata(if_rdata), .rempty(if_empty)
  );
  async_fifo #(.WIDTH(FAB_W), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .wclk(pipe_clk), .wrst_n(pipe_rst_n), .wen(of_push), .wdata(of_wdata), .wfull(of_full),
    .rclk(pci_clk), .rrst_n(pci_rst_n), .ren(of_pop), .rdata(of_rdata), .rempty(of_empty)
  );

  // ---------------- fabric domain ----------------
  logic f_en, f_out_valid;
  logic [P_STRIPES-1:0] f_load, f_active, f_first;
  logic [N_PES*PE_CFG_W-1:0] f_cfg;
  logic [FAB_W-1:0] f_state, f_out_word, f_save_word;
  logic [SW-1:0] f_last_sel, f_save_sel;
  logic cc_busy, cc_stall, cc_swap;

  config_controller #(.P(P_STRIPES), .N(N_PES), .B(B_BITS), .CACHE_LINES(CACHE_LINES)) u_cfgctl (
    .clk(pipe_clk), .rst_n(pipe_rst_n),
    .cmd(cmd_r), .cmd_empty(cmd_empty), .cmd_pop(cmd_pop),
    .in_empty(if_empty), .in_pop(if_pop),
    .out_full(of_full), .out_push(of_push), .out_data(of_wdata),
    .f_en(f_en), .f_load(f_load), .f_active(f_active), .f_first(f_first),
    .f_cfg(f_cfg), .f_state(f_state), .f_last_sel(f_last_sel), .f_save_sel(f_save_sel),
    .f_out_word(f_out_word), .f_out_valid(f_out_valid), .f_save_word(f_save_word),
    .busy(cc_busy), .stall(cc_stall), .swap(cc_swap)
  );

  fabric #(.P(P_STRIPES), .N(N_PES), .B(B_BITS)) u_fabric (
    .clk(pipe_clk), .rst_n(pipe_rst_n), .en(f_en),
    .load(f_load), .active(f_active), .first(f_first),
    .cfg_in(f_cfg), .state_in(f_state),
    .in_word(if_rdata), .in_valid(!if_empty),
    .last_sel(f_last_sel), .out_word(f_out_word), .out_valid(f_out_valid),
    .save_sel(f_save_sel), .save_word(f_save_word)
  );

  // busy: a coarse status, mixing domains (for monitoring only)
  assign fab_stall = cc_stall;
  assign fab_swap  = cc_swap;
  assign busy = hdr_active || oc_busy || cc_busy || !cmd_empty || !if_empty || !of_empty;
endmodule
