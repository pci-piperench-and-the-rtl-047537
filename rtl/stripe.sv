// One physical PipeRench stripe: N processing elements, their word crossbar,
// their B-bit registers and the stripe's configuration register.
//
// Crossbar: each PE input (A and B) selects, by a 6-bit code in its
// configuration word, one B-bit word:
//   0..15   the registered output of PE k of the previous stripe (or word k of
//           the fabric input bus when this stripe holds the first virtual
//           stripe, take_input = 1);
//   16..31  the registered output of PE k of this stripe (feedback, state);
//   32..47  the unregistered result of PE k of this stripe, only for k to the
//           left of the reading PE (k < i); otherwise, like 48..63, zero.
// The document allows any unregistered output of the stripe; restricting it
// to PEs on the left is this design's choice so that no configuration can
// build a combinational loop.  Carry and zero flags chain left to right.
//
// Timing: when en is high, load = 1 writes the configuration, restores the
// registers from state_in and clears valid (a stripe being configured does
// not compute).  Otherwise, when active, the stripe computes from its source
// word; valid follows the source's valid bit, and the registers take the
// result only for a valid source, so bubbles leave held state untouched.
// result/res_valid are the unregistered outputs of this cycle.
module stripe
  import prp_pkg::*;
#(
  parameter int N = 16,
  parameter int B = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  load,
  input  logic [N*PE_CFG_W-1:0] cfg_in,
  input  logic [N*B-1:0]        state_in,
  input  logic                  active,
  input  logic                  take_input,
  input  logic [N*B-1:0]        in_bus,
  input  logic                  in_valid,
  input  logic [N*B-1:0]        prev_regs,
  input  logic                  prev_valid,
  output logic [N*B-1:0]        regs,
  output logic                  valid,
  output logic [N*B-1:0]        result,
  output logic                  res_valid
);
  pe_cfg_t      cfg [N];
  logic [B-1:0] res [N];
  logic [N*B-1:0] src;
  logic         src_valid;
  // carry/zero run from the left edge (index 0) to the right; the last PE's
  // outputs (index N) have no neighbour to feed and stay unread.
  logic [N:0]   carry, zero;

  assign src       = take_input ? in_bus : prev_regs;
  assign src_valid = take_input ? in_valid : prev_valid;
  assign res_valid = active && src_valid;
  assign carry[0]  = 1'b0;
  assign zero[0]   = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_pe
    logic [B-1:0]   a, b;
    logic [N*B-1:0] left;   // unregistered results of PEs 0..i-1, zero elsewhere

    for (genvar k = 0; k < N; k++) begin : g_left
      if (k < i) begin : g_on
        assign left[k*B +: B] = res[k];
      end else begin : g_off
        assign left[k*B +: B] = '0;
      end
    end

    function automatic logic [B-1:0] pick(logic [5:0] code, logic [N*B-1:0] s,
                                          logic [N*B-1:0] r, logic [N*B-1:0] u);
      int k;
      k = int'(code[3:0]);
      unique case (code[5:4])
        2'd0:    return s[k*B +: B];
        2'd1:    return r[k*B +: B];
        2'd2:    return u[k*B +: B];
        default: return '0;
      endcase
    endfunction

    assign a = pick(cfg[i].srca, src, regs, left);
    assign b = pick(cfg[i].srcb, src, regs, left);

    pe #(.B(B)) u_pe (
      .cfg (cfg[i]),
      .a   (a),
      .b   (b),
      .cin (carry[i]),
      .zin (zero[i]),
      .y   (res[i]),
      .cout(carry[i+1]),
      .zout(zero[i+1])
    );
    assign result[i*B +: B] = res[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cfg[i] <= '0;
      regs  <= '0;
      valid <= 1'b0;
    end else if (en) begin
      if (load) begin
        for (int i = 0; i < N; i++) cfg[i] <= pe_cfg_t'(cfg_in[i*PE_CFG_W +: PE_CFG_W]);
        regs  <= state_in;
        valid <= 1'b0;
      end else if (active) begin
        valid <= src_valid;
        if (src_valid) regs <= result;
      end
    end
  end
endmodule
