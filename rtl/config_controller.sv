// Configuration controller with state memory (fabric clock domain).
//
// It executes the commands the input controller sends across the clock
// boundary and runs the fabric:
//   CFG_WR    write one 32-bit word into the configuration cache;
//   STATE_WR  write one 32-bit word into the state memory (one 128-bit row per
//             cache line: the held register values of the virtual stripe whose
//             configuration is on that line);
//   START     begin an application at a cache line: read its I/O controller
//             configuration word for the number of virtual stripes V;
//   END       the stream holds this many fabric words; once all are taken,
//             drain the pipeline, then store the resident stripes' state;
//   DUMP      push state rows to the output FIFO for a state-dump packet.
//
// Two ways of running, as the document describes for PipeRench:
//   * V <= P (the application fits): virtual stripe v is loaded into physical
//     stripe v, one per cycle, with its state restored; then all V stripes
//     compute every cycle, one fabric word per cycle.
//   * V > P (virtualised): the fabric scrolls down the virtual pipeline.  In
//     every cycle one physical stripe (round robin) is reconfigured with the
//     next virtual stripe (round robin over V), its old state saved and the new
//     one restored, while the other P-1 stripes compute.  A virtual stripe is
//     resident for P cycles, so P-1 words pass per V cycles.
// Whichever stripe holds virtual stripe 0 takes words from the input FIFO;
// the result of the one holding V-1 goes to the output FIFO.
//
// Stall: the whole fabric (and the scrolling) holds while the first stripe
// needs a word and the input FIFO is empty before the end of the stream, or
// while a result is due and the output FIFO is full.  A count of words in
// flight tells when draining is done.  The command set, the state memory
// layout and the cycle-level sequencing are this design's choices; the cache
// and state reads are combinational.
module config_controller
  import prp_pkg::*;
#(
  parameter int P = 16,
  parameter int N = 16,
  parameter int B = 8,
  parameter int CACHE_LINES = 64,
  localparam int SW = (P > 1) ? $clog2(P) : 1,
  localparam int LW = $clog2(CACHE_LINES),
  localparam int WW = $clog2(CACHE_LINES * WORDS_PER_LINE),
  localparam int RW = N * B,
  localparam int CW = N * PE_CFG_W
) (
  input  logic           clk,
  input  logic           rst_n,
  // commands
  input  cmd_t           cmd,
  input  logic           cmd_empty,
  output logic           cmd_pop,
  // input FIFO (read side)
  input  logic           in_empty,
  output logic           in_pop,
  // output FIFO (write side)
  input  logic           out_full,
  output logic           out_push,
  output logic [RW-1:0]  out_data,
  // fabric control
  output logic           f_en,
  output logic [P-1:0]   f_load,
  output logic [P-1:0]   f_active,
  output logic [P-1:0]   f_first,
  output logic [CW-1:0]  f_cfg,
  output logic [RW-1:0]  f_state,
  output logic [SW-1:0]  f_last_sel,
  output logic [SW-1:0]  f_save_sel,
  input  logic [RW-1:0]  f_out_word,
  input  logic           f_out_valid,
  input  logic [RW-1:0]  f_save_word,
  // status
  output logic           busy,
  output logic           stall,
  output logic           swap
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_SAVE, S_DUMP} state_e;
  state_e st;

  // configuration cache
  logic              cc_we;
  logic [WW-1:0]     cc_waddr;
  logic [LW-1:0]     cc_raddr;
  logic [CW-1:0]     cc_rdata;
  config_cache #(.LINES(CACHE_LINES), .LINE_BITS(CW)) u_cache (
    .clk(clk), .we(cc_we), .waddr(cc_waddr), .wdata(cmd.data),
    .raddr(cc_raddr), .rdata(cc_rdata)
  );

  // state memory
  logic [RW-1:0] smem [CACHE_LINES];

  logic [LW-1:0]  app;          // line of the I/O configuration word
  logic [5:0]     nv;           // V
  logic           virt;         // V > P
  logic [5:0]     vs_of [P];    // virtual stripe held by each physical stripe
  logic [P-1:0]   cfgd;         // physical stripe holds a configuration
  logic [SW-1:0]  lp;           // next physical stripe to load
  logic [5:0]     lv;           // next virtual stripe to load
  logic [SW-1:0]  last_p;       // physical stripe holding V-1
  logic           last_ok;
  logic           have_end, drain;
  logic [31:0]    total, in_cnt;
  logic [15:0]    inflight;
  logic [SW-1:0]  sv;           // save / iteration pointer
  logic [LW-1:0]  drow;
  logic [15:0]    drows;

  io_cfg_t io_word;
  logic [LW-1:0] lv_line, save_line;
  logic first_active, res_due;

  assign io_word   = io_cfg_t'(cc_rdata[PCI_W-1:0]);
  assign lv_line   = app + LW'(1) + LW'(lv);
  assign save_line = app + LW'(1) + LW'(vs_of[f_save_sel]);
  assign drain     = have_end && (in_cnt == total);

  // stripes holding virtual stripe 0 read the input bus
  always_comb begin
    for (int p = 0; p < P; p++) f_first[p] = cfgd[p] && (vs_of[p] == 6'd0);
  end

  always_comb begin
    cc_we = 1'b0; cc_waddr = cmd.addr[WW-1:0];
    cc_raddr = lv_line;
    cmd_pop = 1'b0;
    f_en = 1'b0; f_load = '0; f_active = '0;
    f_cfg = cc_rdata; f_state = smem[lv_line];
    f_last_sel = last_p; f_save_sel = lp;
    out_push = 1'b0; out_data = f_out_word;
    in_pop = 1'b0;
    first_active = 1'b0; res_due = 1'b0;
    stall = 1'b0; swap = 1'b0;
    unique case (st)
      S_IDLE: begin
        if (!cmd_empty) begin
          cmd_pop = 1'b1;
          if (cmd.op == CMD_CFG_WR) cc_we = 1'b1;
          if (cmd.op == CMD_START) cc_raddr = cmd.addr[LW-1:0];
        end
      end
      S_LOAD: begin
        f_en = 1'b1;
        f_load[lp] = 1'b1;
        if (!cmd_empty && cmd.op == CMD_END) cmd_pop = 1'b1;
      end
      S_RUN: begin
        if (!cmd_empty && cmd.op == CMD_END) cmd_pop = 1'b1;
        for (int p = 0; p < P; p++) f_active[p] = cfgd[p];
        if (virt) begin
          f_active[lp] = 1'b0;
          f_load[lp]   = 1'b1;
        end
        first_active = |(f_first & f_active);
        res_due = f_out_valid && last_ok && (vs_of[last_p] == nv - 6'd1);
        f_en = !(first_active && in_empty && !drain) && !(res_due && out_full);
        if (!f_en) f_load = '0;
        in_pop   = f_en && first_active && !in_empty;
        out_push = f_en && res_due;
        stall = !f_en;
        swap  = f_en && virt && cfgd[lp];
      end
      S_SAVE: f_save_sel = sv;
      S_DUMP: begin
        out_data = smem[drow];
        out_push = !out_full;
      end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      app <= '0; nv <= 6'd1; virt <= 1'b0;
      for (int p = 0; p < P; p++) vs_of[p] <= '0;
      cfgd <= '0; lp <= '0; lv <= '0; last_p <= '0; last_ok <= 1'b0;
      have_end <= 1'b0; total <= '0; in_cnt <= '0; inflight <= '0;
      sv <= '0; drow <= '0; drows <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (!cmd_empty) begin
          unique case (cmd.op)
            CMD_STATE_WR:
              smem[cmd.addr[LW+1:2]][cmd.addr[1:0]*PCI_W +: PCI_W] <= cmd.data;
            CMD_START: begin
              app  <= cmd.addr[LW-1:0];
              nv   <= (io_word.nvstripes == 6'd0) ? 6'd1 : io_word.nvstripes;
              virt <= (int'(io_word.nvstripes) > P);
              lp <= '0; lv <= '0; cfgd <= '0; last_ok <= 1'b0;
              have_end <= 1'b0; in_cnt <= '0; inflight <= '0;
              // a virtualised application fills the fabric while it runs
              st <= (int'(io_word.nvstripes) > P) ? S_RUN : S_LOAD;
            end
            CMD_DUMP: begin
              drow  <= cmd.addr[LW-1:0];
              drows <= 16'((cmd.data + 32'd3) >> 2);
              if (cmd.data != 0) st <= S_DUMP;
            end
            default: ;
          endcase
        end
        S_LOAD: begin
          // (V <= P only) load virtual stripe lv into physical stripe lp = lv
          vs_of[lp] <= lv;
          cfgd[lp]  <= 1'b1;
          if (lv == nv - 6'd1) begin
            last_p <= lp; last_ok <= 1'b1;
          end
          if (lv == nv - 6'd1) begin
            st <= S_RUN;
          end else begin
            lv <= lv + 6'd1;
            lp <= lp + SW'(1);
          end
          if (cmd_pop) begin have_end <= 1'b1; total <= cmd.data; end
        end
        S_RUN: begin
          if (cmd_pop) begin have_end <= 1'b1; total <= cmd.data; end
          if (in_pop) in_cnt <= in_cnt + 32'd1;
          inflight <= inflight + 16'(in_pop) - 16'(out_push);
          if (f_en && virt) begin
            // save the swapped-out stripe, restore the incoming one (the
            // restore itself happens in the stripe, through f_state)
            if (cfgd[lp]) smem[save_line] <= f_save_word;
            vs_of[lp] <= lv;
            cfgd[lp]  <= 1'b1;
            if (lv == nv - 6'd1) begin last_p <= lp; last_ok <= 1'b1; end
            lv <= (lv == nv - 6'd1) ? 6'd0 : lv + 6'd1;
            lp <= (int'(lp) == P - 1) ? '0 : lp + SW'(1);
          end
          if (drain && inflight == 16'(out_push) && !in_pop) begin
            st <= S_SAVE;
            sv <= '0;
          end
        end
        S_SAVE: begin
          if (cfgd[sv]) smem[save_line] <= f_save_word;
          if (int'(sv) == P - 1) begin
            st <= S_IDLE;
            cfgd <= '0;
          end else sv <= sv + SW'(1);
        end
        S_DUMP: if (!out_full) begin
          drow  <= drow + LW'(1);
          drows <= drows - 16'd1;
          if (drows == 16'd1) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
