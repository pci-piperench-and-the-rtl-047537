// Input controller (PCI clock domain): decodes the incoming packet stream and
// provides central control for the chip.
//
// Every packet starts with a 32-bit marker, optionally preceded by a 32-bit
// header (bit 31 tells which).  Behaviour, following the document:
//   * A header whose chip ID is not zero is for a chip further down the
//     chain: it is passed on with the chip ID decremented.
//   * A header with chip ID zero is kept.  A data header starts the
//     application at its cache line and stays active until a packet whose
//     flush bit is 0 ("drain after this packet"); a configuration,
//     initial-state or state-dump header applies to the next marker only.
//   * A marker with no header held is a bare packet for another chip: marker
//     and content words pass through untouched.
//   * Configuration words are written into the configuration cache from the
//     header's line on (16 words per line); initial-state words into the state
//     memory (4 words per row); a state-dump marker asks for "size" words.
//   * Data words go to the assembly buffer.  For each data packet an output
//     packet is requested whose length is the input length divided by the
//     PCI words per fabric word and multiplied by the output words per fabric
//     word, both taken from the application's I/O configuration word.
//   * After a packet with flush bit 0 the controller sends END with the number
//     of fabric words of the stream, which makes the fabric drain.
// The I/O configuration word is word 0 of the application's first line; this
// controller keeps its own copy of word 0 of every line, captured as
// configuration packets pass.  Field positions (prp_pkg) are this design's.
//
// Interface: valid/ready word stream in; commands (cmd_t) to a dual-clock
// FIFO; pattern and words to the assembly buffer; output-packet requests to
// the output controller; pass-through words to the output controller.  One
// word per clock at most; a word waits while its destination is full.
module input_controller
  import prp_pkg::*;
#(
  parameter int CACHE_LINES = 64,
  localparam int LW = $clog2(CACHE_LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PCI_W-1:0]  in_data,
  input  logic              in_valid,
  output logic              in_ready,
  // commands to the fabric domain
  output cmd_t              cmd,
  output logic              cmd_push,
  input  logic              cmd_full,
  // assembly buffer
  output logic              ab_load,
  output logic [3:0]        ab_mask,
  output logic [1:0]        ab_shift,
  output logic [1:0]        ab_count,
  output logic [PCI_W-1:0]  ab_word,
  output logic              ab_valid,
  input  logic              ab_ready,
  // output controller
  output out_job_t          job,
  output logic              job_push,
  input  logic              job_ready,
  output logic [PCI_W-1:0]  pt_data,
  output logic              pt_valid,
  input  logic              pt_ready,
  // status
  output logic              hdr_active
);
  typedef enum logic [1:0] {S_WORD, S_BODY, S_END} state_e;
  typedef enum logic [1:0] {K_CFG, K_STATE, K_DATA, K_PASS} kind_e;

  state_e    st;
  kind_e     kind;
  logic      pend;          // configuration / state / dump header held
  pkt_type_e pend_type;
  logic [15:0] hdr_addr;
  logic      data_act;
  logic      more_q;
  logic [15:0] left, wcnt;
  logic [31:0] stream_cnt;
  io_cfg_t   io_tab [CACHE_LINES];
  io_cfg_t   app_io;

  header_t h;
  marker_t m;
  assign h = header_t'(in_data);
  assign m = marker_t'(in_data);

  // output packet length for a data packet of m.size words
  logic [15:0] nfab, nout;
  always_comb begin
    nfab = m.size / (16'(app_io.in_count) + 16'd1);
    nout = nfab * (16'(app_io.out_count) + 16'd1);
  end

  assign ab_mask  = app_io.in_mask;
  assign ab_shift = app_io.in_shift;
  assign ab_count = app_io.in_count;
  assign ab_word  = in_data;
  assign hdr_active = data_act;

  logic fire;
  assign fire = in_valid && in_ready;

  always_comb begin
    in_ready = 1'b0;
    cmd = '0; cmd_push = 1'b0;
    ab_valid = 1'b0; ab_load = 1'b0;
    job = '0; job_push = 1'b0;
    pt_data = in_data; pt_valid = 1'b0;
    unique case (st)
      S_WORD: if (in_valid) begin
        if (h.is_header) begin
          if (h.chip_id != 4'd0) begin
            pt_data  = {h.is_header, h.ptype, h.chip_id - 4'd1, h.rsvd, h.addr};
            pt_valid = 1'b1;
            in_ready = pt_ready;
          end else if (h.ptype == PKT_DATA) begin
            cmd.op = CMD_START; cmd.addr = h.addr;
            cmd_push = !cmd_full;
            in_ready = !cmd_full;
          end else begin
            in_ready = 1'b1;
          end
        end else if (data_act) begin
          job.more = m.more; job.nwords = nout;
          job.start = app_io.out_start; job.step = app_io.out_step; job.count = app_io.out_count;
          job_push = job_ready;
          in_ready = job_ready;
        end else if (pend && pend_type == PKT_DUMP) begin
          cmd.op = CMD_DUMP; cmd.addr = hdr_addr; cmd.data = 32'(m.size);
          job.dump = 1'b1; job.more = m.more; job.nwords = m.size;
          cmd_push = job_ready && !cmd_full;
          job_push = job_ready && !cmd_full;
          in_ready = job_ready && !cmd_full;
        end else if (pend) begin
          in_ready = 1'b1;
        end else begin
          pt_valid = 1'b1;
          in_ready = pt_ready;
        end
      end
      S_BODY: begin
        unique case (kind)
          K_CFG: begin
            cmd.op = CMD_CFG_WR; cmd.addr = 16'(hdr_addr * 16'(WORDS_PER_LINE)) + wcnt; cmd.data = in_data;
            cmd_push = in_valid && !cmd_full;
            in_ready = !cmd_full;
          end
          K_STATE: begin
            cmd.op = CMD_STATE_WR; cmd.addr = 16'(hdr_addr * 16'(WORDS_PER_ROW)) + wcnt; cmd.data = in_data;
            cmd_push = in_valid && !cmd_full;
            in_ready = !cmd_full;
          end
          K_DATA: begin
            ab_valid = in_valid;
            in_ready = ab_ready;
          end
          default: begin
            pt_valid = in_valid;
            in_ready = pt_ready;
          end
        endcase
      end
      S_END: begin
        cmd.op = CMD_END; cmd.data = stream_cnt;
        cmd_push = !cmd_full;
      end
      default: ;
    endcase
    if (st == S_WORD && fire && h.is_header && h.chip_id == 4'd0 && h.ptype == PKT_DATA)
      ab_load = 1'b1;  // pattern comes from the table entry, see app_io below
  end

  // the assembly buffer must see the new application's pattern when it loads
  logic [LW-1:0] io_idx;
  assign io_idx = (st == S_WORD && h.is_header) ? h.addr[LW-1:0] : hdr_addr[LW-1:0];
  assign app_io = io_tab[io_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_WORD; kind <= K_PASS;
      pend <= 1'b0; pend_type <= PKT_DATA; hdr_addr <= '0;
      data_act <= 1'b0; more_q <= 1'b0;
      left <= '0; wcnt <= '0; stream_cnt <= '0;
      for (int i = 0; i < CACHE_LINES; i++) io_tab[i] <= '0;
    end else begin
      unique case (st)
        S_WORD: if (fire) begin
          if (h.is_header) begin
            if (h.chip_id == 4'd0) begin
              hdr_addr <= h.addr;
              if (h.ptype == PKT_DATA) begin
                data_act <= 1'b1; pend <= 1'b0; stream_cnt <= '0;
              end else begin
                pend <= 1'b1; pend_type <= h.ptype;
              end
            end
          end else begin
            left <= m.size; wcnt <= '0; more_q <= m.more;
            if (data_act) begin
              kind <= K_DATA;
              stream_cnt <= stream_cnt + 32'(nfab);
              if (m.size != 0) st <= S_BODY;
              else if (!m.more) st <= S_END;
            end else if (pend) begin
              kind <= (pend_type == PKT_STATE) ? K_STATE : K_CFG;
              if (pend_type == PKT_DUMP || m.size == 0) pend <= 1'b0;
              else st <= S_BODY;
            end else begin
              kind <= K_PASS;
              if (m.size != 0) st <= S_BODY;
            end
          end
        end
        S_BODY: if (fire) begin
          if (kind == K_CFG && wcnt[3:0] == 4'd0)
            io_tab[LW'(hdr_addr) + LW'(wcnt >> 4)] <= io_cfg_t'(in_data);
          wcnt <= wcnt + 16'd1;
          left <= left - 16'd1;
          if (left == 16'd1) begin
            if (kind == K_CFG || kind == K_STATE) pend <= 1'b0;
            st <= (kind == K_DATA && !more_q) ? S_END : S_WORD;
          end
        end
        S_END: if (!cmd_full) begin
          data_act <= 1'b0;
          st <= S_WORD;
        end
        default: st <= S_WORD;
      endcase
    end
  end
endmodule
