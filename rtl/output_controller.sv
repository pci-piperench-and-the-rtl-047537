// Output controller (PCI clock domain): turns fabric results into output
// packets and merges them with packets passing through to other chips.
//
// The input controller queues one request per output packet (out_job_t).
// For each request the controller first sends a marker (bare packet: no
// header) carrying the packet length and the flush bit of the input packet,
// then the content words.  For a data packet each 128-bit entry of the output
// FIFO is cut into 32-bit words by a pattern like the assembly buffer's, in
// reverse: start slot, slot step and word count (count+1 words per entry,
// slots start, start+step, ... modulo 4).  For a state dump each 128-bit row
// gives words from slot 0 to 3; the last row may be cut short.  Copying the
// flush bit into the output marker lets the next chip of a chain drain as
// well; that, and the pattern encoding, are this design's choices.
//
// Pass-through words are taken only while no output packet is requested or
// in progress, so packets are never interleaved.
//
// Timing: one output word per clock when out_ready is high.  The request
// queue holds JOBS entries.
module output_controller
  import prp_pkg::*;
#(
  parameter int JOBS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  out_job_t          job,
  input  logic              job_push,
  output logic              job_ready,
  input  logic [FAB_W-1:0]  of_data,
  input  logic              of_empty,
  output logic              of_pop,
  input  logic [PCI_W-1:0]  pt_data,
  input  logic              pt_valid,
  output logic              pt_ready,
  output logic [PCI_W-1:0]  out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              busy
);
  localparam int JW = $clog2(JOBS);

  // request queue
  out_job_t        q [JOBS];
  logic [JW:0]     q_wp, q_rp;
  logic            q_empty, q_full, q_pop;
  assign q_empty   = (q_wp == q_rp);
  assign q_full    = (q_wp[JW-1:0] == q_rp[JW-1:0]) && (q_wp[JW] != q_rp[JW]);
  assign job_ready = !q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wp <= '0; q_rp <= '0;
    end else begin
      if (job_push && !q_full) begin
        q[q_wp[JW-1:0]] <= job;
        q_wp <= q_wp + 1'b1;
      end
      if (q_pop) q_rp <= q_rp + 1'b1;
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_MARK, S_BODY} state_e;
  state_e   st;
  out_job_t cur;
  logic [1:0]  slot, cnt;
  logic [15:0] left;
  marker_t     mk;

  always_comb begin
    mk = '0;
    mk.more = cur.more;
    mk.size = cur.nwords;
    q_pop = 1'b0; of_pop = 1'b0; pt_ready = 1'b0;
    out_valid = 1'b0; out_data = of_data[slot*PCI_W +: PCI_W];
    unique case (st)
      S_IDLE: begin
        if (!q_empty) q_pop = 1'b1;
        else begin
          out_data  = pt_data;
          out_valid = pt_valid;
          pt_ready  = out_ready;
        end
      end
      S_MARK: begin
        out_data  = mk;
        out_valid = 1'b1;
      end
      S_BODY: begin
        out_valid = !of_empty;
        if (out_ready && !of_empty)
          of_pop = (left == 16'd1) || (cur.dump ? (slot == 2'd3) : (cnt == 2'd0));
      end
      default: ;
    endcase
  end

  assign busy = (st != S_IDLE) || !q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0; slot <= '0; cnt <= '0; left <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (q_pop) begin
          cur <= q[q_rp[JW-1:0]];
          st  <= S_MARK;
        end
        S_MARK: if (out_ready) begin
          left <= cur.nwords;
          slot <= cur.dump ? 2'd0 : cur.start;
          cnt  <= cur.dump ? 2'd3 : cur.count;
          st   <= (cur.nwords == 16'd0) ? S_IDLE : S_BODY;
        end
        S_BODY: if (out_ready && !of_empty) begin
          left <= left - 16'd1;
          if (left == 16'd1) st <= S_IDLE;
          if (cur.dump) slot <= slot + 2'd1;
          else if (cnt == 2'd0) begin
            slot <= cur.start;
            cnt  <= cur.count;
          end else begin
            slot <= slot + cur.step;
            cnt  <= cnt - 2'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
