// Assembly buffer: builds one 128-bit fabric input word from one to four
// 32-bit PCI words.
//
// The 128-bit buffer is four 32-bit slots; slot i is bits [32i+31:32i].  A
// pattern of three fields is loaded from the application's I/O controller
// configuration word: an initial 4-bit mask, a 2-bit shift size and a 2-bit
// initial shift count.  Each accepted PCI word is written into every slot
// whose mask bit is 1 (a mask with several ones copies the word into several
// slots).  If the shift count is above zero the mask is shifted left by the
// shift size and the count decremented; when the count is zero the word is
// complete, it is pushed to the input FIFO and mask and count return to their
// initial values.  This is the document's mechanism; the slot numbering and
// the choice that unwritten slots keep their old contents are this design's.
//
// Timing: one PCI word per PCI clock.  out_valid/out_word are combinational:
// the push happens in the same cycle as the completing word is accepted, with
// that word already merged in, so a one-word pattern runs at full rate.
// in_ready is low while the input FIFO reports full.
module assembly_buffer
  import prp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic [3:0]        cfg_mask,
  input  logic [1:0]        cfg_shift,
  input  logic [1:0]        cfg_count,
  input  logic [PCI_W-1:0]  in_word,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [FAB_W-1:0]  out_word,
  output logic              out_valid,
  input  logic              out_full
);
  logic [3:0] init_mask, mask;
  logic [1:0] shift, init_count, count;
  logic [FAB_W-1:0] buf_q;

  logic accept;
  assign in_ready = !out_full;
  assign accept   = in_valid && in_ready && !cfg_load;
  assign out_valid = accept && (count == 2'd0);
  always_comb begin
    out_word = buf_q;
    for (int s = 0; s < 4; s++)
      if (mask[s]) out_word[s*PCI_W +: PCI_W] = in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_mask <= 4'b0001; mask <= 4'b0001;
      shift <= 2'd1; init_count <= 2'd3; count <= 2'd3;
      buf_q <= '0;
    end else begin
      if (cfg_load) begin
        init_mask <= cfg_mask;  mask  <= cfg_mask;
        shift     <= cfg_shift;
        init_count <= cfg_count; count <= cfg_count;
      end else if (accept) begin
        buf_q <= out_word;
        if (count != 2'd0) begin
          mask  <= mask << shift;
          count <= count - 2'd1;
        end else begin
          mask  <= init_mask;
          count <= init_count;
        end
      end
    end
  end
endmodule
