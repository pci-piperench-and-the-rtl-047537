// Shared types and constants for the PCI-PipeRench chip.
//
// Geometry follows the document: 16 physical stripes, 16 processing elements
// per stripe, 8-bit PEs, a 128-bit fabric word and a 32-bit PCI word.  The
// packet word layouts, the PE configuration encoding, the I/O controller
// configuration word and the command set between the two clock domains are
// this design's own encodings; the document names the fields but not their
// positions.
package prp_pkg;

  localparam int PCI_W      = 32;   // PCI word
  localparam int FAB_W      = 128;  // fabric input/output word (16 PEs x 8 bits)
  localparam int PE_CFG_W   = 32;   // configuration bits per PE
  localparam int WORDS_PER_LINE = 16; // 32-bit words per cache line (one stripe)
  localparam int WORDS_PER_ROW  = 4;  // 32-bit words per state row (128 bits)

  // Packet types carried by a header (document: 0 data, 1 config, 2 initial state, 3 state dump)
  typedef enum logic [1:0] {
    PKT_DATA   = 2'd0,
    PKT_CONFIG = 2'd1,
    PKT_STATE  = 2'd2,
    PKT_DUMP   = 2'd3
  } pkt_type_e;

  // Header word: [31]=1, [30:29] type, [28:25] chip ID, [24:16] reserved, [15:0] cache line
  typedef struct packed {
    logic        is_header;
    pkt_type_e   ptype;
    logic [3:0]  chip_id;
    logic [8:0]  rsvd;
    logic [15:0] addr;
  } header_t;

  // Marker word: [31]=0, [30] flush bit (0 = drain after this packet), [29:16] reserved, [15:0] size
  typedef struct packed {
    logic        is_header;
    logic        more;      // 1: more packets of this stream follow; 0: drain after this one
    logic [13:0] rsvd;
    logic [15:0] size;
  } marker_t;

  // I/O controller configuration word, word 0 of an application's first cache line
  typedef struct packed {
    logic [11:0] rsvd;
    logic [5:0]  nvstripes;   // number of virtual stripes of the application (1..63)
    logic [1:0]  out_count;   // output: PCI words per fabric word minus one
    logic [1:0]  out_step;    // output: slot step between words
    logic [1:0]  out_start;   // output: first slot
    logic [1:0]  in_count;    // assembly buffer initial shift count
    logic [1:0]  in_shift;    // assembly buffer shift size
    logic [3:0]  in_mask;     // assembly buffer initial mask
  } io_cfg_t;

  // Processing element configuration word
  typedef struct packed {
    logic [2:0] rsvd;
    logic       zchain;   // AND the left PE's zero flag into this PE's zero flag
    logic       csel;     // LUT third input: 0 carry bit, 1 left PE's zero flag
    logic       binv;     // invert B in the carry chain (subtract)
    logic [1:0] cin_mode; // 0: carry in 0, 1: carry in 1, 2: carry out of the left PE
    logic       shr;      // barrel shifter direction on A: 0 left, 1 right
    logic [2:0] shamt;    // barrel shift amount
    logic [7:0] lut;      // 3-input truth table, index {a,b,c}
    logic [5:0] srcb;     // crossbar source of B
    logic [5:0] srca;     // crossbar source of A
  } pe_cfg_t;

  // Crossbar source codes: 0..15 previous stripe registers, 16..31 this stripe's
  // registers, 32..47 this stripe's unregistered results (left PEs only), others zero.

  // Commands from the PCI-domain input controller to the fabric-domain configuration controller
  typedef enum logic [2:0] {
    CMD_CFG_WR   = 3'd0,  // addr = cache word address, data = configuration word
    CMD_STATE_WR = 3'd1,  // addr = state word address, data = state word
    CMD_START    = 3'd2,  // addr = cache line of the application
    CMD_END      = 3'd3,  // data = number of fabric words in the stream; drain
    CMD_DUMP     = 3'd4   // addr = first state row, data = number of 32-bit words
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e     op;
    logic [15:0] addr;
    logic [31:0] data;
  } cmd_t;

  // Output packet request from the input controller to the output controller
  typedef struct packed {
    logic        dump;     // 1: raw state rows, 4 words per row
    logic        more;     // copied into the output marker
    logic [15:0] nwords;   // 32-bit content words in the packet
    logic [1:0]  start;
    logic [1:0]  step;
    logic [1:0]  count;
  } out_job_t;

endpackage
