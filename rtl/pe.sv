// PipeRench processing element (combinational part).
//
// A PE is, as in the document, a barrel shifter, a 3-input lookup table
// replicated B bits wide, and carry and zero-detect logic; its B-bit register
// lives in the enclosing stripe.  The encoding of the configuration word
// (prp_pkg::pe_cfg_t) is this design's own:
//   * operand A passes the barrel shifter (logical, left or right, 0..7 bits);
//   * bit k of the result is lut[{a[k], b[k], c[k]}], where c[k] is either
//     the carry into bit k or the zero flag of the PE to the left;
//   * the carry chain is a ripple majority chain over A and B (B optionally
//     inverted, for subtraction); its carry-in is 0, 1 or the left PE's
//     carry-out, so neighbouring PEs chain into wider words;
//   * zout is 1 when the result is zero, ANDed with the left PE's flag when
//     zchain is set, so wide words get one zero flag.
// With lut = 8'h96 the PE adds, with lut = 8'h69, binv = 1 and carry-in 1 it
// subtracts A - B.  Purely combinational.  The operand-select fields and
// the reserved top bits of the configuration word are decoded elsewhere (by
// the stripe's crossbar) or not at all, so the PE leaves them unread.
module pe
  import prp_pkg::*;
#(
  parameter int B = 8
) (
  input  pe_cfg_t      cfg,
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  input  logic         cin,
  input  logic         zin,
  output logic [B-1:0] y,
  output logic         cout,
  output logic         zout
);
  logic [B-1:0] as, bc;
  logic [B-1:0] carry;   // carry into each bit
  logic         cy;

  always_comb begin
    as = cfg.shr ? (a >> cfg.shamt) : (a << cfg.shamt);
    bc = cfg.binv ? ~b : b;
    unique case (cfg.cin_mode)
      2'd1:    cy = 1'b1;
      2'd2:    cy = cin;
      default: cy = 1'b0;
    endcase
    for (int k = 0; k < B; k++) begin
      carry[k] = cy;
      cy = (as[k] & bc[k]) | (as[k] & cy) | (bc[k] & cy);
    end
    for (int k = 0; k < B; k++)
      y[k] = cfg.lut[{as[k], b[k], cfg.csel ? zin : carry[k]}];
    cout = cy;
    zout = (y == '0) && (cfg.zchain ? zin : 1'b1);
  end
endmodule
