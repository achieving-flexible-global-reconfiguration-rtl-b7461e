// f_comparator: one cell of the F arbiter.
//
// The cells of an F arbiter form a chain along one row (or column) of
// candidate reconfiguration points. The chain value c is the largest traffic
// volume f seen so far among the enabled points. A cell whose point is
// enabled and whose f is larger than c sets d = 1 and passes its own f on;
// otherwise it passes c on unchanged. This is the rule printed with the
// arbiter's figure: d = en & (f > c), c_next = en ? max(f, c) : c.
// The chain also carries c_valid, which is this design's addition: it is 0
// until some enabled point has been seen, and a cell with c_valid = 0 wins
// even when its f is 0, so that a row or column with no traffic can still be
// matched (the allocation is meant to match every row and column). Ties keep
// the earlier cell. Purely combinational.
module f_comparator #(
  parameter int unsigned F_W = 16
) (
  input  logic [F_W-1:0] f,         // traffic volume of this point
  input  logic           en,        // point takes part in this arbitration
  input  logic [F_W-1:0] c_in,      // largest f before this cell
  input  logic           c_valid_in,// some enabled point before this cell
  output logic           d,         // this point is the largest so far
  output logic [F_W-1:0] c_out,
  output logic           c_valid_out
);
  always_comb begin
    d           = en && (!c_valid_in || (f > c_in));
    c_out       = d ? f : c_in;
    c_valid_out = c_valid_in || en;
  end
endmodule
