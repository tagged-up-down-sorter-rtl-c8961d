// tud_control: compare & control logic of a single-stage sorting element.
//
// x selects how the crossbars map the latches: x true puts latch A on the
// left and B on the right, x false the reverse. oldx is the value x had at
// the last operation, so it says which latch held the left record before the
// compare. x is recomputed from the latch contents so that the left record
// ends up on the right (a swap) when its key is smaller than the right key,
// or when it carries a tag (a record that was on the right before must go
// back there, which keeps equal keys in FIFO order):
//
//   x   = ((oldx & A.key == B.key) | A.key > B.key | (~oldx & B.tag))
//         & ~(oldx & A.tag)
//   ac  = (x & insert) | (~x & extract)      latch A loads
//   bc  = (~x & insert) | (x & extract)      latch B loads
//   atc = insert | (~x & extract)            tag bit at loads
//   btc = insert | (x & extract)             tag bit bt loads
//
// These are the published control equations. For the extract-maximum
// variant (EXTRACT_MAX = 1) the key comparison is mirrored, which is this
// design's own way of giving that variant. insert and extract must not be
// asserted together. Purely combinational.
module tud_control #(
  parameter int unsigned KEY_W       = tud_pkg::KEY_W_DEFAULT,
  parameter bit          EXTRACT_MAX = 1'b0
) (
  input  logic [KEY_W-1:0] a_key,
  input  logic             a_tag,
  input  logic [KEY_W-1:0] b_key,
  input  logic             b_tag,
  input  logic             oldx,
  input  logic             insert,
  input  logic             extract,
  output logic             x,
  output logic             ac,
  output logic             bc,
  output logic             atc,
  output logic             btc
);

  logic a_gt_b;  // A sorts behind B ("A.key > B.key" for extract-minimum)
  logic a_eq_b;

  always_comb begin
    a_eq_b = (a_key == b_key);
    a_gt_b = EXTRACT_MAX ? (a_key < b_key) : (a_key > b_key);
    x      = ((oldx && a_eq_b) || a_gt_b || (!oldx && b_tag)) && !(oldx && a_tag);
    ac     = (x && insert) || (!x && extract);
    bc     = (!x && insert) || (x && extract);
    atc    = insert || (!x && extract);
    btc    = insert || (x && extract);
  end

endmodule
