// tud_element: one single-stage tagged up/down sorting element.
//
// An element holds two records, one "left" and one "right", in latches A and
// B, each with a tag bit (at, bt). It talks to its neighbours through four
// record buses: the left record comes in from above (l_in) and the current
// left record goes down (l_out); the right record comes up from below (r_in)
// and the current right record goes up (r_out). The right output of the
// first element is the queue output.
//
// Which latch is "left" is not fixed. A crossbar in front of the latches and
// another behind them are both steered by x (from tud_control): x true means
// A is left and B is right, x false the reverse. After each operation x is
// recomputed from the new latch contents, so the compare-and-swap of the
// algorithm takes effect in the same cycle by remapping, without moving data.
//
//   insert : the left latch loads l_in (the record from above); the record it
//            held is on l_out at the same time and is loaded by the element
//            below. The right latch keeps its record but has its tag set.
//   extract: the right latch loads r_in (the right record of the element
//            below), with its tag set; its old record is on r_out and is
//            taken by the element above (or leaves the queue).
//
// A record is tagged when it is written into the right-hand latch, through
// the OR gate in front of each tag bit (at gets ~x, bt gets x). A record
// swapped from left to right is therefore tagged on the following
// operation; until then it is only ever read as a right record, whose tag
// the control logic ignores.
//
// Timing: one operation per clock. insert and extract are sampled on the
// rising edge of clk and must not both be high. All outputs are
// combinational functions of the latches, valid through the whole cycle.
// The published circuit clocks negative-edge latches with the insert and
// extract pulses themselves; here those pulses become clock enables of
// ordinary flip-flops on one clock, which is this design's choice. A
// synchronous active-low reset (rst_n) fills both latches with the empty
// ("infinity") key and sets both tags and oldx, matching the empty sorter
// drawn with all locations tagged.
module tud_element #(
  parameter int unsigned KEY_W       = tud_pkg::KEY_W_DEFAULT,
  parameter int unsigned DATA_W      = tud_pkg::DATA_W_DEFAULT,
  parameter bit          EXTRACT_MAX = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              insert,
  input  logic              extract,
  // left record from the element above (or the queue input)
  input  logic [KEY_W-1:0]  l_in_key,
  input  logic [DATA_W-1:0] l_in_data,
  input  logic              l_in_tag,
  // left record passed down to the element below
  output logic [KEY_W-1:0]  l_out_key,
  output logic [DATA_W-1:0] l_out_data,
  output logic              l_out_tag,
  // right record from the element below (or the empty record at the bottom)
  input  logic [KEY_W-1:0]  r_in_key,
  input  logic [DATA_W-1:0] r_in_data,
  input  logic              r_in_tag,
  // right record offered to the element above (or the queue output)
  output logic [KEY_W-1:0]  r_out_key,
  output logic [DATA_W-1:0] r_out_data,
  output logic              r_out_tag
);

  typedef struct packed {
    logic [KEY_W-1:0]  key;
    logic [DATA_W-1:0] data;
    logic              tag;
  } rec_t;

  localparam int unsigned REC_W = $bits(rec_t);
  localparam logic [KEY_W-1:0] EMPTY_KEY = KEY_W'(tud_pkg::empty_key(KEY_W, EXTRACT_MAX));

  rec_t a_q, b_q;       // latches A_n, B_n with their tag bits at_n, bt_n
  logic oldx_q;
  logic x, ac, bc, atc, btc;
  rec_t l_in, r_in, a_d, b_d, l_out, r_out;

  assign l_in = '{key: l_in_key, data: l_in_data, tag: l_in_tag};
  assign r_in = '{key: r_in_key, data: r_in_data, tag: r_in_tag};

  tud_control #(
    .KEY_W       (KEY_W),
    .EXTRACT_MAX (EXTRACT_MAX)
  ) u_control (
    .a_key   (a_q.key),
    .a_tag   (a_q.tag),
    .b_key   (b_q.key),
    .b_tag   (b_q.tag),
    .oldx    (oldx_q),
    .insert  (insert),
    .extract (extract),
    .x       (x),
    .ac      (ac),
    .bc      (bc),
    .atc     (atc),
    .btc     (btc)
  );

  // Input crossbar: left input and right input onto the A and B latches.
  tud_crossbar #(.W(REC_W)) u_xbar_in (
    .x    (x),
    .in0  (l_in),
    .in1  (r_in),
    .out0 (a_d),
    .out1 (b_d)
  );

  // Output crossbar: A and B latches onto the left and right outputs.
  tud_crossbar #(.W(REC_W)) u_xbar_out (
    .x    (x),
    .in0  (a_q),
    .in1  (b_q),
    .out0 (l_out),
    .out1 (r_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q    <= '{key: EMPTY_KEY, data: '0, tag: 1'b1};
      b_q    <= '{key: EMPTY_KEY, data: '0, tag: 1'b1};
      oldx_q <= 1'b1;
    end else begin
      if (ac) begin
        a_q.key  <= a_d.key;
        a_q.data <= a_d.data;
      end
      if (atc) a_q.tag <= a_d.tag || !x;
      if (bc) begin
        b_q.key  <= b_d.key;
        b_q.data <= b_d.data;
      end
      if (btc) b_q.tag <= b_d.tag || x;
      if (insert || extract) oldx_q <= x;
    end
  end

  assign l_out_key  = l_out.key;
  assign l_out_data = l_out.data;
  assign l_out_tag  = l_out.tag;
  assign r_out_key  = r_out.key;
  assign r_out_data = r_out.data;
  assign r_out_tag  = r_out.tag;

  // The two operations are mutually exclusive.
  a_one_op : assert property (@(posedge clk) disable iff (!rst_n) !(insert && extract))
    else $error("tud_element: insert and extract asserted together");

endmodule
