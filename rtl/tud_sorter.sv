// tud_sorter: tagged up/down sorter, a hardware priority queue.
//
// ELEMENTS sorting elements (tud_element) are chained into a column that
// holds up to 2*ELEMENTS records of (key, data). Each clock the queue can
// either insert a record or extract the record with the smallest key (the
// largest with EXTRACT_MAX = 1). Records with equal keys leave in the order
// they were inserted. Each element does one compare per operation, so the
// queue needs ELEMENTS = n/2 comparators for n records.
//
// Inserting pushes the whole left column down one level, with the new record
// entering at the top. Extracting pulls the whole right column up one level;
// the record that leaves the top of the right column is the output. After
// either, every element compares its two records and, if needed, swaps them
// so that the right one is the smaller; a record that had already reached
// the right side is tagged and always returns there, which preserves FIFO
// order among equal keys.
//
// Interface and timing:
//   insert, in_key, in_data : sampled on the rising clock edge.
//   extract                 : sampled on the rising clock edge; must not be
//                             high together with insert.
//   out_key, out_data       : the record an extract in this cycle removes,
//                             i.e. the current minimum. Valid at any time;
//                             an inserted record can be extracted in the very
//                             next cycle. An empty queue shows the empty key
//                             (all ones, or zero for EXTRACT_MAX), which is
//                             therefore reserved and must not be inserted.
//   ovf_key, ovf_data       : the left record of the last element. An insert
//                             into a full queue (2*ELEMENTS records) pushes
//                             this record out of the queue; it is the empty
//                             key when nothing is lost.
// The bottom element is fed the empty record from below, so extracting from
// an empty queue returns the empty key and changes nothing. The default
// sizes (8-bit key, 8-bit data, 8 elements for 16 records) are those of the
// evaluated sorter; the overflow output and the synchronous clocking are this
// design's own choices.
module tud_sorter #(
  parameter int unsigned KEY_W       = tud_pkg::KEY_W_DEFAULT,
  parameter int unsigned DATA_W      = tud_pkg::DATA_W_DEFAULT,
  parameter int unsigned ELEMENTS    = tud_pkg::ELEMENTS_DEFAULT,
  parameter bit          EXTRACT_MAX = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              insert,
  input  logic              extract,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [DATA_W-1:0] in_data,
  output logic [KEY_W-1:0]  out_key,
  output logic [DATA_W-1:0] out_data,
  output logic [KEY_W-1:0]  ovf_key,
  output logic [DATA_W-1:0] ovf_data
);

  localparam logic [KEY_W-1:0] EMPTY_KEY = KEY_W'(tud_pkg::empty_key(KEY_W, EXTRACT_MAX));

  // Level i's left input is l_*[i], its left output l_*[i+1]; its right
  // output is r_*[i] and its right input r_*[i+1].
  logic [KEY_W-1:0]  l_key  [ELEMENTS+1];
  logic [DATA_W-1:0] l_data [ELEMENTS+1];
  logic              l_tag  [ELEMENTS+1];
  logic [KEY_W-1:0]  r_key  [ELEMENTS+1];
  logic [DATA_W-1:0] r_data [ELEMENTS+1];
  logic              r_tag  [ELEMENTS+1];

  assign l_key[0]  = in_key;
  assign l_data[0] = in_data;
  assign l_tag[0]  = 1'b0;          // records enter untagged

  assign r_key[ELEMENTS]  = EMPTY_KEY;
  assign r_data[ELEMENTS] = '0;
  assign r_tag[ELEMENTS]  = 1'b1;

  for (genvar i = 0; i < ELEMENTS; i++) begin : g_elem
    tud_element #(
      .KEY_W       (KEY_W),
      .DATA_W      (DATA_W),
      .EXTRACT_MAX (EXTRACT_MAX)
    ) u_elem (
      .clk        (clk),
      .rst_n      (rst_n),
      .insert     (insert),
      .extract    (extract),
      .l_in_key   (l_key[i]),
      .l_in_data  (l_data[i]),
      .l_in_tag   (l_tag[i]),
      .l_out_key  (l_key[i+1]),
      .l_out_data (l_data[i+1]),
      .l_out_tag  (l_tag[i+1]),
      .r_in_key   (r_key[i+1]),
      .r_in_data  (r_data[i+1]),
      .r_in_tag   (r_tag[i+1]),
      .r_out_key  (r_key[i]),
      .r_out_data (r_data[i]),
      .r_out_tag  (r_tag[i])
    );
  end

  assign out_key  = r_key[0];
  assign out_data = r_data[0];
  assign ovf_key  = l_key[ELEMENTS];
  assign ovf_data = l_data[ELEMENTS];

  // Unused by design: the tag travelling out of either end of the column.
  logic unused_tags;
  assign unused_tags = r_tag[0] ^ l_tag[ELEMENTS];

endmodule
