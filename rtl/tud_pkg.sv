// tud_pkg: constants shared by the tagged up/down sorter.
//
// The sorter keeps records of (key, data, tag). Empty locations hold the
// "infinity" key, the largest key value for an extract-minimum queue (the
// smallest for the extract-maximum variant), so an empty slot always sorts
// behind every real record. The default sizes are those of the evaluated
// sorter: 8-bit keys, 8-bit data and 8 sorting elements (16 records).
package tud_pkg;

  localparam int unsigned KEY_W_DEFAULT    = 8;
  localparam int unsigned DATA_W_DEFAULT   = 8;
  localparam int unsigned ELEMENTS_DEFAULT = 8;

  // Key value that marks an empty location.
  function automatic logic [63:0] empty_key(input int unsigned key_w, input bit extract_max);
    logic [63:0] k;
    k = extract_max ? 64'd0 : ((64'd1 << key_w) - 64'd1);
    return k;
  endfunction

endpackage
