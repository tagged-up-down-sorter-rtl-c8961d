// tb_tud_element: self-checking test of one sorting element in isolation.
//
// A single element is driven with random insert / extract / idle cycles and
// random records on its left input (from above) and right input (from
// below). 3-bit keys make equal keys common. A reference model keeps the
// abstract left and right records of the level: insert replaces the left
// record, extract replaces the right one with a tagged copy of the record
// from below; then the pair is swapped, tagging the record that moves right,
// when the left key is smaller or the left record is tagged. Every cycle the
// element's left output (key, data and tag) and right output (key and data)
// must equal the model's left and right records. The right output's tag is
// not compared: the element sets a right record's tag when it next writes
// that latch, and the receiving element forces it anyway.
module tb_tud_element;
  localparam int unsigned KW = 3;
  localparam int unsigned DW = 8;

  typedef struct packed {
    logic [KW-1:0] key;
    logic [DW-1:0] data;
    logic          tag;
  } rec_t;

  logic clk = 1'b0, rst_n = 1'b0, insert = 1'b0, extract = 1'b0;
  rec_t l_in, r_in, l_out, r_out;
  int checks = 0, failures = 0;
  int n_swaps = 0, n_forced = 0;
  rec_t m_l, m_r;

  always #5 clk = ~clk;

  tud_element #(.KEY_W(KW), .DATA_W(DW)) dut (
    .clk, .rst_n, .insert, .extract,
    .l_in_key(l_in.key), .l_in_data(l_in.data), .l_in_tag(l_in.tag),
    .l_out_key(l_out.key), .l_out_data(l_out.data), .l_out_tag(l_out.tag),
    .r_in_key(r_in.key), .r_in_data(r_in.data), .r_in_tag(r_in.tag),
    .r_out_key(r_out.key), .r_out_data(r_out.data), .r_out_tag(r_out.tag));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_outputs(input int cyc);
    checks++;
    if (l_out !== m_l || r_out.key !== m_r.key || r_out.data !== m_r.data) begin
      failures++;
      $display("FAIL cycle %0d: left %0d/%02h/%0b exp %0d/%02h/%0b  right %0d/%02h exp %0d/%02h",
               cyc, l_out.key, l_out.data, l_out.tag, m_l.key, m_l.data, m_l.tag,
               r_out.key, r_out.data, m_r.key, m_r.data);
    end
  endtask

  initial begin
    int op;
    m_l = '{key: '1, data: '0, tag: 1'b1};
    m_r = '{key: '1, data: '0, tag: 1'b1};
    l_in = '0;
    r_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      op      = $urandom_range(0, 9);
      insert  = (op < 4);
      extract = (op >= 4 && op < 8);
      l_in    = rec_t'($urandom);
      r_in    = rec_t'($urandom);
      #1;
      compare_outputs(cyc);
      @(posedge clk);
      // reference model of one level
      if (insert)  m_l = l_in;
      if (extract) m_r = '{key: r_in.key, data: r_in.data, tag: 1'b1};
      if (insert || extract) begin
        if (m_l.key < m_r.key || m_l.tag) begin
          rec_t t;
          n_swaps++;
          if (m_l.tag && !(m_l.key < m_r.key)) n_forced++;
          t   = m_l;
          m_l = m_r;
          m_r = '{key: t.key, data: t.data, tag: 1'b1};
        end
      end
      #1;
    end
    compare_outputs(-1);
    $display("swaps=%0d tag-forced swaps=%0d", n_swaps, n_forced);
    checks++;
    if (n_swaps == 0 || n_forced == 0) begin
      failures++;
      $display("FAIL: swap mechanisms not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
