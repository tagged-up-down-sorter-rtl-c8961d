// tb_tud_sorter_max: self-checking test of the extract-maximum variant.
//
// A small sorter (4-bit keys, 6-bit data, 4 elements = 8 records) built with
// EXTRACT_MAX = 1 gets random insert and extract traffic, one operation per
// clock, against a reference queue that returns the largest key and, among
// equal keys, the record inserted first. Key 0 marks an empty location in
// this variant, so inserted keys are 1..15. Overflow handling is checked as
// in the extract-minimum test.
module tb_tud_sorter_max;
  localparam int unsigned KW  = 4;
  localparam int unsigned DW  = 6;
  localparam int unsigned NE  = 4;
  localparam int unsigned CAP = 2 * NE;
  localparam logic [KW-1:0] EMPTY = '0;

  logic clk = 1'b0, rst_n = 1'b0, insert = 1'b0, extract = 1'b0;
  logic [KW-1:0] in_key = '0, out_key, ovf_key;
  logic [DW-1:0] in_data = '0, out_data, ovf_data;
  int checks = 0, failures = 0;
  int n_fifo = 0, n_overflow = 0, n_empty_ext = 0;

  always #5 clk = ~clk;

  tud_sorter #(.KEY_W(KW), .DATA_W(DW), .ELEMENTS(NE), .EXTRACT_MAX(1'b1)) dut (
    .clk, .rst_n, .insert, .extract, .in_key, .in_data,
    .out_key, .out_data, .ovf_key, .ovf_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] m_key [$];
  int unsigned   m_seq [$];
  int unsigned   next_seq = 0;

  function automatic int m_head();
    int h = -1;
    foreach (m_key[j])
      if (h < 0 || m_key[j] > m_key[h] || (m_key[j] == m_key[h] && m_seq[j] < m_seq[h])) h = j;
    return h;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    int h, f, p_ins;
    bit ins;
    logic [KW-1:0] k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      p_ins   = ((c / 400) % 3 == 0) ? 80 : ((c / 400) % 3 == 1) ? 20 : 50;
      ins     = ($urandom_range(0, 99) < p_ins);
      k       = KW'($urandom_range(1, ((c / 1000) % 2 != 0) ? 15 : 3));
      insert  = ins;
      extract = !ins;
      in_key  = k;
      in_data = DW'(next_seq);
      #1;
      h = m_head();
      if (h < 0)
        check(out_key == EMPTY, $sformatf("empty queue shows %0d", out_key));
      else
        check(out_key == m_key[h] && out_data == DW'(m_seq[h]),
              $sformatf("head %0d/%0d expected %0d/%0d", out_key, out_data, m_key[h], DW'(m_seq[h])));
      if (ins) begin
        if (m_key.size() == CAP) begin
          f = -1;
          foreach (m_key[j]) if (f < 0 && m_key[j] == ovf_key && DW'(m_seq[j]) == ovf_data) f = j;
          check(ovf_key != EMPTY && f >= 0, "overflow record not in the queue");
          if (f >= 0) begin
            m_key.delete(f);
            m_seq.delete(f);
          end
          n_overflow++;
        end else
          check(ovf_key == EMPTY, "unexpected overflow");
        m_key.push_back(k);
        m_seq.push_back(next_seq);
        next_seq++;
      end else if (h < 0) begin
        n_empty_ext++;
      end else begin
        foreach (m_key[j]) if (j != h && m_key[j] == m_key[h]) begin n_fifo++; break; end
        m_key.delete(h);
        m_seq.delete(h);
      end
      @(posedge clk);
      #1;
    end
    $display("fifo-ties=%0d overflows=%0d empty-extracts=%0d", n_fifo, n_overflow, n_empty_ext);
    check(n_fifo > 0 && n_overflow > 0 && n_empty_ext > 0, "a mechanism was not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
