// tb_tud_sorter: end-to-end self-checking test of the tagged up/down sorter
// at its default size (8-bit key, 8-bit data, 8 elements = 16 records).
//
// Part 1 replays the worked example of six inserts (keys 2, 2, 2, 1, 4, 3)
// followed by six extracts and checks, after every operation, the left and
// right record held at each of the first three levels against the expected
// picture of the queue, and the extraction order 1, 2, 2, 2, 3, 4 with the
// three 2s leaving in insertion order.
//
// Part 2 runs random traffic, one operation per clock with no idle cycles,
// against a reference priority queue that returns the smallest key and, among
// equal keys, the record inserted first. Phases favour inserting or
// extracting so that the queue both fills past capacity and runs empty, and
// alternate wide and narrow key ranges so that equal keys are common. Every
// cycle the output must be the model's head (or the empty key); an insert
// into a full queue must push a record that the model holds out of the
// overflow port, and any other insert must push out nothing.
//
// After every random operation the queue invariant (ordering of the right
// column, of each level's pair and of tagged and untagged left records, and
// the relative lengths of the columns) is checked on the hardware state.
//
// Part 3 sorts a full batch of 16 random records: 16 back-to-back inserts
// and 16 back-to-back extracts, which must give ascending keys in exactly
// 32 cycles.
//
// Mechanisms counted (each must occur): insert, extract, an extract in the
// cycle right after the insert of the same record (one-cycle latency),
// compare-and-swap by crossbar remapping, a swap forced by a tag, FIFO
// extraction among equal keys, extract from an empty queue, overflow.
module tb_tud_sorter;
  import tud_pkg::*;

  localparam int unsigned KW  = KEY_W_DEFAULT;
  localparam int unsigned DW  = DATA_W_DEFAULT;
  localparam int unsigned NE  = ELEMENTS_DEFAULT;
  localparam int unsigned CAP = 2 * NE;
  localparam logic [KW-1:0] EMPTY = '1;

  logic clk = 1'b0, rst_n = 1'b0, insert = 1'b0, extract = 1'b0;
  logic [KW-1:0] in_key = '0, out_key, ovf_key;
  logic [DW-1:0] in_data = '0, out_data, ovf_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tud_sorter dut (
    .clk, .rst_n, .insert, .extract, .in_key, .in_data,
    .out_key, .out_data, .ovf_key, .ovf_data);

  // ---------------------------------------------------------------------
  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // Swap monitors: at each operation, look at the state left by the
  // previous one. A level swapped if x differs from oldx; the swap was
  // forced by a tag if the left record was tagged and did not sort first.
  logic [NE-1:0] swapped, forced;
  for (genvar i = 0; i < NE; i++) begin : g_mon
    logic          ox;
    logic [KW-1:0] lk, rk;
    logic          lt;
    assign ox = dut.g_elem[i].u_elem.oldx_q;
    assign lk = ox ? dut.g_elem[i].u_elem.a_q.key : dut.g_elem[i].u_elem.b_q.key;
    assign rk = ox ? dut.g_elem[i].u_elem.b_q.key : dut.g_elem[i].u_elem.a_q.key;
    assign lt = ox ? dut.g_elem[i].u_elem.a_q.tag : dut.g_elem[i].u_elem.b_q.tag;
    assign swapped[i] = (dut.g_elem[i].u_elem.x != ox) && (lk != EMPTY || rk != EMPTY);
    assign forced[i]  = swapped[i] && lt && !(lk < rk) && lk != EMPTY;
  end

  int n_insert = 0, n_extract = 0, n_swap = 0, n_forced = 0, n_fifo = 0;
  int n_empty_ext = 0, n_overflow = 0, n_back_to_back = 0, n_cycles = 0;

  always @(posedge clk) if (rst_n && (insert || extract)) begin
    n_swap   += $countones(swapped);
    n_forced += $countones(forced);
  end

  // ---------------------------------------------------------------------
  // Reference priority queue: key, insertion number.
  logic [KW-1:0] m_key [$];
  int unsigned   m_seq [$];
  int unsigned   next_seq = 0;

  function automatic int m_head();
    int h = -1;
    foreach (m_key[j])
      if (h < 0 || m_key[j] < m_key[h] || (m_key[j] == m_key[h] && m_seq[j] < m_seq[h])) h = j;
    return h;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Queue invariant, checked on the hardware state after every operation.
  // Records are compared with BELOW: smaller key, or equal key and inserted
  // earlier (insertion numbers come from the model via the record's data).
  //   - occupied locations are contiguous from level 0 in each column;
  //   - the right column holds as many records as the left, or one more;
  //   - the right column is ordered top to bottom;
  //   - at each level the right record is BELOW the left one;
  //   - a tagged left record is BELOW the right record one level down;
  //   - an untagged left record was inserted after every deeper record
  //     (either column) with the same key.
  // The tags of right-hand records are not checked: the hardware sets them
  // one operation late (see tud_element).
  int n_inv = 0;

  function automatic longint seq_of(input logic [KW-1:0] k, input logic [DW-1:0] d);
    foreach (m_key[j]) if (m_key[j] == k && DW'(m_seq[j]) == d) return longint'(m_seq[j]);
    return -1;
  endfunction

  function automatic bit below(input logic [KW-1:0] ka, input longint ta,
                               input logic [KW-1:0] kb, input longint tb);
    return (ka < kb) || (ka == kb && ta < tb);
  endfunction

  task automatic check_invariant();
    logic [KW-1:0] lk [NE], rk [NE];
    longint        lt [NE], rt [NE];
    logic          ltag [NE];
    int nl = 0, nr = 0;
    bit holes = 1'b0, ok = 1'b1;
    for (int i = 0; i < int'(NE); i++) begin
      lk[i] = dut.l_key[i+1];  ltag[i] = dut.l_tag[i+1];
      rk[i] = dut.r_key[i];
      lt[i] = seq_of(lk[i], dut.l_data[i+1]);
      rt[i] = seq_of(rk[i], dut.r_data[i]);
      if (lk[i] != EMPTY) begin if (nl != i) holes = 1'b1; nl++; end
      if (rk[i] != EMPTY) begin if (nr != i) holes = 1'b1; nr++; end
    end
    check(!holes, "invariant: empty location inside a column");
    check(nr == nl || nr == nl + 1, $sformatf("invariant: %0d left and %0d right records", nl, nr));
    check(nl + nr == m_key.size(), $sformatf("invariant: %0d records held, model has %0d", nl + nr, m_key.size()));
    for (int i = 0; i < nl; i++) if (lt[i] < 0) ok = 1'b0;
    for (int i = 0; i < nr; i++) if (rt[i] < 0) ok = 1'b0;
    check(ok, "invariant: a held record is not in the model");
    for (int i = 0; i + 1 < nr; i++)
      check(below(rk[i], rt[i], rk[i+1], rt[i+1]), $sformatf("invariant: right column out of order at level %0d", i));
    for (int i = 0; i < nl; i++) begin
      check(below(rk[i], rt[i], lk[i], lt[i]), $sformatf("invariant: level %0d pair out of order", i));
      if (ltag[i] && i + 1 < nr)
        check(below(lk[i], lt[i], rk[i+1], rt[i+1]), $sformatf("invariant: tagged left record at level %0d", i));
      if (!ltag[i])
        for (int j = i + 1; j < int'(NE); j++) begin
          if (j < nl) check(!(lk[j] == lk[i] && lt[j] > lt[i]), $sformatf("invariant: untagged left record at level %0d", i));
          if (j < nr) check(!(rk[j] == lk[i] && rt[j] > lt[i]), $sformatf("invariant: untagged left record at level %0d", i));
        end
    end
    n_inv++;
  endtask

  // One clock with the given operation; checks output and overflow before
  // the edge, updates the model, then checks the invariant.
  bit last_was_insert = 1'b0;
  logic [KW-1:0] last_key;
  logic [DW-1:0] last_data;

  task automatic do_op(input bit ins, input bit ext, input logic [KW-1:0] k);
    int h;
    insert  = ins;
    extract = ext;
    in_key  = k;
    in_data = DW'(next_seq);
    #1;
    h = m_head();
    if (h < 0)
      check(out_key == EMPTY, $sformatf("empty queue shows %0d/%0d", out_key, out_data));
    else
      check(out_key == m_key[h] && out_data == DW'(m_seq[h]),
            $sformatf("head %0d/%0d expected %0d/%0d", out_key, out_data, m_key[h], DW'(m_seq[h])));
    if (ins) begin
      if (m_key.size() == CAP) begin
        int f = -1;
        foreach (m_key[j]) if (f < 0 && m_key[j] == ovf_key && DW'(m_seq[j]) == ovf_data) f = j;
        check(ovf_key != EMPTY && f >= 0,
              $sformatf("overflow record %0d/%0d not in the queue", ovf_key, ovf_data));
        if (f >= 0) begin
          m_key.delete(f);
          m_seq.delete(f);
        end
        n_overflow++;
      end else begin
        check(ovf_key == EMPTY, $sformatf("overflow %0d/%0d with %0d records", ovf_key, ovf_data, m_key.size()));
      end
      m_key.push_back(k);
      m_seq.push_back(next_seq);
      next_seq++;
      n_insert++;
    end
    if (ext) begin
      n_extract++;
      if (h < 0) n_empty_ext++;
      else begin
        if (last_was_insert && out_key == last_key && out_data == last_data) n_back_to_back++;
        foreach (m_key[j]) if (j != h && m_key[j] == m_key[h]) begin n_fifo++; break; end
        m_key.delete(h);
        m_seq.delete(h);
      end
    end
    last_was_insert = ins;
    last_key  = k;
    last_data = in_data;
    @(posedge clk);
    #1;
    n_cycles++;
    check_invariant();
  endtask

  // ---------------------------------------------------------------------
  // Worked example: expected {key,data} of (L0,R0,L1,R1,L2,R2) after each
  // operation. The three records with key 2 carry data 0, 1, 2; the others
  // carry data 16 * key. 16'hFF00 is an empty location.
  localparam logic [15:0] I = 16'hFF00;
  localparam logic [15:0] T0 = 16'h0200, T1 = 16'h0201, T2 = 16'h0202;
  localparam logic [15:0] K1 = 16'h0110, K3 = 16'h0330, K4 = 16'h0440;
  localparam logic [15:0] EXP [12][6] = '{
    '{I,  T0, I,  I,  I,  I },   // insert 2_0
    '{T1, T0, I,  I,  I,  I },   // insert 2_1
    '{T2, T0, I,  T1, I,  I },   // insert 2_2
    '{T0, K1, T2, T1, I,  I },   // insert 1
    '{K4, K1, T1, T0, I,  T2},   // insert 4
    '{K3, K1, K4, T0, T2, T1},   // insert 3
    '{K3, T0, K4, T1, I,  T2},   // extract 1
    '{K3, T1, K4, T2, I,  I },   // extract 2_0
    '{K3, T2, I,  K4, I,  I },   // extract 2_1
    '{K4, K3, I,  I,  I,  I },   // extract 2_2
    '{I,  K4, I,  I,  I,  I },   // extract 3
    '{I,  I,  I,  I,  I,  I }    // extract 4
  };
  localparam logic [15:0] SEQ_IN [6] = '{T0, T1, T2, K1, K4, K3};

  function automatic logic [15:0] level_rec(input int lvl, input bit right);
    return right ? {dut.r_key[lvl], dut.r_data[lvl]} : {dut.l_key[lvl+1], dut.l_data[lvl+1]};
  endfunction

  task automatic example_step(input int step, input bit ins, input logic [15:0] rec);
    insert  = ins;
    extract = !ins;
    in_key  = rec[15:8];
    in_data = rec[7:0];
    @(posedge clk);
    #1;
    insert  = 1'b0;
    extract = 1'b0;
    for (int p = 0; p < 6; p++) begin
      logic [15:0] got = level_rec(p / 2, p[0]);
      logic [15:0] exp = EXP[step][p];
      check(exp == I ? got[15:8] == EMPTY : got == exp,
            $sformatf("example step %0d level %0d %s: got %h expected %h",
                      step, p / 2, p[0] ? "right" : "left", got, exp));
    end
    for (int lvl = 3; lvl < int'(NE); lvl++)
      check(dut.l_key[lvl+1] == EMPTY && dut.r_key[lvl] == EMPTY,
            $sformatf("example step %0d level %0d not empty", step, lvl));
  endtask

  task automatic run_example();
    logic [15:0] order [6] = '{K1, T0, T1, T2, K3, K4};
    for (int s = 0; s < 6; s++) example_step(s, 1'b1, SEQ_IN[s]);
    for (int s = 0; s < 6; s++) begin
      check({out_key, out_data} == order[s],
            $sformatf("example extract %0d gave %h expected %h", s, {out_key, out_data}, order[s]));
      example_step(6 + s, 1'b0, '0);
    end
  endtask

  // ---------------------------------------------------------------------
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    run_example();

    // restart from an empty queue for the random traffic
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int phase = 0; phase < 40; phase++) begin
      int p_ins, kmax;
      bit ins;
      p_ins = (phase % 4 == 0) ? 85 : (phase % 4 == 2) ? 15 : 50;
      kmax  = (phase % 3 == 0) ? 3 : 254;
      for (int c = 0; c < 500; c++) begin
        ins = ($urandom_range(0, 99) < p_ins);
        do_op(ins, !ins, KW'($urandom_range(0, kmax)));
      end
    end
    insert  = 1'b0;
    extract = 1'b0;

    // Part 3: sort a full batch of CAP records in 2*CAP cycles.
    rst_n = 1'b0;
    m_key.delete();
    m_seq.delete();
    @(posedge clk);
    #1 rst_n = 1'b1;
    begin
      int c0;
      logic [KW-1:0] prev;
      c0 = n_cycles;
      for (int c = 0; c < int'(CAP); c++) do_op(1'b1, 1'b0, KW'($urandom_range(0, 254)));
      prev = '0;
      for (int c = 0; c < int'(CAP); c++) begin
        check(out_key >= prev && out_key != EMPTY, $sformatf("batch sort: %0d after %0d", out_key, prev));
        prev = out_key;
        do_op(1'b0, 1'b1, '0);
      end
      check(n_cycles - c0 == 2 * int'(CAP), $sformatf("batch sort took %0d cycles", n_cycles - c0));
      check(out_key == EMPTY, "batch sort left records behind");
      $display("batch sort of %0d records: %0d cycles", CAP, n_cycles - c0);
    end
    insert  = 1'b0;
    extract = 1'b0;

    $display("inserts=%0d extracts=%0d cycles=%0d swaps=%0d tag-forced=%0d fifo-ties=%0d empty-extracts=%0d overflows=%0d insert-then-extract=%0d",
             n_insert, n_extract, n_cycles, n_swap, n_forced, n_fifo, n_empty_ext, n_overflow, n_back_to_back);
    check(n_cycles == n_insert + n_extract, "one operation per clock");
    check(n_insert > 0,       "no insert happened");
    check(n_extract > 0,      "no extract happened");
    check(n_swap > 0,         "no compare-and-swap happened");
    check(n_forced > 0,       "no tag-forced swap happened");
    check(n_fifo > 0,         "no equal-key FIFO extraction happened");
    check(n_empty_ext > 0,    "no extract from an empty queue happened");
    check(n_overflow > 0,     "no overflow happened");
    check(n_back_to_back > 0, "no extract right after the insert of the same record");
    check(n_inv == n_cycles, "invariant not checked after every operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
