// tb_tud_control: exhaustive self-checking test of the compare & control logic.
//
// With 3-bit keys every combination of the two keys, both tags, oldx and the
// three operations (none, insert, extract) is applied, for the
// extract-minimum and the extract-maximum comparison. The expected outputs
// are derived from the algorithm rather than from the control equations:
// oldx says which latch holds the left record; the left record moves to the
// right (x changes) if its key sorts before the right key or it is tagged;
// the left latch loads on insert, the right latch loads on extract, and the
// tag bit of the right latch is written on both operations.
module tb_tud_control;
  localparam int unsigned KW = 3;

  logic [KW-1:0] a_key, b_key;
  logic a_tag, b_tag, oldx, insert, extract;
  logic x0, ac0, bc0, atc0, btc0;     // extract-minimum instance
  logic x1, ac1, bc1, atc1, btc1;     // extract-maximum instance
  int checks = 0, failures = 0;

  tud_control #(.KEY_W(KW), .EXTRACT_MAX(1'b0)) dut_min (
    .a_key, .a_tag, .b_key, .b_tag, .oldx, .insert, .extract,
    .x(x0), .ac(ac0), .bc(bc0), .atc(atc0), .btc(btc0));

  tud_control #(.KEY_W(KW), .EXTRACT_MAX(1'b1)) dut_max (
    .a_key, .a_tag, .b_key, .b_tag, .oldx, .insert, .extract,
    .x(x1), .ac(ac1), .bc(bc1), .atc(atc1), .btc(btc1));

  task automatic check(input bit max_mode, input logic x, ac, bc, atc, btc);
    logic [KW-1:0] lk, rk;
    logic lt, sorts_before, swap, ex, a_is_left;
    lk = oldx ? a_key : b_key;
    rk = oldx ? b_key : a_key;
    lt = oldx ? a_tag : b_tag;
    sorts_before = max_mode ? (lk > rk) : (lk < rk);
    swap = sorts_before || lt;
    a_is_left = swap ? !oldx : oldx;
    ex = a_is_left;
    checks++;
    if (x !== ex ||
        ac  !== (a_is_left ? insert : extract) ||
        bc  !== (a_is_left ? extract : insert) ||
        atc !== (insert || (!a_is_left && extract)) ||
        btc !== (insert || (a_is_left && extract))) begin
      failures++;
      $display("FAIL max=%0b A=%0d/%0b B=%0d/%0b oldx=%0b ins=%0b ext=%0b : x=%0b(exp %0b) ac=%0b bc=%0b atc=%0b btc=%0b",
               max_mode, a_key, a_tag, b_key, b_tag, oldx, insert, extract, x, ex, ac, bc, atc, btc);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ak = 0; ak < (1 << KW); ak++)
      for (int bk = 0; bk < (1 << KW); bk++)
        for (int f = 0; f < 8; f++)
          for (int op = 0; op < 3; op++) begin
            a_key   = KW'(ak);
            b_key   = KW'(bk);
            {a_tag, b_tag, oldx} = 3'(f);
            insert  = (op == 1);
            extract = (op == 2);
            #1;
            check(1'b0, x0, ac0, bc0, atc0, btc0);
            check(1'b1, x1, ac1, bc1, atc1, btc1);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
