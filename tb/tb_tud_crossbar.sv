// tb_tud_crossbar: self-checking test of the 2x2 record crossbar.
// Drives random 17-bit buses with x both true and false and checks that the
// outputs are the inputs straight through (x = 1) or crossed (x = 0).
module tb_tud_crossbar;
  localparam int unsigned W = 17;

  logic         x;
  logic [W-1:0] in0, in1, out0, out1;
  int checks = 0, failures = 0;

  tud_crossbar #(.W(W)) dut (.x(x), .in0(in0), .in1(in1), .out0(out0), .out1(out1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      x   = i[0];
      in0 = W'($urandom);
      in1 = W'($urandom);
      #1;
      checks++;
      if (x ? (out0 !== in0 || out1 !== in1) : (out0 !== in1 || out1 !== in0)) begin
        failures++;
        $display("FAIL x=%0b in0=%h in1=%h out0=%h out1=%h", x, in0, in1, out0, out1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
