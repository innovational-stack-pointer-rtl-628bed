// tb_rev_xor: exhaustive test of the reversible XOR: the side input is
// XORed in both directions and only the output of the active direction
// is driven.
module tb_rev_xor;
  logic up_dn, l_in, r_in, side, l_out, r_out;
  int checks = 0;
  int failures = 0;

  rev_xor dut (.up_dn, .l_in, .r_in, .side, .l_out, .r_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {up_dn, l_in, r_in, side} = 4'(v);
      #1;
      if (!up_dn) begin
        check(r_out == (l_in != side), $sformatf("left-to-right XOR, case %0d", v));
        check(l_out == 1'b0, $sformatf("left side idle, case %0d", v));
      end else begin
        check(l_out == (r_in != side), $sformatf("right-to-left XOR, case %0d", v));
        check(r_out == 1'b0, $sformatf("right side idle, case %0d", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
