// tb_oneway_xor: exhaustive test of both kinds of one-way XOR: the one
// used going up (XOR_WHEN = 0) and the one used going down (XOR_WHEN = 1).
// In its active direction the side input is XORed in, in the other the
// signal passes unchanged; the idle output is 0.
module tb_oneway_xor;
  logic up_dn, l_in, r_in, side;
  logic l_out0, r_out0, l_out1, r_out1;
  int checks = 0;
  int failures = 0;

  oneway_xor #(.XOR_WHEN(1'b0)) dut0 (.up_dn, .l_in, .r_in, .side, .l_out(l_out0), .r_out(r_out0));
  oneway_xor #(.XOR_WHEN(1'b1)) dut1 (.up_dn, .l_in, .r_in, .side, .l_out(l_out1), .r_out(r_out1));

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
        check(r_out0 == (l_in ^ side), $sformatf("up-side gate XORs going up, case %0d", v));
        check(r_out1 == l_in,          $sformatf("down-side gate bypassed going up, case %0d", v));
        check(l_out0 == 1'b0 && l_out1 == 1'b0, $sformatf("left outputs idle, case %0d", v));
      end else begin
        check(l_out0 == r_in,          $sformatf("up-side gate bypassed going down, case %0d", v));
        check(l_out1 == (r_in ^ side), $sformatf("down-side gate XORs going down, case %0d", v));
        check(r_out0 == 1'b0 && r_out1 == 1'b0, $sformatf("right outputs idle, case %0d", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
