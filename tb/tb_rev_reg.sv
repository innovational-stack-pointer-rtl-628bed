// tb_rev_reg: self-checking test of one reversible register stage.
// Random inputs each clock; checks the selected D input, the loaded value,
// hold when en = 0, the reset value and which side the stage drives, for
// a plain stage and for one with the inverted (Q-bar) left boundary.
module tb_rev_reg;
  logic clk = 1'b0;
  logic rst_n, en, up_dn, l_in, r_in;
  logic l_out, r_out, d, q;
  logic l_out_i, r_out_i, d_i, q_i;
  logic exp_q, exp_qi;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rev_reg #(.RESET_VAL(1'b1)) dut (.clk, .rst_n, .en, .up_dn, .l_in, .r_in, .l_out, .r_out, .d, .q);
  rev_reg #(.RESET_VAL(1'b0), .D_INV(1'b1)) dut_inv (
    .clk, .rst_n, .en, .up_dn, .l_in, .r_in, .l_out(l_out_i), .r_out(r_out_i), .d(d_i), .q(q_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; up_dn = 1'b0; l_in = 1'b0; r_in = 1'b0;
    @(posedge clk);
    #1 check(q == 1'b1 && q_i == 1'b0, "reset values");
    rst_n = 1'b1;
    exp_q = 1'b1;
    exp_qi = 1'b0;
    for (int i = 0; i < 300; i++) begin
      en    = 1'($urandom_range(0, 1));
      up_dn = 1'($urandom_range(0, 1));
      l_in  = 1'($urandom_range(0, 1));
      r_in  = 1'($urandom_range(0, 1));
      #1;
      check(d == (up_dn ? r_in : l_in), $sformatf("d select, step %0d", i));
      check(r_out == (up_dn ? 1'b0 : exp_q), $sformatf("r_out, step %0d", i));
      check(l_out == (up_dn ? exp_q : 1'b0), $sformatf("l_out, step %0d", i));
      check(d_i == (up_dn ? r_in : !l_in), $sformatf("inverted: d select, step %0d", i));
      check(r_out_i == (up_dn ? 1'b0 : exp_qi), $sformatf("inverted: r_out, step %0d", i));
      check(l_out_i == (up_dn ? !exp_qi : 1'b0), $sformatf("inverted: l_out, step %0d", i));
      @(posedge clk);
      if (en) exp_q = up_dn ? r_in : l_in;
      if (en) exp_qi = up_dn ? r_in : !l_in;
      #1 check(q == exp_q, $sformatf("q after clock, step %0d", i));
      check(q_i == exp_qi, $sformatf("inverted: q after clock, step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
