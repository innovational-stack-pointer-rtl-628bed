// tb_lfsr_stack: end-to-end test of the LFSR-pointer stack at its default
// size (4-stage generator, 16 entries of 8 bits).
//
// A queue is the reference stack. Every cycle the test issues PUSH, POP,
// both or neither at random (with phases that force the stack full and
// empty) and checks, one clock after each request: the popped word in the
// POP cycle, the pointer (which must step through the hand-derived
// x^4 + x + 1 address order 0,1,3,7,F,E,D,A,5,B,6,C,9,2,4,8 going up and
// the reverse going down, one step per operation), the empty and full
// flags, overflow and underflow, and that data_out shows the top entry
// (the word at the pointer's physical address) whenever nothing is
// pushed. It counts how often each mechanism occurred and fails if one
// never did: push, pop, a change of direction, reaching full, returning to empty, a refused push, a refused
// pop, a cycle with PUSH and POP together, the zero state added by the
// NOR gate, and a push landing at a non-consecutive address.
module tb_lfsr_stack;
  localparam logic [3:0] UP_SEQ [16] = '{4'h0, 4'h1, 4'h3, 4'h7, 4'hF, 4'hE, 4'hD, 4'hA,
                                         4'h5, 4'hB, 4'h6, 4'hC, 4'h9, 4'h2, 4'h4, 4'h8};

  logic clk = 1'b0;
  logic rst_n;
  logic push, pop;
  logic [7:0] data_in, data_out;
  logic empty, full, overflow, underflow;
  logic [3:0] sp;

  logic [7:0] model [$];
  int pos;          // index of sp in UP_SEQ, equals the number of entries mod 16
  int checks = 0;
  int failures = 0;
  int n_push = 0, n_pop = 0, n_turn = 0, n_full = 0, n_empty = 0;
  int n_over = 0, n_under = 0, n_both = 0, n_zero = 0, n_scatter = 0;
  bit last_was_pop = 1'b0;
  bit any_op = 1'b0;

  always #5 clk = ~clk;

  lfsr_stack dut (.clk, .rst_n, .push, .pop, .data_in, .data_out,
                  .empty, .full, .overflow, .underflow, .sp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock with the given request, checked against the model.
  task automatic step(input bit p, input bit q, input logic [7:0] din);
    bit exp_over, exp_under, do_push, do_pop;
    logic [3:0] sp_before;
    @(negedge clk);
    push = p; pop = q; data_in = din;
    #1;
    sp_before = sp;
    exp_over  = p && !q && model.size() == 16;
    exp_under = q && !p && model.size() == 0;
    do_push   = p && !q && !exp_over;
    do_pop    = q && !p && !exp_under;
    check(overflow == exp_over, $sformatf("overflow flag (size %0d)", model.size()));
    check(underflow == exp_under, $sformatf("underflow flag (size %0d)", model.size()));
    if (do_pop) check(data_out == model[$], $sformatf("popped %h expected %h", data_out, model[$]));
    if (exp_over)  n_over++;
    if (exp_under) n_under++;
    if (p && q)    n_both++;
    @(posedge clk);
    #1;
    if (do_push) begin
      model.push_back(din);
      pos = (pos + 1) % 16;
      n_push++;
      if (sp != sp_before + 4'd1) n_scatter++;
    end
    if (do_pop) begin
      void'(model.pop_back());
      pos = (pos + 15) % 16;
      n_pop++;
    end
    if (do_push || do_pop) begin
      if (any_op && (last_was_pop != do_pop)) n_turn++;
      last_was_pop = do_pop;
      any_op = 1'b1;
      if (sp == 4'h0 || sp_before == 4'h0) n_zero++;   // step into or out of the NOR-added state
      if (do_push && model.size() == 16) n_full++;
      if (do_pop && model.size() == 0) n_empty++;
    end
    check(sp == UP_SEQ[pos], $sformatf("pointer %h expected %h", sp, UP_SEQ[pos]));
    check(empty == (model.size() == 0), $sformatf("empty flag (size %0d)", model.size()));
    check(full == (model.size() == 16), $sformatf("full flag (size %0d)", model.size()));
    if (model.size() > 0 && !do_push)
      check(data_out == model[$], "data_out shows the top of the stack");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; push = 1'b0; pop = 1'b0; data_in = '0; pos = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(empty && !full && sp == 4'h0, "reset: empty, pointer at 0");

    step(1'b0, 1'b1, 8'h00);                                  // pop when empty
    for (int i = 0; i < 16; i++) step(1'b1, 1'b0, 8'($urandom)); // fill
    step(1'b1, 1'b0, 8'hAA);                                  // push when full
    step(1'b1, 1'b1, 8'h55);                                  // both: ignored
    for (int i = 0; i < 16; i++) step(1'b0, 1'b1, 8'h00);     // drain
    step(1'b0, 1'b1, 8'h00);

    // Random traffic, biased in turn towards pushing and towards popping.
    for (int phase = 0; phase < 6; phase++) begin
      for (int i = 0; i < 150; i++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 8)       step(1'b0, 1'b0, 8'($urandom));
        else if (r < 12) step(1'b1, 1'b1, 8'($urandom));
        else if ((r < 60) == (phase % 2 == 0)) step(1'b1, 1'b0, 8'($urandom));
        else             step(1'b0, 1'b1, 8'($urandom));
      end
    end
    while (model.size() > 0) step(1'b0, 1'b1, 8'h00);

    $display("mechanisms: push=%0d pop=%0d turn=%0d full=%0d empty=%0d overflow=%0d underflow=%0d both=%0d zero_state=%0d scattered=%0d",
             n_push, n_pop, n_turn, n_full, n_empty, n_over, n_under, n_both, n_zero, n_scatter);
    check(n_push > 0,    "push happened");
    check(n_pop > 0,     "pop happened");
    check(n_turn > 0,    "direction change happened");
    check(n_full > 0,    "stack became full");
    check(n_empty > 0,   "stack returned to empty");
    check(n_over > 0,    "push refused when full");
    check(n_under > 0,   "pop refused when empty");
    check(n_both > 0,    "push and pop together");
    check(n_zero > 0,    "step into or out of the zero state");
    check(n_scatter > 0, "non-consecutive address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
