// lfsr_stack: stack (LIFO memory) whose pointer is an up-down LFSR.
//
// A stack needs an address that goes up by one on PUSH and down by one on
// POP. Here that address comes from updown_lfsr instead of an up-down
// counter: the addresses are visited in pseudo-random order, but the order
// going down is exactly the reverse of the order going up, which is all a
// stack needs. Data therefore lands scattered over the memory, which also
// scrambles where consecutive pushes are stored. The design has the two
// blocks of the document's stack, the memory module (stack_mem, read
// asynchronously) and the address generator, plus the small decode of
// PUSH and POP into the generator's enable and direction.
//
// The pointer sp names the top of the stack, the slot written last. PUSH
// writes data_in to the slot after sp (addr_nxt of the generator going up)
// and moves sp there; POP moves sp to the slot before it. data_out always
// shows the word at sp, so during a POP cycle it holds the word being
// popped. Empty and full are found without a counter: both mean sp is
// back at its reset value INIT, and the flags record which way it came
// back. With the default zero-state splice all 2^N slots are usable;
// without it (ZERO_FIX = 0) the stack holds 2^N - 1 entries. These flags, the rejection of a PUSH
// when full and a POP when empty (overflow / underflow, combinational
// for the cycle of the request), and ignoring a cycle that asks for PUSH
// and POP together, are this design's own choices.
//
// Timing: one operation per clock; sp, the flags and the memory update at
// the rising clk edge. rst_n is asynchronous and active low; the memory
// contents are not reset.
module lfsr_stack #(
  parameter int unsigned   N      = stack_pkg::LFSR_STAGES,
  parameter logic [N:0]    POLY   = stack_pkg::LFSR_POLY,
  parameter int unsigned   DATA_W = stack_pkg::STACK_DATA_W,
  parameter logic [N-1:0]  DINV   = '0,     // Q / Q-bar choice per stage
  parameter bit            ZERO_FIX = 1'b1, // use all 2^N addresses
  parameter logic [N-1:0]  INIT   = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic              pop,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              empty,
  output logic              full,
  output logic              overflow,   // PUSH refused, stack full
  output logic              underflow,  // POP refused, stack empty
  output logic [N-1:0]      sp          // physical address of the top entry
);
  logic         do_push, do_pop;
  logic         up_dn;
  logic [N-1:0] sp_nxt;
  logic [N-1:0] mem_addr;

  always_comb begin
    do_push   = push & ~pop & ~full;
    do_pop    = pop & ~push & ~empty;
    overflow  = push & ~pop & full;
    underflow = pop & ~push & empty;
    up_dn     = pop ? stack_pkg::DIR_DOWN : stack_pkg::DIR_UP;
    mem_addr  = do_push ? sp_nxt : sp;
  end

  updown_lfsr #(.N(N), .POLY(POLY), .DINV(DINV), .ZERO_FIX(ZERO_FIX), .INIT(INIT)) u_addr_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (do_push | do_pop),
    .up_dn    (up_dn),
    .addr     (sp),
    .addr_nxt (sp_nxt)
  );

  stack_mem #(.DATA_W(DATA_W), .ADDR_W(N)) u_mem (
    .clk   (clk),
    .we    (do_push),
    .addr  (mem_addr),
    .wdata (data_in),
    .rdata (data_out)
  );

  // Returning to INIT going up means every slot is in use; going down, none.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      empty <= 1'b1;
      full  <= 1'b0;
    end else if (do_push) begin
      empty <= 1'b0;
      full  <= (sp_nxt == INIT);
    end else if (do_pop) begin
      full  <= 1'b0;
      empty <= (sp_nxt == INIT);
    end
  end

  a_not_full_and_empty: assert property (@(posedge clk) !(full && empty))
    else $error("lfsr_stack: full and empty at the same time");
endmodule
