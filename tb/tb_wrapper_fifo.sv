// tb_wrapper_fifo: self-checking test of the wrapper fifo at its default
// size (32-bit entries, 9-bit pointers, 512 slots).
//
// A queue serves as the reference. The test fills the fifo to full, checks
// that full rises exactly at 512 entries and that a further push is held
// off, drains it to empty, then runs random simultaneous pushes and pops.
// Every cycle it compares empty, full and the head entry with the queue.
module tb_wrapper_fifo;
  localparam int unsigned WIDTH = 32;
  localparam int unsigned PTR_W = 9;
  localparam int unsigned DEPTH = 1 << PTR_W;

  logic clk = 1'b0, reset_l = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  wrapper_fifo #(.WIDTH(WIDTH), .PTR_W(PTR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Compare flags and head with the model, then apply one cycle.
  task automatic step(input bit do_push, input bit do_pop);
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() != 0) check(rdata == model[0], "head data");
    push  = do_push && !full;
    pop   = do_pop && !empty;
    wdata = $urandom;
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (push) model.push_back(wdata);
    #1;
    push = 1'b0;
    pop  = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 reset_l = 1'b1;
    // fill to full
    for (int i = 0; i < DEPTH; i++) step(1'b1, 1'b0);
    check(full && model.size() == DEPTH, "full after DEPTH pushes");
    // push while full is refused
    step(1'b1, 1'b0);
    check(model.size() == DEPTH, "push refused when full");
    // simultaneous push and pop when full: only the pop happens
    step(1'b1, 1'b1);
    // drain
    while (model.size() != 0) step(1'b0, 1'b1);
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 5000; i++) step(($urandom % 100) < 55, ($urandom % 100) < 50);
    // reset empties
    reset_l = 1'b0;
    @(posedge clk); #1;
    reset_l = 1'b1;
    model.delete();
    check(empty && !full, "reset empties the fifo");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
