// wrapper_fifo: synchronous first-in first-out buffer used for every field
// of a request or response held inside the wrapper.
//
// The wrapper keeps one such fifo per field (address, byte enables,
// command, write data and end-of-packet on the request side; error, read
// data and end-of-packet on the response side); all fifos of one side are
// pushed and popped together. Head and tail pointers are PTR_W bits wide,
// giving 2**PTR_W slots: the default of 9 bits (512 slots) is enough to
// hold a whole VCI packet. A further wrap bit on each pointer tells a full
// fifo from an empty one, so every slot is usable.
//
// Interface: push with wdata writes at the tail on the rising clock edge;
// rdata always shows the head entry (show-ahead) and pop discards it.
// empty and full are decoded from the registered pointers, so they reflect
// a push or pop from the cycle after it. A push while full or a pop while
// empty is ignored (and flagged by an assertion). Reset is active low and
// synchronous; it empties the fifo. Storage is not reset.
module wrapper_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned PTR_W = 9
) (
  input  logic             clk,
  input  logic             reset_l,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full
);

  localparam int unsigned DEPTH = 1 << PTR_W;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W:0]   head, tail;   // MSB is the wrap bit

  assign empty = (head == tail);
  assign full  = (head[PTR_W-1:0] == tail[PTR_W-1:0]) && (head[PTR_W] != tail[PTR_W]);
  assign rdata = mem[head[PTR_W-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[tail[PTR_W-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!reset_l) begin
      head <= '0;
      tail <= '0;
    end else begin
      if (push && !full) tail <= tail + 1'b1;
      if (pop && !empty) head <= head + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!reset_l) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!reset_l) !(pop && empty));

endmodule
