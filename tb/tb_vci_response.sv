// tb_vci_response: self-checking test of the VCI response machine.
//
// A queue stands in for the three response fifos. Random responses are
// written into it and RSPACK is driven at random. Every cycle RSPVAL must
// be high exactly when the queue holds an entry (out of reset), RDATA,
// REOP and RERROR must show the head entry, and a pop must be issued
// exactly on an RSPVAL/RSPACK handshake. All responses must come out in
// order.
module tb_vci_response;
  logic clk = 1'b0, reset_l = 1'b0;
  logic fifo_empty, fifo_rerr, fifo_reop, fifo_pop, rspval, rspack, reop, rerror;
  logic [31:0] fifo_rdata, rdata;
  int checks = 0, failures = 0;
  logic [33:0] q[$];
  logic [33:0] sent[$];
  int received = 0;

  vci_response #(.DATA_W(32)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    fifo_empty = (q.size() == 0);
    {fifo_rerr, fifo_reop, fifo_rdata} = (q.size() != 0) ? q[0] : 34'h0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [33:0] r;
    rspack = 1'b0;
    #1;
    q.push_back(34'h1);
    #1;
    check(!rspval, "no RSPVAL in reset");
    q.delete();
    @(posedge clk); #1 reset_l = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      if (($urandom % 3) == 0) begin
        r = {2'($urandom), 32'($urandom)};
        q.push_back(r);
        sent.push_back(r);
      end
      rspack = 1'($urandom);
      #1;
      check(rspval == (q.size() != 0), "RSPVAL when fifo not empty");
      check(fifo_pop == (rspval && rspack), "pop on handshake");
      if (rspval) begin
        check({rerror, reop, rdata} == sent[received], "response in order and unchanged");
      end
      @(posedge clk);
      if (rspval && rspack) begin
        void'(q.pop_front());
        received++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
