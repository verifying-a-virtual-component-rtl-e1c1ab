// tb_vci_request: self-checking test of the VCI request machine.
//
// Random CMDVAL, request fields, fifo-full and reset values are applied.
// CMDACK and the fifo push must be high exactly when CMDVAL is high, the
// wrapper is out of reset and the fifos have room; the fields must reach
// the fifo inputs unchanged. A small clocked model also checks that a
// request held until acknowledged is pushed exactly once.
module tb_vci_request;
  logic clk = 1'b0;
  logic reset_l, cmdval, cmdack, eop, fifo_full, fifo_push, fifo_eop;
  logic [31:0] address, wdata, fifo_address, fifo_wdata;
  logic [3:0] be, fifo_be;
  logic [1:0] cmd, fifo_cmd;
  int checks = 0, failures = 0;
  int pushes = 0, requests = 0;

  vci_request #(.ADDR_W(32), .DATA_W(32), .BE_W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    bit want;
    // combinational behaviour
    for (int i = 0; i < 2000; i++) begin
      reset_l = ($urandom % 8) != 0; cmdval = 1'($urandom); fifo_full = ($urandom % 4) == 0;
      address = $urandom; wdata = $urandom; be = 4'($urandom); cmd = 2'($urandom); eop = 1'($urandom);
      #1;
      want = reset_l && cmdval && !fifo_full;
      check(cmdack == want, "CMDACK gating");
      check(fifo_push == want, "push equals handshake");
      check(fifo_address == address && fifo_wdata == wdata && fifo_be == be &&
            fifo_cmd == cmd && fifo_eop == eop, "fields reach fifos");
    end
    // handshake: each request held until acknowledged, pushed once
    reset_l = 1'b1;
    for (int r = 0; r < 200; r++) begin
      cmdval = 1'b1; address = r;
      requests++;
      do begin
        fifo_full = ($urandom % 3) == 0;
        @(posedge clk);
        if (fifo_push) begin
          pushes++;
          check(fifo_address == 32'(r), "pushed request is the one offered");
        end
      end while (!(cmdval && cmdack));
      #1 cmdval = 1'b0;
      if ($urandom % 2) @(posedge clk);
      #1;
      check(!cmdack, "no CMDACK without CMDVAL");
    end
    check(pushes == requests, "one push per request");
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
