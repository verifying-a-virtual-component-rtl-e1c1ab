// tb_xlator: end-to-end test of the VCI-to-PCI wrapper at its default
// size (32-bit buses, 512-slot fifos).
//
// A VCI initiator in this testbench issues requests; pci_target_model plays
// the PCI arbiter and a memory target that retries at random and
// target-aborts one address region. A reference memory in the testbench
// gives the expected response of each request when it is accepted, since
// the wrapper performs requests strictly in order.
//
// Traffic, in four parts:
//   1. mixed random traffic with a random response acknowledge;
//   2. RSPACK held low until both the response and the request fifos are
//      full and CMDACK stays low, then drained;
//   3. single requests, each waiting for its response, so that a write or
//      a target abort is often the last queued request;
//   4. more mixed traffic.
// Checks: each response (RDATA for reads, RERROR, REOP) in order; every
// PCI attempt carries the address, command, byte enables and write data of
// the oldest unfinished request; as many finished PCI transactions as
// requests (no garbage transaction); no parity or protocol error seen by
// the target; CMDACK only with CMDVAL; no RSPVAL before a request; the
// request-to-FRAME# latency on an idle bus. Each mechanism of the design
// must happen at least once: read, write, locked read, retry, target
// abort, abort and write of the last queued request, GNT# wait, target
// wait state, CMDACK back-pressure from full request fifos, RSPVAL held by
// the initiator, and the PCI side waiting on full response fifos.
module tb_xlator;
  import vci_pci_pkg::*;
  localparam int DATA_W = 32;
  localparam int DEPTH  = 512;   // default fifo size of the wrapper

  logic clk = 1'b0, reset_l = 1'b0;
  logic cmdval = 1'b0, cmdack, eop = 1'b0, rspval, rspack = 1'b0, reop, rerror;
  logic [DATA_W-1:0] address = '0, wdata = '0, rdata;
  logic [3:0] be = '0;
  logic [1:0] cmd = '0;
  logic cfixed = 1'b0, contig = 1'b1, wrap = 1'b0;
  logic [7:0] clen = '0;
  logic [8:0] plen = 9'd4;
  logic req_l, gnt_l, frame_l, irdy_l, idsel, cbe_oe, par, par_oe, ad_oe, serr_l;
  logic perr_l = 1'b1, trdy_l, stop_l, devsel_l;
  logic [3:0] cbe_l;
  logic [DATA_W-1:0] ad_o, ad_i;

  xlator dut (.*);

  pci_target_model #(.DATA_W(DATA_W)) u_target (
    .clk, .reset_l, .req_l, .gnt_l, .frame_l, .irdy_l, .cbe_l, .cbe_oe,
    .ad_o, .ad_oe, .par, .par_oe, .ad_i, .trdy_l, .stop_l, .devsel_l);

  always #5 clk = ~clk;

  typedef struct {
    logic [DATA_W-1:0] addr;
    logic [1:0]        cmd;
    logic [3:0]        be;
    logic [DATA_W-1:0] wdata;
    logic              eop;
    logic              rerror;
    logic [DATA_W-1:0] rdata;
  } req_t;

  req_t pending_pci[$];      // accepted, not yet finished on PCI
  req_t pending_rsp[$];      // accepted, response not yet received
  logic [DATA_W-1:0] refmem [logic [DATA_W-1:0]];

  int checks = 0, failures = 0;
  int accepted = 0, responses = 0, pci_done = 0;
  int n_locked = 0, n_cmd_stall = 0, n_rsp_hold = 0, n_rsp_full_wait = 0;
  int n_last_abort = 0, n_last_write = 0, n_latency_checked = 0;
  int mode_rspack_pct = 50;
  bit hold_rspack = 1'b0;
  int stall_streak = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic require(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  function automatic logic [DATA_W-1:0] be_mask(input logic [3:0] b);
    logic [DATA_W-1:0] m = '0;
    for (int i = 0; i < 4; i++) if (b[i]) m[i*8 +: 8] = 8'hFF;
    return m;
  endfunction

  function automatic logic [DATA_W-1:0] ref_read(input logic [DATA_W-1:0] a);
    logic [DATA_W-1:0] w = a >> 2;
    return refmem.exists(w) ? refmem[w] : u_target.mem_default(w);
  endfunction

  function automatic req_t new_request();
    req_t r;
    int k = $urandom % 100;
    r.cmd = (k < 40) ? VCI_READ : (k < 85) ? VCI_WRITE : (k < 95) ? VCI_LOCKED_RD : VCI_NOP;
    if ($urandom % 100 < 12) r.addr = {4'hE, 26'($urandom % 16), 2'b00};
    else                     r.addr = {4'h1, 20'h0, 6'($urandom % 48), 2'b00};
    r.be    = 4'($urandom);
    if (r.be == 4'h0) r.be = 4'hF;
    r.wdata = $urandom;
    r.eop   = 1'($urandom);
    r.rerror = 1'b0;
    r.rdata  = '0;
    return r;
  endfunction

  // The reference model: what the response to r must be.
  function automatic req_t expect_of(input req_t r);
    req_t e = r;
    logic [DATA_W-1:0] w = r.addr >> 2;
    e.rerror = (r.addr[DATA_W-1 -: 4] == 4'hE);
    if (!e.rerror) begin
      if (r.cmd == VCI_WRITE) refmem[w] = (ref_read(r.addr) & ~be_mask(r.be)) | (r.wdata & be_mask(r.be));
      else e.rdata = ref_read(r.addr);
    end
    return e;
  endfunction

  // ---------------------------------------------------------- VCI initiator
  // Offer a request and hold it until acknowledged (drives at the falling
  // edge; the transfer happens at the next rising edge).
  task automatic send(input req_t r);
    cmdval = 1'b1; address = r.addr; cmd = r.cmd; be = r.be; wdata = r.wdata; eop = r.eop;
    forever begin
      #1;
      if (cmdack) break;
      n_cmd_stall++;
      stall_streak++;
      @(negedge clk);
    end
    stall_streak = 0;
    pending_pci.push_back(r);
    pending_rsp.push_back(expect_of(r));
    if (r.cmd == VCI_LOCKED_RD) n_locked++;
    accepted++;
    @(negedge clk);
    cmdval = 1'b0;
  endtask

  // ------------------------------------------------ response side and PCI log
  initial begin
    req_t e;
    forever begin
      @(negedge clk);
      rspack = !hold_rspack && (($urandom % 100) < mode_rspack_pct);
      #2;
      check(!(cmdack && !cmdval), "CMDACK only with CMDVAL");
      if (rspval && accepted == 0) check(1'b0, "RSPVAL before any request");
      if (rspval && !rspack) n_rsp_hold++;
      if (dut.rs_any_full && !dut.rq_any_empty &&
          (dut.ul.curr_state == S_IDLE || dut.ul.curr_state == S_RECOVER)) n_rsp_full_wait++;
      if (dut.ul.req_pop && dut.address_fifo.tail - dut.address_fifo.head == 1) begin
        if (dut.ul.tabort) n_last_abort++;
        if (dut.ul.curr_state == S_WRITE_DATA && dut.ul.success) n_last_write++;
      end
      if (rspval && rspack) begin
        if (pending_rsp.size() == 0) check(1'b0, "response without a request");
        else begin
          e = pending_rsp.pop_front();
          check(rerror == e.rerror, "RERROR");
          check(reop == e.eop, "REOP");
          if (!e.rerror && e.cmd != VCI_WRITE) check(rdata == e.rdata, "RDATA");
          responses++;
        end
      end
      // PCI attempts logged by the target, in order
      while (u_target.log.size() != 0) begin
        logic [DATA_W-1:0] a_addr, a_wdata;
        logic [3:0] a_cmd, a_be;
        int a_outcome;
        a_addr = u_target.log[0].addr; a_wdata = u_target.log[0].wdata;
        a_cmd = u_target.log[0].cmd; a_be = u_target.log[0].be;
        a_outcome = u_target.log[0].outcome;
        void'(u_target.log.pop_front());
        if (pending_pci.size() == 0) begin
          check(1'b0, "PCI transaction with no request outstanding");
        end else begin
          e = pending_pci[0];
          check(a_addr == e.addr, "PCI address is the oldest request's");
          check(a_cmd == (e.cmd == VCI_WRITE ? PCI_MEM_WRITE : PCI_MEM_READ), "PCI command");
          check(a_be == e.be, "PCI byte enables");
          if (e.cmd == VCI_WRITE) check(a_wdata == e.wdata, "PCI write data");
          if (a_outcome != 1) begin
            void'(pending_pci.pop_front());
            pci_done++;
          end
        end
      end
    end
  end

  task automatic wait_all_responses(input int limit);
    int n = 0;
    while (pending_rsp.size() != 0 && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(pending_rsp.size() == 0, "all responses returned");
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    reset_l = 1'b1;
    repeat (2) @(negedge clk);

    // latency on an idle bus: acknowledge edge to FRAME#, given GNT# delay
    for (int i = 0; i < 20; i++) begin
      int lat = 0, g0 = 0;
      req_t r = new_request();
      r.addr[DATA_W-1 -: 4] = 4'h1;
      g0 = u_target.n_gnt_wait;
      send(r);
      // the send task returns one clock after the acknowledge edge
      lat = 1;
      while (frame_l) begin
        @(negedge clk);
        lat++;
      end
      // acknowledge edge -> IDLE sees the entry (1) -> REQ_ARB, one clock
      // plus any extra grant wait (1) -> ADDRESS (1)
      check(lat == 3 + (u_target.n_gnt_wait - g0), "request to FRAME# latency");
      n_latency_checked++;
      wait_all_responses(1000);
    end

    // part 1: mixed traffic
    mode_rspack_pct = 60;
    for (int i = 0; i < 1500; i++) begin
      send(new_request());
      if ($urandom % 4 == 0) repeat ($urandom % 6) @(negedge clk);
    end

    // part 2: fill everything; RSPACK is released once CMDACK has been
    // held low for 50 clocks
    hold_rspack = 1'b1;
    fork
      begin
        wait (stall_streak > 50);
        check(dut.rq_any_full && dut.rs_any_full, "both fifo sets full when CMDACK stalls");
        hold_rspack = 1'b0;
      end
    join_none
    for (int i = 0; i < 2 * DEPTH + 8; i++) send(new_request());
    wait (!hold_rspack);
    hold_rspack = 1'b0;
    mode_rspack_pct = 100;
    wait_all_responses(100000);

    // part 3: one request at a time
    mode_rspack_pct = 80;
    for (int i = 0; i < 300; i++) begin
      send(new_request());
      wait_all_responses(2000);
    end

    // part 4: mixed traffic again
    mode_rspack_pct = 40;
    for (int i = 0; i < 1500; i++) send(new_request());
    mode_rspack_pct = 100;
    wait_all_responses(100000);
    repeat (10) @(negedge clk);

    check(pci_done == accepted, "one finished PCI transaction per request");
    check(responses == accepted, "one response per request");
    check(u_target.errors == 0, "PCI target saw no protocol or parity error");
    check(u_target.n_parity_checked > 0, "parity checked");
    check(idsel == 1'b0 && serr_l == 1'b1, "IDSEL and SERR# idle");
    require(u_target.n_read, "PCI read");
    require(u_target.n_write, "PCI write");
    require(n_locked, "locked read");
    require(u_target.n_retry, "retry");
    require(u_target.n_abort, "target abort");
    require(n_last_abort, "target abort of the last queued request");
    require(n_last_write, "write of the last queued request");
    require(u_target.n_gnt_wait, "GNT# wait");
    require(u_target.n_wait, "target wait state");
    require(n_cmd_stall, "CMDACK held low by full request fifos");
    require(n_rsp_hold, "RSPVAL held by the initiator");
    require(n_rsp_full_wait, "PCI side waiting on full response fifos");
    require(n_latency_checked, "latency measured");
    $display("requests=%0d reads=%0d writes=%0d retries=%0d aborts=%0d last_aborts=%0d last_writes=%0d",
             accepted, u_target.n_read, u_target.n_write, u_target.n_retry, u_target.n_abort,
             n_last_abort, n_last_write);
    $display("cmdack_stalls=%0d rsp_holds=%0d rsp_full_waits=%0d parity_checks=%0d",
             n_cmd_stall, n_rsp_hold, n_rsp_full_wait, u_target.n_parity_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d accepted, %0d responses", accepted, responses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
