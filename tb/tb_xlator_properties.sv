// tb_xlator_properties: the wrapper's three liveness and three safety
// properties, checked by simulation on the reduced configuration (2-bit
// address and data, 2-bit fifo pointers, 4 slots per fifo).
//
// The environment is deliberately loose: the PCI side drives TRDY#, STOP#
// and DEVSEL# at random in every clock, whether the wrapper samples them
// or not, and the VCI side raises CMDVAL and RSPACK at random. Only these
// rules are kept:
//   1 no CMDVAL during reset;            2 CMDVAL held until CMDACK;
//   3 GNT# eventually follows REQ#;      4 no endless retries where the
//                                          wrapper samples the response;
//   5 every response eventually acked;   6 TRDY# eventually follows FRAME#;
//   7 RSPACK only with RSPVAL;           8 (kept by the wrapper) REQ# held
//                                          until GNT#.
// Properties (liveness bounded to LIVE_BOUND clocks):
//   L1 CMDVAL is eventually acknowledged;
//   L2 an accepted request is eventually followed by FRAME#;
//   L3 an accepted request is eventually followed by RSPVAL;
//   S1 no CMDACK without CMDVAL;
//   S2 no FRAME# without an accepted, unfinished request;
//   S3 no RSPVAL without an accepted, unanswered request.
// S2 and S3 are checked in the stronger, counting form: a transaction or
// a response needs a request that has not yet had one. REQ# held until
// GNT# (rule 8) is checked too. A mid-run reset is included.
module tb_xlator_properties;
  import vci_pci_pkg::*;
  localparam int DATA_W = 2;
  localparam int PTR_W  = 2;
  localparam int CYCLES = 200000;
  localparam int LIVE_BOUND = 400;

  logic clk = 1'b0, reset_l = 1'b0;
  logic cmdval = 1'b0, cmdack, eop = 1'b0, rspval, rspack = 1'b0, reop, rerror;
  logic [DATA_W-1:0] address = '0, wdata = '0, rdata, ad_o, ad_i = '0;
  logic [3:0] be = '0, cbe_l;
  logic [1:0] cmd = '0;
  logic cfixed = 1'b0, contig = 1'b1, wrap = 1'b0;
  logic [7:0] clen = '0;
  logic [8:0] plen = 9'd1;
  logic req_l, gnt_l = 1'b1, frame_l, irdy_l, idsel, cbe_oe, par, par_oe, ad_oe, serr_l;
  logic perr_l = 1'b1, trdy_l = 1'b1, stop_l = 1'b1, devsel_l = 1'b1;

  xlator #(.DATA_W(DATA_W), .PTR_W(PTR_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int accepted = 0, frames_needed = 0, answered = 0, retired = 0;
  int n_l1 = 0, n_l2 = 0, n_l3 = 0, n_retry = 0, n_abort = 0, n_ok = 0, n_full = 0;
  int wait_ack = 0, wait_frame = 0, wait_rsp = 0, wait_gnt = 0, wait_trdy = 0, retry_row = 0;
  bit  pend_frame = 1'b0, pend_rsp = 1'b0;

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
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    bit sampled, hs, req_was = 1'b0, gnt_was = 1'b1;
    repeat (3) @(negedge clk);
    reset_l = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // mid-run reset; rule 1: CMDVAL low during reset
      if (cyc == CYCLES / 2) begin
        cmdval = 1'b0; rspack = 1'b0; reset_l = 1'b0;
        repeat (2) @(negedge clk);
        reset_l = 1'b1;
        accepted = 0; answered = 0; retired = 0;
        pend_frame = 1'b0; pend_rsp = 1'b0; wait_ack = 0; wait_frame = 0; wait_rsp = 0;
        gnt_l = 1'b1; wait_gnt = 0; wait_trdy = 0; retry_row = 0; req_was = 1'b0;
        continue;
      end

      // rule 8 (the wrapper's side): REQ# held until GNT# sampled
      if (req_was && gnt_was) check(!req_l, "REQ# held until GNT#");

      // ---- PCI environment: random responses at any time
      trdy_l = 1'($urandom); stop_l = 1'($urandom); devsel_l = 1'($urandom);
      ad_i = DATA_W'($urandom);
      sampled = (dut.ul.curr_state == S_READ_DATA) || (dut.ul.curr_state == S_WRITE_DATA);
      if (sampled) begin
        wait_trdy++;
        // rule 4: no endless retries; rule 6: TRDY# eventually
        if ((trdy_l && !stop_l && !devsel_l && retry_row >= 3) || wait_trdy > 8) begin
          trdy_l = 1'b0; stop_l = 1'b1;
        end
      end else begin
        wait_trdy = 0;
      end
      // rule 3: GNT# eventually after REQ#
      if (!req_l) begin
        wait_gnt++;
        gnt_l = !(($urandom % 4 == 0) || wait_gnt > 6);
      end else begin
        wait_gnt = 0;
        gnt_l = 1'($urandom);
      end

      // ---- VCI environment: rule 2 CMDVAL held until acked, rule 7
      if (!cmdval && ($urandom % 3 == 0)) begin
        cmdval = 1'b1; cmd = 2'($urandom); address = DATA_W'($urandom);
        wdata = DATA_W'($urandom); be = 4'($urandom); eop = 1'($urandom);
      end
      #1;
      rspack = rspval && (($urandom % 100) < 40);
      #1;

      // ---- properties, on the values the coming rising edge samples
      check(!(cmdack && !cmdval), "S1: CMDACK only with CMDVAL");
      if (!frame_l) begin
        check(accepted > retired, "S2: FRAME# only for an accepted, unfinished request");
        n_l2 += pend_frame;
        pend_frame = 1'b0;
        wait_frame = 0;
      end
      if (rspval) begin
        check(accepted > answered, "S3: RSPVAL only for an accepted, unanswered request");
        n_l3 += pend_rsp;
        pend_rsp = 1'b0;
        wait_rsp = 0;
      end
      if (dut.rq_any_full) n_full++;
      if (dut.ul.req_pop) begin
        retired++;
        if (dut.ul.tabort) n_abort++; else n_ok++;
        retry_row = 0;
      end
      if (sampled && dut.ul.retry) begin
        n_retry++;
        retry_row++;
      end
      if (cmdval && cmdack) begin
        accepted++;
        n_l1++;
        wait_ack = 0;
        pend_frame = 1'b1;
        pend_rsp = 1'b1;
      end
      if (rspval && rspack) answered++;
      if (cmdval && !cmdack) wait_ack++;
      if (pend_frame) wait_frame++;
      if (pend_rsp) wait_rsp++;
      check(wait_ack < LIVE_BOUND, "L1: CMDVAL eventually acknowledged");
      check(wait_frame < LIVE_BOUND, "L2: FRAME# eventually after an accepted request");
      check(wait_rsp < LIVE_BOUND, "L3: RSPVAL eventually after an accepted request");

      hs = cmdval && cmdack;
      req_was = !req_l;
      gnt_was = gnt_l;
      @(posedge clk);
      #1;
      // a request is dropped only once it has been acknowledged
      if (hs) cmdval = 1'b0;
    end
    require(n_l1, "accepted request");
    require(n_l2, "FRAME# after an accepted request");
    require(n_l3, "RSPVAL after an accepted request");
    require(n_retry, "retry sampled");
    require(n_abort, "target abort");
    require(n_ok, "successful transfer");
    require(n_full, "request fifos full");
    $display("accepted=%0d retired=%0d ok=%0d aborts=%0d retries=%0d full_clocks=%0d",
             accepted, retired, n_ok, n_abort, n_retry, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
