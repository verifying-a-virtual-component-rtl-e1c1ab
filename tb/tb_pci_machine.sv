// tb_pci_machine: self-checking test of the PCI initiator sequencer.
//
// The testbench plays the request fifos (a queue of {command, end-of-packet}),
// the response fifos (a counter with a depth of 4), the PCI arbiter and a
// PCI target. It acts on the falling clock edge and the sequencer on the
// rising one, so every value is stable when it is looked at.
//
// The arbiter grants REQ# after 0 to 3 clocks. For every address phase the
// target picks an outcome (success, retry or target abort; never more than
// three retries in a row) and 0 to 3 wait states, then holds TRDY#/STOP#/
// DEVSEL# until the sequencer has sampled them with IRDY# asserted.
//
// Checks: an address phase only with a request queued (no garbage
// transaction); FRAME# for exactly one clock, in the clock after GNT# was
// sampled; IRDY# and C/BE# driven in the data phase and AD driven only for
// writes; the data phase lasts the wait states plus one clock; on success
// or abort exactly one pop and one push, with the error bit, the read data
// from AD and the end-of-packet bit of the head request; nothing popped on
// retry; no push into full response fifos. It counts and requires at least
// one of each: read, write, retry, target abort, abort of the last queued
// request, write of the last queued request, stall on full response fifos,
// GNT# wait, target wait state.
module tb_pci_machine;
  import vci_pci_pkg::*;
  localparam int unsigned DATA_W = 32;
  localparam int RSP_DEPTH = 4;
  localparam int N_TXN = 3000;

  logic clk = 1'b0, reset_l = 1'b0;
  logic req_empty, rsp_full, req_pop, rsp_push, rsp_rerr, rsp_reop;
  logic [1:0] head_cmd;
  logic head_eop;
  logic [DATA_W-1:0] rsp_rdata, ad_i = '0;
  logic req_l, gnt_l = 1'b1, frame_l, irdy_l;
  logic trdy_l = 1'b1, stop_l = 1'b1, devsel_l = 1'b1;
  logic addr_phase, ad_oe, cbe_oe;

  pci_machine #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  logic [2:0] reqq[$];          // {cmd, eop}
  int rsp_count = 0;
  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_retry = 0, n_abort = 0, n_last_abort = 0;
  int n_last_write = 0, n_rsp_stall = 0, n_gnt_wait = 0, n_wait_state = 0;
  int completed = 0;

  always_comb begin
    req_empty = (reqq.size() == 0);
    rsp_full  = (rsp_count == RSP_DEPTH);
    {head_cmd, head_eop} = req_empty ? 3'b000 : reqq[0];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic require(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  typedef enum {T_IDLE, T_WAIT, T_RESP} tstate_e;

  initial begin
    tstate_e ts = T_IDLE;
    int wait_n = 0, retries_in_row = 0, data_clocks = 0, gnt_delay = 0;
    int outcome = 0;            // 0 success, 1 retry, 2 abort
    bit is_wr = 1'b0, granted_last = 1'b0, prev_frame = 1'b0;
    int produce_pct = 50, consume_pct = 50, phase_left = 0;
    int qsize_at_resp = 0;

    repeat (2) @(negedge clk);
    reset_l = 1'b1;
    while (completed < N_TXN) begin
      @(negedge clk);
      // traffic phases: bursts, droughts, slow response consumer
      if (phase_left == 0) begin
        phase_left  = 20 + $urandom % 60;
        produce_pct = ($urandom % 3 == 0) ? 0 : 10 + $urandom % 80;
        consume_pct = ($urandom % 4 == 0) ? 0 : 30 + $urandom % 70;
      end
      phase_left--;

      // ---- checks on what the sequencer shows in this clock
      check(!(rsp_push && rsp_full), "push into full response fifos");
      if (!frame_l) begin
        check(!req_empty, "address phase with a request queued");
        check(granted_last, "FRAME# in the clock after GNT# sampled");
        check(!prev_frame, "FRAME# lasts one clock");
        check(irdy_l && addr_phase && ad_oe && cbe_oe, "address phase drives AD and C/BE#");
      end
      if (!irdy_l) begin
        check(frame_l && cbe_oe && !addr_phase, "data phase signalling");
        check(ad_oe == is_wr, "AD driven only in a write data phase");
      end
      if (!req_l && !req_empty && rsp_full) n_rsp_stall++;
      if (dut.curr_state == S_IDLE && !req_empty && rsp_full) n_rsp_stall++;
      prev_frame   = !frame_l;

      // ---- arbiter
      if (!req_l) begin
        if (gnt_l) begin
          if (gnt_delay == 0) gnt_delay = 1 + $urandom % 4;
          gnt_delay--;
          if (gnt_delay == 0) gnt_l = 1'b0; else n_gnt_wait++;
        end
      end else begin
        gnt_l = 1'b1;
        gnt_delay = 0;
      end
      granted_last = !req_l && !gnt_l;

      // ---- target
      unique case (ts)
        T_IDLE: if (!frame_l && !req_empty) begin
          is_wr  = is_write(reqq[0][2:1]);
          wait_n = $urandom % 4;
          outcome = ($urandom % 100 < 20 && retries_in_row < 3) ? 1 :
                    ($urandom % 100 < 20) ? 2 : 0;
          data_clocks = 0;
          ts = T_WAIT;
        end
        T_WAIT: begin
          data_clocks++;
          check(!irdy_l, "IRDY# held through wait states");
          if (wait_n == 0) begin
            unique case (outcome)
              0: begin trdy_l = 1'b0; stop_l = 1'b1; devsel_l = 1'b0; end
              1: begin trdy_l = 1'b1; stop_l = 1'b0; devsel_l = 1'b0; end
              default: begin trdy_l = 1'b1; stop_l = 1'b0; devsel_l = 1'b1; end
            endcase
            ad_i = is_wr ? '0 : {$urandom};
            #1;
            // the sequencer samples these on the next rising edge
            check(req_pop == (outcome != 1), "pop on success or abort only");
            check(rsp_push == req_pop, "one response per retired request");
            if (req_pop) begin
              check(rsp_rerr == (outcome == 2), "error bit on target abort");
              check(rsp_reop == reqq[0][0], "end-of-packet copied");
              if (!is_wr && outcome == 0) check(rsp_rdata == ad_i, "read data from AD");
            end
            qsize_at_resp = reqq.size();
            ts = T_RESP;
          end else begin
            n_wait_state++;
            wait_n--;
          end
        end
        T_RESP: begin
          // the rising edge has consumed the response
          check(data_clocks == 0 || irdy_l, "data phase ended on the response");
          trdy_l = 1'b1; stop_l = 1'b1; devsel_l = 1'b1; ad_i = '0;
          unique case (outcome)
            0: begin
              if (is_wr) n_write++; else n_read++;
              if (is_wr && qsize_at_resp == 1) n_last_write++;
              retries_in_row = 0;
            end
            1: begin n_retry++; retries_in_row++; end
            default: begin
              n_abort++;
              if (qsize_at_resp == 1) n_last_abort++;
              retries_in_row = 0;
            end
          endcase
          if (outcome != 1) begin
            void'(reqq.pop_front());
            rsp_count++;
            completed++;
          end
          ts = T_IDLE;
        end
        default: ts = T_IDLE;
      endcase

      // ---- fifos: new requests, response consumer
      if (reqq.size() < 4 && ($urandom % 100) < produce_pct)
        reqq.push_back({2'($urandom), 1'($urandom)});
      if (rsp_count > 0 && ($urandom % 100) < consume_pct) rsp_count--;
    end

    require(n_read, "read");
    require(n_write, "write");
    require(n_retry, "retry");
    require(n_abort, "target abort");
    require(n_last_abort, "target abort of the last queued request");
    require(n_last_write, "write of the last queued request");
    require(n_rsp_stall, "stall on full response fifos");
    require(n_gnt_wait, "GNT# wait");
    require(n_wait_state, "target wait state");
    $display("reads=%0d writes=%0d retries=%0d aborts=%0d last_aborts=%0d last_writes=%0d",
             n_read, n_write, n_retry, n_abort, n_last_abort, n_last_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
