// pci_machine: PCI 2.1 initiator sequencer of the wrapper.
//
// It takes the request at the head of the request fifos through one PCI
// transaction with a single data phase and writes the result into the
// response fifos. States and the outputs asserted in each:
//   RESET      everything deasserted, left when reset is released
//   IDLE       everything deasserted; leaves for REQ_ARB when a request waits
//   REQ_ARB    REQ# asserted until GNT# is sampled asserted
//   ADDRESS    FRAME# asserted, AD = address, C/BE# = PCI command (1 clock)
//   READ_DATA  IRDY# asserted, C/BE# = byte enables, AD released to the target
//   WRITE_DATA IRDY# asserted, C/BE# = byte enables, AD = write data
//   READ_DONE  everything deasserted (one turnaround clock after a read)
//   RECOVER    everything deasserted; one wait clock after every finished
//              transaction so the fifos' empty flag reflects the pop
// FRAME# is deasserted in both data states because every transaction has a
// single data phase.
//
// Outcome of a data phase, sampled on each rising edge in READ_DATA or
// WRITE_DATA:
//   TRDY# asserted           success: pop the request, push a response
//                            (read data from AD for a read), go to
//                            READ_DONE (read) or RECOVER (write)
//   STOP#, DEVSEL# asserted  retry: keep the request at the fifo head and
//                            go straight back to REQ_ARB (busy-wait)
//   STOP# asserted only      target abort: pop the request, push an error
//                            response, go to RECOVER
//   otherwise                wait state, stay
// A new transaction is started (IDLE or RECOVER to REQ_ARB) only when the
// request fifos are not empty and the response fifos are not full, so a
// finished transaction always finds room for its response.
//
// The states, their outputs and the arbitration, address and data
// transitions follow the published state diagram of the wrapper; the
// recovery state follows the described correction of its two flaws (a
// target abort or a write on the last queued request started a garbage
// transaction). Retry and abort decoding follow the PCI signalling, and the
// response-full check, the single data phase, the state numbering and the
// absence of master-abort timing are this design's own choices.
module pci_machine
  import vci_pci_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              reset_l,
  // request fifos (head) and response fifos
  input  logic              req_empty,
  input  logic [1:0]        head_cmd,
  input  logic              head_eop,
  output logic              req_pop,
  input  logic              rsp_full,
  output logic              rsp_push,
  output logic              rsp_rerr,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic              rsp_reop,
  // PCI control
  output logic              req_l,
  input  logic              gnt_l,
  output logic              frame_l,
  output logic              irdy_l,
  input  logic              trdy_l,
  input  logic              stop_l,
  input  logic              devsel_l,
  input  logic [DATA_W-1:0] ad_i,
  // controls for the address/data and command/byte-enable multiplexers
  output logic              addr_phase,
  output logic              ad_oe,
  output logic              cbe_oe
);

  pci_state_e curr_state, next_state;
  logic       ready_to_start, success, retry, tabort;

  always_comb begin
    ready_to_start = !req_empty && !rsp_full;
    success = !trdy_l;
    retry   = trdy_l && !stop_l && !devsel_l;
    tabort  = trdy_l && !stop_l && devsel_l;
  end

  always_comb begin
    next_state = curr_state;
    unique case (curr_state)
      S_RESET:      next_state = S_IDLE;
      S_IDLE:       if (ready_to_start) next_state = S_REQ_ARB;
      S_REQ_ARB:    if (!gnt_l) next_state = S_ADDRESS;
      S_ADDRESS:    next_state = is_write(head_cmd) ? S_WRITE_DATA : S_READ_DATA;
      S_READ_DATA: begin
        if (success)     next_state = S_READ_DONE;
        else if (retry)  next_state = S_REQ_ARB;
        else if (tabort) next_state = S_RECOVER;
      end
      S_WRITE_DATA: begin
        if (success || tabort) next_state = S_RECOVER;
        else if (retry)        next_state = S_REQ_ARB;
      end
      S_READ_DONE:  next_state = S_RECOVER;
      S_RECOVER:    next_state = ready_to_start ? S_REQ_ARB : S_IDLE;
      default:      next_state = S_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!reset_l) curr_state <= S_RESET;
    else          curr_state <= next_state;
  end

  // Fifo side: a data phase that ends in success or target abort retires
  // the head request and produces exactly one response.
  always_comb begin
    logic in_data;
    in_data   = (curr_state == S_READ_DATA) || (curr_state == S_WRITE_DATA);
    req_pop   = in_data && (success || tabort);
    rsp_push  = req_pop;
    rsp_rerr  = tabort;
    rsp_reop  = head_eop;
    rsp_rdata = (curr_state == S_READ_DATA && success) ? ad_i : '0;
  end

  // PCI outputs, decoded from the state (active low).
  always_comb begin
    req_l      = !(curr_state == S_REQ_ARB);
    frame_l    = !(curr_state == S_ADDRESS);
    irdy_l     = !((curr_state == S_READ_DATA) || (curr_state == S_WRITE_DATA));
    addr_phase = (curr_state == S_ADDRESS);
    ad_oe      = (curr_state == S_ADDRESS) || (curr_state == S_WRITE_DATA);
    cbe_oe     = (curr_state == S_ADDRESS) || (curr_state == S_READ_DATA) ||
                 (curr_state == S_WRITE_DATA);
  end

  // A transaction is only started for a request that is really queued.
  a_frame_has_request: assert property (@(posedge clk) disable iff (!reset_l)
    (curr_state == S_ADDRESS) |-> !req_empty);
  a_push_has_room: assert property (@(posedge clk) disable iff (!reset_l)
    rsp_push |-> !rsp_full);

endmodule
