// xlator: VCI-to-PCI 2.1 bus wrapper (top level).
//
// A VCI initiator issues request cells on one side; the wrapper queues them
// and performs each as a single-data-phase PCI memory transaction on the
// other side, then queues the result and returns it as a VCI response, in
// request order. Everything is stored in VCI form, so all PCI-specific
// work happens between the fifos and the PCI pins.
//
// Structure: eight fifos and six machines.
//   request fifos   address, BE, CMD, WDATA, EOP (pushed together by
//                   vci_request, popped together by pci_machine)
//   response fifos  RERR, RDATA, REOP (pushed together by pci_machine,
//                   popped together by vci_response)
//   vci_request     VCI CMDVAL/CMDACK handshake into the request fifos
//   vci_response    response fifos onto RSPVAL/RSPACK
//   pci_machine     PCI arbitration, address and data phases, retry and
//                   target abort (instance ul)
//   parity_gen      even parity on PAR, one clock after AD and C/BE#
//   cmd_cvrt        VCI command / byte enables onto C/BE#[3:0]
//   ad_mrg          address / write data onto AD
//
// Parameters: DATA_W is the width of the VCI address and data and of the
// PCI AD bus (32); PTR_W is the width of the fifo head and tail pointers
// (9, i.e. 512 slots per fifo, enough for a whole VCI packet).
//
// Pins: PCI signals ending in _l are active low. The bidirectional PCI
// lines are split into a driven value, an output enable and, for AD, an
// input (ad_o/ad_oe/ad_i, cbe_l/cbe_oe, par/par_oe); the pads that join
// them are outside this design. Only target abort is handled as a PCI
// error: PERR# is not acted on, SERR# is never asserted and IDSEL is held
// low because the wrapper issues only memory commands. The VCI packet
// qualifiers CFIXED, CLEN, CONTIG, PLEN and WRAP are accepted but unused,
// since the wrapper works one cell at a time. Reset (reset_l) is active
// low and synchronous to clk.
//
// Timing: a request acknowledged on edge n is in the fifos from n; with an
// idle sequencer REQ# is asserted from edge n+1 and, with GNT# given in
// that clock, FRAME# from edge n+2. The data phase lasts until the target
// answers; REQ# for the next request follows one clock (write, abort) or
// two clocks (read) after the data phase ends.
module xlator
  import vci_pci_pkg::*;
#(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned PTR_W  = 9
) (
  input  logic              clk,
  input  logic              reset_l,
  // VCI request
  input  logic              cmdval,
  output logic              cmdack,
  input  logic [DATA_W-1:0] address,
  input  logic [3:0]        be,
  input  logic              cfixed,
  input  logic [7:0]        clen,
  input  logic [1:0]        cmd,
  input  logic              contig,
  input  logic [DATA_W-1:0] wdata,
  input  logic              eop,
  input  logic [8:0]        plen,
  input  logic              wrap,
  // VCI response
  output logic              rspval,
  input  logic              rspack,
  output logic [DATA_W-1:0] rdata,
  output logic              reop,
  output logic              rerror,
  // PCI
  output logic              req_l,
  input  logic              gnt_l,
  output logic              frame_l,
  output logic              irdy_l,
  output logic              idsel,
  output logic [3:0]        cbe_l,
  output logic              cbe_oe,
  output logic              par,
  output logic              par_oe,
  output logic [DATA_W-1:0] ad_o,
  output logic              ad_oe,
  input  logic [DATA_W-1:0] ad_i,
  output logic              serr_l,
  input  logic              perr_l,
  input  logic              trdy_l,
  input  logic              stop_l,
  input  logic              devsel_l
);

  // ---------------------------------------------------------------- request
  logic              rq_push, rq_pop;
  logic [DATA_W-1:0] rq_address_in, rq_wdata_in, rq_address, rq_wdata;
  logic [3:0]        rq_be_in, rq_be;
  logic [1:0]        rq_cmd_in, rq_cmd;
  logic              rq_eop_in, rq_eop;
  logic [4:0]        rq_empty, rq_full;
  logic              rq_any_empty, rq_any_full;

  assign rq_any_empty = |rq_empty;
  assign rq_any_full  = |rq_full;

  vci_request #(.ADDR_W(DATA_W), .DATA_W(DATA_W), .BE_W(4)) u_vci_request (
    .reset_l, .cmdval, .cmdack, .address, .be, .cmd, .wdata, .eop,
    .fifo_full(rq_any_full), .fifo_push(rq_push),
    .fifo_address(rq_address_in), .fifo_be(rq_be_in), .fifo_cmd(rq_cmd_in),
    .fifo_wdata(rq_wdata_in), .fifo_eop(rq_eop_in)
  );

  wrapper_fifo #(.WIDTH(DATA_W), .PTR_W(PTR_W)) address_fifo (
    .clk, .reset_l, .push(rq_push), .wdata(rq_address_in), .pop(rq_pop),
    .rdata(rq_address), .empty(rq_empty[0]), .full(rq_full[0]));
  wrapper_fifo #(.WIDTH(4), .PTR_W(PTR_W)) be_fifo (
    .clk, .reset_l, .push(rq_push), .wdata(rq_be_in), .pop(rq_pop),
    .rdata(rq_be), .empty(rq_empty[1]), .full(rq_full[1]));
  wrapper_fifo #(.WIDTH(2), .PTR_W(PTR_W)) cmd_fifo (
    .clk, .reset_l, .push(rq_push), .wdata(rq_cmd_in), .pop(rq_pop),
    .rdata(rq_cmd), .empty(rq_empty[2]), .full(rq_full[2]));
  wrapper_fifo #(.WIDTH(DATA_W), .PTR_W(PTR_W)) wdata_fifo (
    .clk, .reset_l, .push(rq_push), .wdata(rq_wdata_in), .pop(rq_pop),
    .rdata(rq_wdata), .empty(rq_empty[3]), .full(rq_full[3]));
  wrapper_fifo #(.WIDTH(1), .PTR_W(PTR_W)) eop_fifo (
    .clk, .reset_l, .push(rq_push), .wdata(rq_eop_in), .pop(rq_pop),
    .rdata(rq_eop), .empty(rq_empty[4]), .full(rq_full[4]));

  // --------------------------------------------------------------- response
  logic              rs_push, rs_pop;
  logic              rs_rerr_in, rs_rerr, rs_reop_in, rs_reop;
  logic [DATA_W-1:0] rs_rdata_in, rs_rdata;
  logic [2:0]        rs_empty, rs_full;
  logic              rs_any_empty, rs_any_full;

  assign rs_any_empty = |rs_empty;
  assign rs_any_full  = |rs_full;

  wrapper_fifo #(.WIDTH(1), .PTR_W(PTR_W)) rerr_fifo (
    .clk, .reset_l, .push(rs_push), .wdata(rs_rerr_in), .pop(rs_pop),
    .rdata(rs_rerr), .empty(rs_empty[0]), .full(rs_full[0]));
  wrapper_fifo #(.WIDTH(DATA_W), .PTR_W(PTR_W)) rdata_fifo (
    .clk, .reset_l, .push(rs_push), .wdata(rs_rdata_in), .pop(rs_pop),
    .rdata(rs_rdata), .empty(rs_empty[1]), .full(rs_full[1]));
  wrapper_fifo #(.WIDTH(1), .PTR_W(PTR_W)) reop_fifo (
    .clk, .reset_l, .push(rs_push), .wdata(rs_reop_in), .pop(rs_pop),
    .rdata(rs_reop), .empty(rs_empty[2]), .full(rs_full[2]));

  vci_response #(.DATA_W(DATA_W)) u_vci_response (
    .reset_l, .fifo_empty(rs_any_empty), .fifo_rerr(rs_rerr),
    .fifo_rdata(rs_rdata), .fifo_reop(rs_reop), .fifo_pop(rs_pop),
    .rspval, .rspack, .rdata, .reop, .rerror
  );

  // -------------------------------------------------------------------- PCI
  logic       addr_phase;

  pci_machine #(.DATA_W(DATA_W)) ul (
    .clk, .reset_l,
    .req_empty(rq_any_empty), .head_cmd(rq_cmd), .head_eop(rq_eop),
    .req_pop(rq_pop), .rsp_full(rs_any_full), .rsp_push(rs_push),
    .rsp_rerr(rs_rerr_in), .rsp_rdata(rs_rdata_in), .rsp_reop(rs_reop_in),
    .req_l, .gnt_l, .frame_l, .irdy_l, .trdy_l, .stop_l, .devsel_l, .ad_i,
    .addr_phase, .ad_oe, .cbe_oe
  );

  cmd_cvrt u_cmd_cvrt (
    .vci_cmd(rq_cmd), .vci_be(rq_be), .addr_phase, .cbe_oe, .cbe_l);

  ad_mrg #(.DATA_W(DATA_W)) u_ad_mrg (
    .address(rq_address), .wdata(rq_wdata), .addr_phase, .ad_oe, .ad_o);

  parity_gen #(.DATA_W(DATA_W)) u_parity (
    .clk, .reset_l, .ad(ad_o), .ad_oe, .cbe_l, .par, .par_oe);

  assign idsel  = 1'b0;
  assign serr_l = 1'b1;

  // VCI rules the wrapper itself must keep.
  a_ack_needs_val: assert property (@(posedge clk) disable iff (!reset_l)
    cmdack |-> cmdval);
  a_fifos_in_step: assert property (@(posedge clk) disable iff (!reset_l)
    (&rq_empty == |rq_empty) && (&rs_empty == |rs_empty));

endmodule
