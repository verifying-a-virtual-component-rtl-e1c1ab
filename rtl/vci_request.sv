// vci_request: VCI request-side machine of the wrapper.
//
// It accepts one VCI request cell per handshake and writes its fields into
// the five request fifos (address, byte enables, command, write data,
// end-of-packet), which are pushed together. CMDACK is raised only while
// CMDVAL is high, the wrapper is out of reset and the request fifos have
// room, so a request is never acknowledged unless it was made. A cell is
// transferred on a rising clock edge where CMDVAL and CMDACK are both high;
// the fifo push happens on that same edge.
//
// The wrapper works cell by cell. The VCI packet qualifiers CFIXED, CLEN,
// CONTIG, PLEN and WRAP arrive on the interface but no fifo stores them,
// so this machine does not use them. CMDACK depends combinationally on
// CMDVAL and the fifo full flag; the handshake, the fields stored and the
// gating follow the described wrapper, the combinational acknowledge is
// this design's choice.
module vci_request #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned BE_W   = 4
) (
  input  logic              reset_l,
  // VCI request
  input  logic              cmdval,
  output logic              cmdack,
  input  logic [ADDR_W-1:0] address,
  input  logic [BE_W-1:0]   be,
  input  logic [1:0]        cmd,
  input  logic [DATA_W-1:0] wdata,
  input  logic              eop,
  // request fifos
  input  logic              fifo_full,
  output logic              fifo_push,
  output logic [ADDR_W-1:0] fifo_address,
  output logic [BE_W-1:0]   fifo_be,
  output logic [1:0]        fifo_cmd,
  output logic [DATA_W-1:0] fifo_wdata,
  output logic              fifo_eop
);

  always_comb begin
    cmdack       = reset_l && cmdval && !fifo_full;
    fifo_push    = cmdack;
    fifo_address = address;
    fifo_be      = be;
    fifo_cmd     = cmd;
    fifo_wdata   = wdata;
    fifo_eop     = eop;
  end

endmodule
