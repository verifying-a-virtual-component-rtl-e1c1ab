// vci_response: VCI response-side machine of the wrapper.
//
// It drives the head of the three response fifos (error, read data,
// end-of-packet) onto the VCI response channel. RSPVAL is high whenever
// the response fifos hold an entry and the wrapper is out of reset; the
// entry is popped on a rising clock edge where RSPVAL and RSPACK are both
// high, and the next entry (if any) is shown from the following cycle.
// Responses therefore leave in the order the requests arrived.
//
// The fields and their order follow the described wrapper; the show-ahead
// timing (a response can leave the cycle after it is written) is this
// design's choice.
module vci_response #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              reset_l,
  // response fifos
  input  logic              fifo_empty,
  input  logic              fifo_rerr,
  input  logic [DATA_W-1:0] fifo_rdata,
  input  logic              fifo_reop,
  output logic              fifo_pop,
  // VCI response
  output logic              rspval,
  input  logic              rspack,
  output logic [DATA_W-1:0] rdata,
  output logic              reop,
  output logic              rerror
);

  always_comb begin
    rspval   = reset_l && !fifo_empty;
    fifo_pop = rspval && rspack;
    rdata    = rspval ? fifo_rdata : '0;
    reop     = rspval && fifo_reop;
    rerror   = rspval && fifo_rerr;
  end

endmodule
