// ad_mrg: address/data merge machine of the wrapper.
//
// It multiplexes the head request's address (in the address phase) or its
// write data (in a data phase) onto the shared PCI AD bus, without any
// reformatting. When the wrapper does not drive AD (ad_oe low, for
// instance in a read data phase, where the target drives it) the output is
// zero and ad_oe tells the pad to release the bus. Purely combinational.
//
// The multiplexing is the described design; the zero value while released
// is this design's choice.
module ad_mrg #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] address,
  input  logic [DATA_W-1:0] wdata,
  input  logic              addr_phase,
  input  logic              ad_oe,
  output logic [DATA_W-1:0] ad_o
);

  always_comb begin
    if (!ad_oe)          ad_o = '0;
    else if (addr_phase) ad_o = address;
    else                 ad_o = wdata;
  end

endmodule
