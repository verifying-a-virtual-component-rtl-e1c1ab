// parity_gen: PCI even-parity machine of the wrapper.
//
// PCI requires PAR to make the number of ones across AD[31:0], C/BE#[3:0]
// and PAR even, and to be driven one clock after the AD and C/BE# values
// it covers. This block registers the XOR of all AD and C/BE# bits and
// the AD output enable on each rising clock edge, so PAR (with par_oe) is
// valid in the clock after every address phase and write data phase the
// wrapper drives. The target drives PAR for read data, so par_oe is low
// then.
//
// Even parity is what the wrapper is described to compute; the one-clock
// lag and the enable follow the PCI rules. Reset (active low,
// synchronous) clears both outputs.
module parity_gen #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              reset_l,
  input  logic [DATA_W-1:0] ad,
  input  logic              ad_oe,
  input  logic [3:0]        cbe_l,
  output logic              par,
  output logic              par_oe
);

  always_ff @(posedge clk) begin
    if (!reset_l) begin
      par    <= 1'b0;
      par_oe <= 1'b0;
    end else begin
      par    <= ^{ad, cbe_l};
      par_oe <= ad_oe;
    end
  end

endmodule
