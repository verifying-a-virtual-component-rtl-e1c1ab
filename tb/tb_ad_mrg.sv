// tb_ad_mrg: self-checking test of the address/data merge.
//
// Random addresses and write data are applied with every setting of the
// phase select and output enable. AD must carry the address in the
// address phase, the write data otherwise, unchanged, and zero when the
// wrapper does not drive the bus.
module tb_ad_mrg;
  localparam int unsigned DATA_W = 32;
  logic [DATA_W-1:0] address, wdata, ad_o, expected;
  logic addr_phase, ad_oe;
  int checks = 0, failures = 0;

  ad_mrg #(.DATA_W(DATA_W)) dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      address = {$urandom}; wdata = {$urandom};
      {ad_oe, addr_phase} = 2'(i);
      #1;
      expected = !ad_oe ? '0 : (addr_phase ? address : wdata);
      checks++;
      if (ad_o !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL oe=%b ap=%b got %h want %h", ad_oe, addr_phase, ad_o, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
