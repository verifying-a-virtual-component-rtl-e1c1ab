// tb_cmd_cvrt: exhaustive self-checking test of the command converter.
//
// Every combination of VCI command, byte enables, address-phase select and
// output enable is applied. Expected C/BE#: all ones when not driven; in
// the address phase PCI memory write (0111) for a VCI write (10) and PCI
// memory read (0110) otherwise; in a data phase the inverted byte enables.
module tb_cmd_cvrt;
  logic [1:0] vci_cmd;
  logic [3:0] vci_be;
  logic addr_phase, cbe_oe;
  logic [3:0] cbe_l, expected;
  int checks = 0, failures = 0;

  cmd_cvrt dut (.*);

  initial begin
    for (int i = 0; i < 256; i++) begin
      {cbe_oe, addr_phase, vci_cmd, vci_be} = 8'(i);
      #1;
      if (!cbe_oe)         expected = 4'b1111;
      else if (addr_phase) expected = (vci_cmd == 2'b10) ? 4'b0111 : 4'b0110;
      else                 expected = {!vci_be[3], !vci_be[2], !vci_be[1], !vci_be[0]};
      checks++;
      if (cbe_l !== expected) begin
        failures++;
        $display("FAIL cmd=%b be=%b ap=%b oe=%b: got %b want %b",
                 vci_cmd, vci_be, addr_phase, cbe_oe, cbe_l, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
