// cmd_cvrt: command-convert machine of the wrapper.
//
// It turns the VCI command and byte enables of the head request into PCI
// form and multiplexes them onto C/BE#[3:0]. In the address phase
// (addr_phase high) C/BE# carries the PCI bus command: memory write
// (0111) for a VCI write, memory read (0110) for every other VCI command.
// In a data phase it carries the byte enables, inverted because PCI byte
// enables are active low. When the wrapper does not drive the bus
// (cbe_oe low) the output is all ones and cbe_oe tells the pad to release
// it. Purely combinational.
//
// That this block converts and multiplexes command and byte enables is the
// described design; the choice of memory commands and the mapping of
// locked read and no-operation to memory read are this design's own.
module cmd_cvrt
  import vci_pci_pkg::*;
(
  input  logic [1:0] vci_cmd,
  input  logic [3:0] vci_be,
  input  logic       addr_phase,
  input  logic       cbe_oe,
  output logic [3:0] cbe_l
);

  always_comb begin
    if (!cbe_oe)        cbe_l = 4'hF;
    else if (addr_phase) cbe_l = is_write(vci_cmd) ? PCI_MEM_WRITE : PCI_MEM_READ;
    else                cbe_l = ~vci_be;
  end

endmodule
