// vci_pci_pkg: types and constants shared by the VCI-to-PCI bus wrapper.
//
// The wrapper keeps every request and response in its VCI format; only the
// PCI side knows PCI encodings. This package holds the VCI command
// encoding, the two PCI bus commands the wrapper issues, and the state
// encoding of the PCI sequencer.
//
// The VCI command values follow the VCI convention (01 read, 10 write,
// 11 locked read, 00 no operation). The PCI command codes are the PCI 2.1
// memory read (0110) and memory write (0111). The sequencer state values
// are chosen so that the two data-phase states, where PCI responses are
// sampled, are 3 (READ_DATA) and 4 (WRITE_DATA); the remaining numbering is
// this design's own.
package vci_pci_pkg;

  typedef enum logic [1:0] {
    VCI_NOP        = 2'b00,
    VCI_READ       = 2'b01,
    VCI_WRITE      = 2'b10,
    VCI_LOCKED_RD  = 2'b11
  } vci_cmd_e;

  localparam logic [3:0] PCI_MEM_READ  = 4'b0110;
  localparam logic [3:0] PCI_MEM_WRITE = 4'b0111;

  typedef enum logic [2:0] {
    S_IDLE       = 3'd0,
    S_REQ_ARB    = 3'd1,
    S_ADDRESS    = 3'd2,
    S_READ_DATA  = 3'd3,
    S_WRITE_DATA = 3'd4,
    S_READ_DONE  = 3'd5,
    S_RESET      = 3'd6,
    S_RECOVER    = 3'd7
  } pci_state_e;

  // A VCI write is the only command that moves data towards PCI; every
  // other command is carried out as a PCI memory read.
  function automatic logic is_write(input logic [1:0] cmd);
    return cmd == VCI_WRITE;
  endfunction

endpackage
