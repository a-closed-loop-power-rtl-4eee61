// winoc_pm_pkg: types and constants shared by the closed-loop transmit power
// manager of a wireless network-on-chip (WiNoC).
//
// The power manager regulates, for every <transmitter, receiver> pair of radio
// hubs, a 3-bit power step that drives the transmitter's power amplifier.
// Receivers report an estimated bit error count per transmitter (CONTROL_OUT),
// the manager compares it with a reference and answers the transmitter with an
// increase / decrease command (CONTROL_IN).
//
// Following the design: the 3-bit power-step code, the 3-bit command with the
// three meanings increase / decrease / no change, and the field lists of the
// two control packets. This design's own choices: the numeric command
// encoding, the width of the error count, and the extra destination field
// carried in CONTROL_IN so that the transmitter knows which table entry to
// update.
package winoc_pm_pkg;

  // Power-step code: 3 bits, code 0 = lowest power, code 7 = highest power.
  localparam int unsigned PSTEP_W  = 3;
  localparam int unsigned MAX_STEP = (1 << PSTEP_W) - 1;

  // 3-bit command word sent from the manager to a transmitting hub.
  typedef enum logic [2:0] {
    CMD_NOP = 3'b000,   // keep the current power step
    CMD_INC = 3'b001,   // raise the power step by one (saturates at MAX_STEP)
    CMD_DEC = 3'b010    // lower the power step by one (saturates at 0)
  } cmd_e;

endpackage
