// fv_msb_pkg: sizes and types shared by the FV-MSB bus codec.
//
// The codec moves 32-bit words over a 32-wire data bus plus one control wire.
// A full-width "frequent value" (FV) CAM holds as many entries as there are
// bus wires, because an FV hit is sent as a one-hot code over the whole bus.
// A second CAM holds the high-order MSB_BITS bits of recent words; it has
// MSB_BITS entries so that its one-hot index fits in those same upper bits.
// The defaults (32 wires, 20 MSB bits) are the configuration this design was
// sized for; 20 is the width that gave the largest switching reduction in a
// sweep of 8 to 30 bits.
package fv_msb_pkg;

  parameter int unsigned BUS_WIDTH = 32;
  parameter int unsigned MSB_BITS  = 20;

  // How the encoder sent a word. FV: one-hot index of the FV CAM over the
  // whole bus. MSB: one-hot MSB CAM index in the upper bits, original low
  // bits below. RAW: the word itself, with the control wire low.
  typedef enum logic [1:0] {
    ENC_RAW = 2'd0,
    ENC_MSB = 2'd1,
    ENC_FV  = 2'd2
  } enc_kind_e;

endpackage
