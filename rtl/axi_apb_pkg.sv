// axi_apb_pkg: types and constants shared by the AXI4-Lite to APB4 bridge
// system. It holds the two-bit AXI response encoding (the same values the
// AXI4 specification uses on BRESP and RRESP), the number of APB slave slots
// the bridge decodes, and the width of the protection field carried on
// AWPROT/ARPROT and PPROT.
package axi_apb_pkg;

  // AXI response codes on BRESP / RRESP.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Protection attributes, AxPROT and PPROT alike.
  localparam int unsigned PROT_WIDTH = 3;

  // The bridge drives up to sixteen APB slaves.
  localparam int unsigned MAX_APB_SLAVES = 16;

endpackage
