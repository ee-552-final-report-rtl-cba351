// netcon_pkg: constants shared by the networked appliance controller.
//
// Holds the SLIP special characters (RFC 1055 values, as listed for the
// design), the packet buffer address width, the CS8900A 8-bit I/O port
// offsets and PacketPage register numbers used by the Ethernet interface,
// and the header offsets the network controller uses to find the UDP
// payload. The SLIP characters and the 9-bit buffer address follow the
// design description; the CS8900A register map and the chosen register
// values come from the chip's published data and are this design's choice
// of how to run the chip.
package netcon_pkg;

  // Packet buffer: 9 address bits (512 bytes), as the SLIP buffer address
  localparam int unsigned BUF_AW = 9;

  // SLIP special characters
  localparam logic [7:0] SLIP_END     = 8'hC0;
  localparam logic [7:0] SLIP_ESC     = 8'hDB;
  localparam logic [7:0] SLIP_ESC_END = 8'hDC;
  localparam logic [7:0] SLIP_ESC_ESC = 8'hDD;

  // CS8900A I/O-mode port offsets (SA3..SA0); a 16-bit port is two byte
  // addresses, low byte at the even address.
  localparam logic [3:0] CS_RXTX_DATA = 4'h0;
  localparam logic [3:0] CS_PP_PTR    = 4'hA;
  localparam logic [3:0] CS_PP_DATA   = 4'hC;

  // CS8900A PacketPage registers used
  localparam logic [15:0] PP_PRODUCT_ID = 16'h0000;
  localparam logic [15:0] PP_RXCTL      = 16'h0104;
  localparam logic [15:0] PP_LINECTL    = 16'h0112;
  localparam logic [15:0] PP_RXEVENT    = 16'h0124;

  localparam logic [15:0] CS_EISA_ID    = 16'h630E; // product ID word 0
  // RxCTL: register number 5, RxOKA, PromiscuousA, IndividualA, BroadcastA
  localparam logic [15:0] RXCTL_VALUE   = 16'h0D85;
  // LineCTL: register number 0x13, SerRxON
  localparam logic [15:0] LINECTL_VALUE = 16'h0053;
  localparam int unsigned RXEVENT_RXOK  = 8;         // bit of RxEvent

  // Header geometry used by the network controller
  localparam int unsigned ETH_HDR_LEN = 14; // Ethernet II header
  localparam int unsigned UDP_HDR_LEN = 8;

endpackage
