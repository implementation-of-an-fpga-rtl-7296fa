// ssdr_pkg: types and widths shared by the blocks of the diagnostic reader.
//
// Every link between two blocks is a CMI (common modular interconnect) link:
// a data bus, a `vld` bit driven by the transmitter and a `next` bit driven
// by the receiver. `next` high means "the receiver cannot take the word in
// this clock cycle"; a word moves on a rising edge where vld=1 and next=0.
// A transmitter that sees next=1 holds vld and the data unchanged.
//
// Three word formats travel on these links:
//   addr_t    a read request: the label of one diagnostic quantity,
//   readout_t a readout: the label and the value read from the chip,
//   pkg_word_t one word of a package: a header flag and a payload. A package
//             is one header word (flag 1, payload = interface number and
//             label) followed by one or more data words (flag 0) carrying
//             slices of the value, most significant slice first.
// The widths below are this design's choices; the reader's structure does
// not depend on them.
package ssdr_pkg;

  localparam int unsigned ADDR_W = 8;   // width of the label of a readout
  localparam int unsigned DATA_W = 32;  // width of a readout value
  localparam int unsigned INTF_W = 4;   // width of an interface number
  localparam int unsigned PKG_DW = 16;  // payload bits of a package word

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [INTF_W-1:0] intf_t;

  typedef struct packed {
    addr_t addr;
    data_t data;
  } readout_t;

  typedef struct packed {
    logic              hdr;      // 1: header word, 0: data word
    logic [PKG_DW-1:0] payload;
  } pkg_word_t;

  localparam int unsigned PKG_W = $bits(pkg_word_t);

  // Severity that a failsafe monitor reports for its last sample.
  typedef enum logic [1:0] {
    SEV_OK   = 2'd0,
    SEV_WARN = 2'd1,
    SEV_CRIT = 2'd2
  } severity_t;

  // Payload of a header word: interface number above the label.
  function automatic logic [PKG_DW-1:0] make_header(intf_t intf, addr_t addr);
    logic [PKG_DW-1:0] p;
    p = '0;
    p[ADDR_W +: INTF_W] = intf;
    p[0 +: ADDR_W]      = addr;
    return p;
  endfunction

  function automatic intf_t header_intf(logic [PKG_DW-1:0] p);
    return p[ADDR_W +: INTF_W];
  endfunction

  function automatic addr_t header_addr(logic [PKG_DW-1:0] p);
    return p[0 +: ADDR_W];
  endfunction

endpackage
