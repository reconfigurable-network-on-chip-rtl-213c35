// noc_pkg: types and constants shared by the router, its sub-blocks and the
// network interface.
//
// A packet is a sequence of flits. Every flit carries a 2-bit control field
// in its top bits followed by a data word. The control field marks the flit as
// the header, a normal (body) flit or the tail of the packet; the header's
// data word carries the destination node address in its low ADDR_W bits.
// Following the packet format of the design, there is no limit on the number
// of normal flits and no interpretation of the data they carry.
//
// Choices of this implementation: a 16-bit data word (the processors exchange
// 8- and 16-bit data, so 16 bits holds either), the binary codes of the
// control field, and a 4-bit node address (up to 16 routers).
package noc_pkg;

  localparam int DATA_W = 16;  // data word carried by each flit
  localparam int ADDR_W = 4;   // node address width in a header flit

  // Control field, the first two bits of every flit.
  typedef enum logic [1:0] {
    FT_BODY = 2'b00,  // normal flit
    FT_TAIL = 2'b01,  // last flit of a packet
    FT_HEAD = 2'b10,  // header flit, destination in data[ADDR_W-1:0]
    FT_RSVD = 2'b11   // unused code, rejected by the input link controller
  } flit_type_e;

  typedef struct packed {
    flit_type_e            ftype;
    logic [DATA_W-1:0]     data;
  } flit_t;


  // Destination address carried in a header flit's data word.
  function automatic logic [ADDR_W-1:0] head_dest(logic [DATA_W-1:0] data);
    return data[ADDR_W-1:0];
  endfunction

endpackage
