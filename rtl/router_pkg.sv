// router_pkg: types and constants shared by the packet router.
//
// A packet enters the router one byte per clock and has the form
//   DA | LEN | DATA[0] .. DATA[LEN-1] | FCS
// DA is the 8-bit destination address, LEN the number of data bytes
// (0..63) and FCS the frame check sequence, computed over header and data.
// The byte width, the address width and the 63-byte limit follow the
// packet description of the design; the FCS rule (bytewise XOR of DA, LEN
// and every data byte) is this design's choice, since only "a check over
// header and data" is specified.
package router_pkg;

  localparam int unsigned BYTE_W  = 8;   // packet width
  localparam int unsigned MAX_LEN = 63;  // largest data length in bytes
  localparam int unsigned LEN_W   = $clog2(MAX_LEN + 1);  // bits of LEN that count data
  // bytes a packet occupies in an output FIFO besides its data: DA, LEN, FCS
  localparam int unsigned OVERHEAD = 3;

  typedef logic [BYTE_W-1:0] byte_t;

  // Default port addresses: port i answers to address i. Modules take the
  // low NUM_PORTS entries, so a different port count needs no new table.
  localparam int unsigned MAX_PORTS = 16;
  localparam logic [MAX_PORTS-1:0][BYTE_W-1:0] DEFAULT_ADDR = {
    8'h0f, 8'h0e, 8'h0d, 8'h0c, 8'h0b, 8'h0a, 8'h09, 8'h08,
    8'h07, 8'h06, 8'h05, 8'h04, 8'h03, 8'h02, 8'h01, 8'h00};

  // One FIFO word: a packet byte plus a flag marking the packet's last
  // byte (its FCS), so a reader can find packet boundaries.
  typedef struct packed {
    logic  last;
    byte_t data;
  } fifo_word_t;

  // Controller states.
  typedef enum logic [2:0] {
    S_DA,       // wait for the destination-address byte
    S_LEN,      // take the length byte, decode the address
    S_WAIT,     // suspend input until the target FIFO can hold the packet
    S_HDR_DA,   // copy the held DA into the target FIFO
    S_HDR_LEN,  // copy the held LEN into the target FIFO
    S_DATA,     // move data bytes into the target FIFO
    S_FCS,      // take the FCS byte, then commit or discard the packet
    S_DROP      // consume a packet whose DA matches no port
  } state_t;

  // Fold one byte into the running frame check sequence.
  function automatic byte_t fcs_next(byte_t acc, byte_t b);
    return acc ^ b;
  endfunction

endpackage
