// router_top: one-input, three-output store-and-forward packet router.
//
// Packets arrive byte by byte on data_in (qualified by pkt_valid) and are
// delivered, unchanged, to the output port whose address equals the
// packet's destination address (DA). A packet is only released to its port
// once it has been received completely and its frame check sequence (FCS)
// has been verified; a packet with a wrong FCS or an unknown DA is discarded
// and reported with a one-cycle pulse on err.
//
// Structure: router_reg (header register, address decode, FCS check),
// router_fsm (controller), router_out (one FIFO per port).
//
// Input handshake: a byte is taken on a rising edge where pkt_valid is high
// and suspend_data_in is low; the sender holds data_in while
// suspend_data_in is high. suspend_data_in rises after the LEN byte for at
// least three cycles: until the target FIFO has room for the whole packet,
// then two cycles in which the held DA and LEN are copied into it.
// Output handshake per port i: vld_out[i] high means data_out[i] holds a
// byte of a checked packet, last_out[i] marks its FCS byte, and read_enb[i]
// pops it. The ports are read independently and in parallel.
// Latency: the first byte of a packet appears on its port in the cycle
// after its FCS byte was taken.
//
// The packet format, the single input port, the three 8-bit output ports
// with their own addresses, the FSM controller with err and
// suspend_data_in, and store-and-forward buffering follow the design. The
// port addresses, FIFO depth, FCS rule and handshakes are this design's
// choices. Reset is synchronous and active low.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 3,
  parameter int unsigned DEPTH     = 128,
  parameter logic [NUM_PORTS-1:0][BYTE_W-1:0] PORT_ADDR = DEFAULT_ADDR[NUM_PORTS-1:0]
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  byte_t                data_in,
  input  logic                 pkt_valid,
  output logic                 suspend_data_in,
  output logic                 err,
  input  logic [NUM_PORTS-1:0] read_enb,
  output logic [NUM_PORTS-1:0] vld_out,
  output byte_t                data_out [NUM_PORTS],
  output logic [NUM_PORTS-1:0] last_out
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic                 ld_da, ld_len, ld_data, sel_da, sel_len;
  logic                 fifo_we, fifo_last, fifo_commit, fifo_discard;
  logic                 fcs_ok, addr_match, space_ok;
  logic [NUM_PORTS-1:0] dest_oh;
  byte_t                da_q, len_q, fcs_q, wr_byte;
  state_t               state;
  logic [AW:0]          need;

  // words the packet occupies in its FIFO: LEN data bytes plus DA, LEN, FCS
  assign need = (AW+1)'(len_q[LEN_W-1:0]) + (AW+1)'(OVERHEAD);

  router_reg #(.NUM_PORTS(NUM_PORTS), .PORT_ADDR(PORT_ADDR)) u_reg (
    .clk        (clk),
    .rst_n      (rst_n),
    .data_in    (data_in),
    .ld_da      (ld_da),
    .ld_len     (ld_len),
    .ld_data    (ld_data),
    .sel_da     (sel_da),
    .sel_len    (sel_len),
    .da_q       (da_q),
    .len_q      (len_q),
    .fcs_q      (fcs_q),
    .fcs_ok     (fcs_ok),
    .dest_oh    (dest_oh),
    .addr_match (addr_match),
    .wr_byte    (wr_byte)
  );

  router_fsm u_fsm (
    .clk             (clk),
    .rst_n           (rst_n),
    .pkt_valid       (pkt_valid),
    .len_q           (len_q),
    .addr_match      (addr_match),
    .fcs_ok          (fcs_ok),
    .space_ok        (space_ok),
    .suspend_data_in (suspend_data_in),
    .err             (err),
    .ld_da           (ld_da),
    .ld_len          (ld_len),
    .ld_data         (ld_data),
    .sel_da          (sel_da),
    .sel_len         (sel_len),
    .fifo_we         (fifo_we),
    .fifo_last       (fifo_last),
    .fifo_commit     (fifo_commit),
    .fifo_discard      (fifo_discard),
    .state           (state)
  );

  router_out #(.NUM_PORTS(NUM_PORTS), .DEPTH(DEPTH)) u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .dest_oh  (dest_oh),
    .we       (fifo_we),
    .wdata    ('{last: fifo_last, data: wr_byte}),
    .commit   (fifo_commit),
    .discard    (fifo_discard),
    .need     (need),
    .space_ok (space_ok),
    .read_enb (read_enb),
    .vld_out  (vld_out),
    .data_out (data_out),
    .last_out (last_out)
  );

endmodule
