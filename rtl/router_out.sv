// router_out: the router's output block, one store-and-forward FIFO per
// output port.
//
// The controller's write, commit and discard strobes go only to the FIFO
// selected by the one-hot dest_oh; every FIFO is read independently through
// its own read_enb, so all ports can drain at the same time while a new
// packet is being written into one of them. space_ok tells the controller
// that the selected FIFO can take `need` more words.
//
// Per port i: vld_out[i] is high while a word of a committed packet is on
// data_out[i] / last_out[i] (last_out marks the packet's FCS byte); a read
// happens on a rising edge where read_enb[i] and vld_out[i] are both high.
//
// Three FIFOs combined into one output block follow the design; the
// one-hot selection and the room check are this design's choices.
module router_out
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 3,
  parameter int unsigned DEPTH     = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] dest_oh,
  input  logic                 we,
  input  fifo_word_t           wdata,
  input  logic                 commit,
  input  logic                 discard,
  input  logic [AW:0]          need,
  output logic                 space_ok,
  input  logic [NUM_PORTS-1:0] read_enb,
  output logic [NUM_PORTS-1:0] vld_out,
  output byte_t                data_out [NUM_PORTS],
  output logic [NUM_PORTS-1:0] last_out
);

  logic [NUM_PORTS-1:0] room;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_port
    fifo_word_t  rdata;
    logic [AW:0] free;

    router_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk    (clk),
      .rst_n  (rst_n),
      .we     (we     && dest_oh[i]),
      .wdata  (wdata),
      .commit (commit && dest_oh[i]),
      .discard  (discard  && dest_oh[i]),
      .re     (read_enb[i]),
      .rdata  (rdata),
      .rvalid (vld_out[i]),
      .free   (free)
    );

    assign data_out[i] = rdata.data;
    assign last_out[i] = rdata.last;
    assign room[i]     = (free >= need);
  end

  assign space_ok = |(room & dest_oh);

endmodule
