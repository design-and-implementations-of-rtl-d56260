// router_fifo: store-and-forward packet FIFO for one output port.
//
// Bytes of the packet being received are written at wr_ptr but stay
// invisible to the reader until the controller commits the packet, which it
// does in the cycle the packet's FCS byte is written (commit together with
// we). If the FCS is wrong the controller aborts instead, and wr_ptr falls
// back to the last committed position, so a corrupt packet never reaches
// the output. The reader therefore only ever sees whole, checked packets.
//
// Interface:
//   we/wdata    write one word (byte plus last-of-packet flag).
//   commit      make everything written so far, including a word written in
//               the same cycle, visible to the reader.
//   discard       discard everything written since the last commit.
//   re          pop the word on rdata; ignored when rvalid is low.
//   rvalid      a committed word is on rdata (show-ahead, combinational).
//   free        words that can still be written.
// Timing: writes, commits and pops take effect on the rising edge; a word
// committed at edge t is on rdata right after t. Reset (synchronous, active
// low) empties the FIFO.
//
// The FIFO itself, and that packets are stored and then forwarded, follow
// the design. The depth is this design's choice: 128 is the smallest power
// of two that holds the largest packet (63 data bytes plus DA, LEN and FCS).
module router_fifo
  import router_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  fifo_word_t wdata,
  input  logic       commit,
  input  logic       discard,
  input  logic       re,
  output fifo_word_t rdata,
  output logic       rvalid,
  output logic [AW:0] free
);

  fifo_word_t mem [DEPTH];
  logic [AW:0] wr_ptr, cm_ptr, rd_ptr;
  logic [AW:0] wr_ptr_inc;

  assign wr_ptr_inc = wr_ptr + 1'b1;
  assign free   = (AW+1)'(DEPTH) - (wr_ptr - rd_ptr);
  assign rvalid = (rd_ptr != cm_ptr);
  assign rdata  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      cm_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (discard)   wr_ptr <= cm_ptr;
      else if (we) wr_ptr <= wr_ptr_inc;
      if (commit)  cm_ptr <= we ? wr_ptr_inc : wr_ptr;
      if (re && rvalid) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // A write into a full FIFO would overwrite unread data.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (free != '0));
  // Commit and discard are mutually exclusive, and nothing is written while
  // a packet is discarded.
  a_commit_discard: assert property (@(posedge clk) disable iff (!rst_n)
    discard |-> !(commit || we));

endmodule
