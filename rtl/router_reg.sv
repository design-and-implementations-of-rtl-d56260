// router_reg: the router's 8-bit register block.
//
// It holds the two header bytes of the packet being received and the
// running frame check sequence, and it decides which output port the
// packet is for.
//   * ld_da   loads DA from data_in and starts the FCS with it.
//   * ld_len  loads LEN from data_in and folds it into the FCS.
//   * ld_data folds a data byte into the FCS.
//   * dest_oh is one-hot: bit i is set when the held DA equals PORT_ADDR[i];
//     addr_match is set when any port matches.
//   * fcs_ok compares the accumulated FCS with the byte now on data_in, so
//     the controller can check the FCS byte in the cycle it arrives.
//   * wr_byte is the byte written into an output FIFO: the held DA when
//     sel_da, the held LEN when sel_len, otherwise data_in.
// All loads happen on the rising clock edge; dest_oh, addr_match, fcs_ok and
// wr_byte are combinational from the registers and data_in. Reset
// (synchronous, active low) clears the registers.
//
// The 8-bit header fields and the per-port 8-bit addresses follow the
// design's packet description. The address values themselves (port i answers
// to address i by default) and the XOR form of the FCS are this design's
// choices.
module router_reg
  import router_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 3,
  parameter logic [NUM_PORTS-1:0][BYTE_W-1:0] PORT_ADDR = DEFAULT_ADDR[NUM_PORTS-1:0]
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  byte_t                data_in,
  input  logic                 ld_da,
  input  logic                 ld_len,
  input  logic                 ld_data,
  input  logic                 sel_da,
  input  logic                 sel_len,
  output byte_t                da_q,
  output byte_t                len_q,
  output byte_t                fcs_q,
  output logic                 fcs_ok,
  output logic [NUM_PORTS-1:0] dest_oh,
  output logic                 addr_match,
  output byte_t                wr_byte
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      da_q  <= '0;
      len_q <= '0;
      fcs_q <= '0;
    end else begin
      if (ld_da) begin
        da_q  <= data_in;
        fcs_q <= data_in;
      end
      if (ld_len) begin
        len_q <= data_in;
        fcs_q <= fcs_next(fcs_q, data_in);
      end
      if (ld_data) begin
        fcs_q <= fcs_next(fcs_q, data_in);
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NUM_PORTS; i++) begin
      dest_oh[i] = (da_q == PORT_ADDR[i]);
    end
  end

  assign addr_match = |dest_oh;
  assign fcs_ok     = (fcs_q == data_in);
  assign wr_byte    = sel_da ? da_q : (sel_len ? len_q : data_in);

endmodule
