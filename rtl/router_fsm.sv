// router_fsm: the router controller.
//
// A Moore state machine that walks each incoming packet through its fields
// and drives the two status outputs of the router, suspend_data_in and err.
// A byte on data_in is taken in a cycle where pkt_valid is high and
// suspend_data_in is low ("accept"); a sender holds its byte otherwise.
//
//   S_DA      accept DA (ld_da)                               -> S_LEN
//   S_LEN     accept LEN (ld_len). DA matches a port           -> S_WAIT
//                                  DA matches no port          -> S_DROP
//   S_WAIT    suspend input until the target FIFO has room for
//             the whole packet (space_ok)                      -> S_HDR_DA
//   S_HDR_DA  suspend; write the held DA into the FIFO          -> S_HDR_LEN
//   S_HDR_LEN suspend; write the held LEN; LEN = 0              -> S_FCS
//                                          otherwise            -> S_DATA
//   S_DATA    accept and write LEN data bytes (ld_data)         -> S_FCS
//   S_FCS     accept the FCS byte. It matches: write it as the
//             packet's last word and commit the packet. It does
//             not: discard the packet and pulse err.              -> S_DA
//   S_DROP    accept and discard LEN data bytes and the FCS,
//             then pulse err                                    -> S_DA
//
// suspend_data_in is high exactly in S_WAIT, S_HDR_DA and S_HDR_LEN. err is
// a registered one-cycle pulse in the cycle after the offending byte.
// Waiting for room for the whole packet before taking any data is what
// makes the router store-and-forward without an overflow check per byte.
// Only the low LEN_W bits of LEN count data bytes.
//
// That a controller FSM sequences the packet and produces err and
// suspend_data_in follows the design; the state set, the handshake and the
// causes of err are this design's choices.
module router_fsm
  import router_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pkt_valid,
  input  byte_t      len_q,
  input  logic       addr_match,
  input  logic       fcs_ok,
  input  logic       space_ok,
  output logic       suspend_data_in,
  output logic       err,
  output logic       ld_da,
  output logic       ld_len,
  output logic       ld_data,
  output logic       sel_da,
  output logic       sel_len,
  output logic       fifo_we,
  output logic       fifo_last,
  output logic       fifo_commit,
  output logic       fifo_discard,
  output state_t     state
);

  state_t           state_n;
  logic [LEN_W-1:0] len;
  logic [LEN_W-1:0] cnt;      // data bytes accepted in S_DATA / S_DROP
  logic             accept;
  logic             last_data;
  logic             err_n;

  assign len       = len_q[LEN_W-1:0];
  assign last_data = (cnt == len - 1'b1);

  always_comb begin
    suspend_data_in = (state == S_WAIT) || (state == S_HDR_DA) ||
                      (state == S_HDR_LEN);
    accept      = pkt_valid && !suspend_data_in;
    ld_da       = 1'b0;
    ld_len      = 1'b0;
    ld_data     = 1'b0;
    sel_da      = 1'b0;
    sel_len     = 1'b0;
    fifo_we     = 1'b0;
    fifo_last   = 1'b0;
    fifo_commit = 1'b0;
    fifo_discard  = 1'b0;
    err_n       = 1'b0;
    state_n     = state;
    unique case (state)
      S_DA: if (accept) begin
        ld_da   = 1'b1;
        state_n = S_LEN;
      end
      S_LEN: if (accept) begin
        ld_len  = 1'b1;
        state_n = addr_match ? S_WAIT : S_DROP;
      end
      S_WAIT: if (space_ok) state_n = S_HDR_DA;
      S_HDR_DA: begin
        sel_da  = 1'b1;
        fifo_we = 1'b1;
        state_n = S_HDR_LEN;
      end
      S_HDR_LEN: begin
        sel_len = 1'b1;
        fifo_we = 1'b1;
        state_n = (len == '0) ? S_FCS : S_DATA;
      end
      S_DATA: if (accept) begin
        ld_data = 1'b1;
        fifo_we = 1'b1;
        if (last_data) state_n = S_FCS;
      end
      S_FCS: if (accept) begin
        if (fcs_ok) begin
          fifo_we     = 1'b1;
          fifo_last   = 1'b1;
          fifo_commit = 1'b1;
        end else begin
          fifo_discard  = 1'b1;
          err_n       = 1'b1;
        end
        state_n = S_DA;
      end
      S_DROP: if (accept) begin
        // LEN data bytes, then the FCS byte
        if (len == '0 || cnt == len) begin
          err_n   = 1'b1;
          state_n = S_DA;
        end
      end
      default: state_n = S_DA;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_DA;
      cnt   <= '0;
      err   <= 1'b0;
    end else begin
      state <= state_n;
      err   <= err_n;
      if ((state == S_DATA || state == S_DROP) && accept) cnt <= cnt + 1'b1;
      else if (state != S_DATA && state != S_DROP)        cnt <= '0;
    end
  end

endmodule
