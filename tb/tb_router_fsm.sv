// tb_router_fsm: self-checking test of the router controller.
//
// Drives the controller's inputs cycle by cycle through directed packet
// scenarios and compares every control output with the value expected for
// that cycle: a normal packet that waits for FIFO space with pkt_valid
// gaps, a zero-length packet, a packet with a wrong FCS, a packet for an
// unknown address, and back-to-back packets. The number of cycles
// suspend_data_in stays high is checked too (wait cycles plus two).
module tb_router_fsm;
  import router_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic pkt_valid, addr_match, fcs_ok, space_ok;
  byte_t len_q;
  logic suspend_data_in, err, ld_da, ld_len, ld_data, sel_da, sel_len;
  logic fifo_we, fifo_last, fifo_commit, fifo_discard;
  state_t state;

  int checks = 0, failures = 0;
  int errs_seen = 0;

  router_fsm dut (.*);

  always #5 clk = ~clk;

  // expected-output vector, in this order
  typedef struct packed {
    logic sus, lda, llen, ldat, sda, slen, we, last, cm, dis;
  } exp_t;
  localparam exp_t NONE    = '0;
  localparam exp_t E_DA    = '{lda: 1, default: 0};
  localparam exp_t E_LEN   = '{llen: 1, default: 0};
  localparam exp_t E_SUS   = '{sus: 1, default: 0};
  localparam exp_t E_HDA   = '{sus: 1, sda: 1, we: 1, default: 0};
  localparam exp_t E_HLEN  = '{sus: 1, slen: 1, we: 1, default: 0};
  localparam exp_t E_DATA  = '{ldat: 1, we: 1, default: 0};
  localparam exp_t E_FCSOK = '{we: 1, last: 1, cm: 1, default: 0};
  localparam exp_t E_FCSNG = '{dis: 1, default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (state %s)", what, state.name());
    end
  endtask

  always @(posedge clk) if (rst_n && err) errs_seen++;

  // one clock: apply pkt_valid, check outputs, advance
  task automatic step(input logic pv, input exp_t e, input string what);
    exp_t got;
    @(negedge clk);
    pkt_valid = pv;
    #1;
    got = '{sus: suspend_data_in, lda: ld_da, llen: ld_len, ldat: ld_data,
            sda: sel_da, slen: sel_len, we: fifo_we, last: fifo_last,
            cm: fifo_commit, dis: fifo_discard};
    check(got == e, $sformatf("%s: got %b want %b", what, got, e));
    @(posedge clk);
    #1 pkt_valid = 1'b0;
  endtask

  task automatic expect_err(input int base, input int delta, input string what);
    @(posedge clk);
    #1 check(errs_seen == base + delta, what);
  endtask

  // a packet for a known port; waits `wait_cyc` cycles for space
  task automatic good_packet(input int len, input int wait_cyc, input bit good_fcs,
                            input byte_t hi = 8'h00);
    int e0, sus_cycles;
    e0 = errs_seen;
    addr_match = 1'b1; space_ok = 1'b0; fcs_ok = good_fcs; len_q = byte_t'(len) | hi;
    step(0, NONE, "idle");
    step(1, E_DA, "DA");
    step(1, E_LEN, "LEN");
    sus_cycles = 0;
    for (int k = 0; k < wait_cyc; k++) begin
      step(1, E_SUS, "wait for space");
      sus_cycles++;
    end
    space_ok = 1'b1;
    step(1, E_SUS, "space found");
    sus_cycles++;
    space_ok = 1'b0;
    step(1, E_HDA, "copy DA");
    step(1, E_HLEN, "copy LEN");
    sus_cycles += 2;
    check(sus_cycles == wait_cyc + 3, "suspend length");
    for (int k = 0; k < len; k++) begin
      if (k % 2 == 1) step(0, NONE, "gap in data");
      step(1, E_DATA, "data");
    end
    step(0, NONE, "gap before FCS");
    step(1, good_fcs ? E_FCSOK : E_FCSNG, "FCS");
    expect_err(e0, good_fcs ? 0 : 1, "err after FCS");
    check(state == S_DA, "back to DA");
  endtask

  task automatic unknown_packet(input int len);
    int e0;
    e0 = errs_seen;
    addr_match = 1'b0; space_ok = 1'b0; fcs_ok = 1'b1; len_q = byte_t'(len);
    step(1, E_DA, "DA");
    step(1, E_LEN, "LEN");
    for (int k = 0; k < len + 1; k++) begin
      step(0, NONE, "gap in dropped packet");
      step(1, NONE, "dropped byte");
      if (k < len) check(errs_seen == e0, "no err before end of drop");
    end
    expect_err(e0, 1, "err after dropped packet");
    check(state == S_DA, "back to DA after drop");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pkt_valid = 0; addr_match = 0; fcs_ok = 0; space_ok = 0;
    len_q = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(state == S_DA && !suspend_data_in && !err, "reset state");
    good_packet(3, 4, 1'b1);
    good_packet(0, 0, 1'b1);
    good_packet(5, 1, 1'b0);
    good_packet(MAX_LEN, 2, 1'b1);
    unknown_packet(2);
    unknown_packet(0);
    good_packet(1, 0, 1'b1);
    // only the low six bits of LEN count: 64+2 carries two data bytes
    good_packet(2, 0, 1'b1, 8'h40);
    check(errs_seen == 3, "three errors in total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
