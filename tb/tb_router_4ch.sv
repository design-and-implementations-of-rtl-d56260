// tb_router_4ch: the end-to-end router test run with four output ports.
//
// The same traffic, scoreboard and mechanism counters as tb_router_top,
// with router_top built for four channels (NUM_PORTS = 4, port i at address
// i). Packets go to all four ports and all four are read in parallel; the
// room-check phase at the FIFO's edge is repeated on port 1.
module tb_router_4ch;
  import router_pkg::*;

  localparam int unsigned NP = 4;
  localparam logic [NP-1:0][7:0] ADDR = DEFAULT_ADDR[NP-1:0];

  logic clk = 1'b0;
  logic rst_n;
  byte_t data_in;
  logic pkt_valid, suspend_data_in, err;
  logic [NP-1:0] read_enb, vld_out, last_out;
  byte_t data_out [NP];

  int checks = 0, failures = 0;

  // expected words per port
  fifo_word_t exp_q[NP][$];
  int read_pct[NP];          // chance (percent) that a reader pops in a cycle
  int exp_errs = 0, got_errs = 0;
  int pkts_sent = 0, pkts_read[NP];
  // mechanism counters
  int n_space_wait = 0, n_fcs_err = 0, n_unknown = 0, n_len0 = 0, n_len63 = 0;
  int n_parallel = 0, n_wr_while_rd = 0;
  int sus_run = 0, max_sus = 0;

  router_top #(.NUM_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- readers
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NP; i++) begin
        check(vld_out[i] == (exp_q[i].size() != 0), $sformatf("vld_out[%0d]", i));
        if (vld_out[i] && exp_q[i].size() != 0)
          check(data_out[i] == exp_q[i][0].data && last_out[i] == exp_q[i][0].last,
                $sformatf("port %0d byte: got %h/%b want %h/%b", i, data_out[i],
                          last_out[i], exp_q[i][0].data, exp_q[i][0].last));
        read_enb[i] = ($urandom_range(0, 99) < read_pct[i]);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(read_enb & vld_out) > 1) n_parallel++;
      if (pkt_valid && !suspend_data_in && |(read_enb & vld_out)) n_wr_while_rd++;
      if (err) got_errs++;
      if (suspend_data_in) begin
        sus_run++;
        if (sus_run > max_sus) max_sus = sus_run;
      end
      else begin
        if (sus_run > 3) n_space_wait++;
        sus_run = 0;
      end
      for (int i = 0; i < NP; i++)
        if (read_enb[i] && vld_out[i] && exp_q[i].size() != 0) begin
          if (exp_q[i][0].last) pkts_read[i]++;
          void'(exp_q[i].pop_front());
        end
    end
  end

  // ----------------------------------------------------------------- sender
  // Send one byte: present it, keep it until a clock edge takes it.
  task automatic send_byte(input byte_t b);
    bit taken;
    taken = 0;
    while (!taken) begin
      @(negedge clk);
      data_in   = b;
      pkt_valid = ($urandom_range(0, 9) != 0);
      #4;
      taken = pkt_valid && !suspend_data_in;
      @(posedge clk);
    end
    #1 pkt_valid = 1'b0;
  endtask

  // kind: 0 good, 1 wrong FCS, 2 unknown address
  task automatic send_packet(input int port, input int len, input int kind);
    byte_t da, fcs, b;
    fifo_word_t pkt[$];
    bit was_idle;
    da = (kind == 2) ? byte_t'($urandom_range(3, 255)) : ADDR[port];
    fcs = da ^ byte_t'(len);
    send_byte(da);
    pkt.push_back('{last: 1'b0, data: da});
    send_byte(byte_t'(len));
    pkt.push_back('{last: 1'b0, data: byte_t'(len)});
    for (int k = 0; k < len; k++) begin
      b = byte_t'($urandom);
      fcs ^= b;
      send_byte(b);
      pkt.push_back('{last: 1'b0, data: b});
    end
    if (kind == 1) fcs ^= byte_t'(8'h01 << $urandom_range(0, 7));
    pkt.push_back('{last: 1'b1, data: fcs});
    // FCS byte: the packet becomes visible at the edge that takes it
    begin
      bit taken;
      taken = 0;
      while (!taken) begin
        @(negedge clk);
        data_in   = fcs;
        pkt_valid = ($urandom_range(0, 9) != 0);
        #4;
        taken = pkt_valid && !suspend_data_in;
        was_idle = (kind == 0) && (exp_q[port].size() == 0);
        @(posedge clk);
      end
      if (kind == 0) foreach (pkt[m]) exp_q[port].push_back(pkt[m]);
      #1 pkt_valid = 1'b0;
      if (was_idle) begin
        @(negedge clk);
        check(vld_out[port] && data_out[port] == da,
              "packet visible the cycle after its FCS byte");
      end
    end
    pkts_sent++;
    if (kind != 0) exp_errs++;
    if (kind == 1) n_fcs_err++;
    if (kind == 2) n_unknown++;
    if (len == 0) n_len0++;
    if (len == MAX_LEN) n_len63++;
  endtask

  initial begin
    int r, len, kind;
    rst_n = 1'b0; data_in = '0; pkt_valid = 1'b0; read_enb = '0;
    for (int i = 0; i < NP; i++) begin
      read_pct[i] = 70;
      pkts_read[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!suspend_data_in && !err && vld_out == '0, "idle after reset");

    // phase 1: random traffic
    for (int p = 0; p < 800; p++) begin
      r = $urandom_range(0, 99);
      kind = (r < 8) ? 1 : (r < 14) ? 2 : 0;
      r = $urandom_range(0, 9);
      len = (r == 0) ? 0 : (r == 1) ? int'(MAX_LEN) : $urandom_range(1, MAX_LEN);
      send_packet($urandom_range(0, NP - 1), len, kind);
    end

    // phase 2: port 1 stops reading, so its FIFO fills and the router
    // must suspend its input until the reader resumes
    read_pct[1] = 0;
    fork
      for (int p = 0; p < 4; p++) send_packet(1, MAX_LEN, 0);
      begin
        wait (sus_run > 40);
        read_pct[1] = 50;
      end
    join

    // phase 3: the room check at its edge. With port 1 not read, a
    // 63-byte packet (66 words) leaves 62 of 128 words free: a 59-byte
    // packet (62 words) must go straight in, a 60-byte one (63 words) must
    // wait until the reader frees space.
    read_pct[1] = 100;
    wait (exp_q[1].size() == 0);
    @(negedge clk) read_pct[1] = 0;
    send_packet(1, MAX_LEN, 0);
    max_sus = 0;
    send_packet(1, 59, 0);
    check(max_sus == 3, $sformatf("exact fit taken without a wait (suspend %0d)", max_sus));
    read_pct[1] = 100;
    wait (exp_q[1].size() == 0);
    @(negedge clk) read_pct[1] = 0;
    send_packet(1, MAX_LEN, 0);
    fork
      send_packet(1, 60, 0);
      begin
        for (int c = 0; c < 400 && sus_run < 100; c++) @(posedge clk);
        check(sus_run >= 100, "one word short: input suspended until read");
        read_pct[1] = 100;
      end
    join

    // drain
    for (int i = 0; i < NP; i++) read_pct[i] = 100;
    repeat (300) @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      check(exp_q[i].size() == 0 && !vld_out[i], $sformatf("port %0d drained", i));
      check(pkts_read[i] > 0, $sformatf("port %0d delivered packets", i));
    end
    check(got_errs == exp_errs, $sformatf("err pulses %0d, expected %0d", got_errs, exp_errs));

    $display("packets sent %0d, read %0d/%0d/%0d/%0d, err pulses %0d", pkts_sent,
             pkts_read[0], pkts_read[1], pkts_read[2], pkts_read[3], got_errs);
    $display("space waits %0d, FCS errors %0d, unknown DA %0d, len0 %0d, len63 %0d, parallel reads %0d, write during read %0d",
             n_space_wait, n_fcs_err, n_unknown, n_len0, n_len63, n_parallel, n_wr_while_rd);
    check(n_space_wait > 0, "a wait for FIFO space happened");
    check(n_fcs_err > 0, "an FCS error happened");
    check(n_unknown > 0, "an unknown-address drop happened");
    check(n_len0 > 0, "a zero-length packet was sent");
    check(n_len63 > 0, "a maximum-length packet was sent");
    check(n_parallel > 0, "ports were read in parallel");
    check(n_wr_while_rd > 0, "input taken while a port was read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
