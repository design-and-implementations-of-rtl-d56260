// tb_router_out: self-checking test of the output block.
//
// Writes random packets to randomly chosen ports (some discarded before
// their commit) while all three ports are read at random, independently.
// Each port's words are compared with a per-port queue; writes must never
// show up on a port other than the selected one, and space_ok must say
// whether the selected FIFO holds `need` more words.
module tb_router_out;
  import router_pkg::*;

  localparam int unsigned NP = 3;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n;
  logic [NP-1:0] dest_oh;
  logic we, commit, discard, space_ok;
  fifo_word_t wdata;
  logic [AW:0] need;
  logic [NP-1:0] read_enb, vld_out, last_out;
  byte_t data_out [NP];

  int checks = 0, failures = 0;
  fifo_word_t q[NP][$];      // committed, per port
  int held[NP];              // words in each FIFO, committed or not
  int parallel_reads = 0;

  router_out #(.NUM_PORTS(NP), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // readers
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NP; i++) begin
        check(vld_out[i] == (q[i].size() != 0), $sformatf("vld_out[%0d]", i));
        if (vld_out[i] && q[i].size() != 0)
          check(data_out[i] == q[i][0].data && last_out[i] == q[i][0].last,
                $sformatf("data on port %0d", i));
      end
      read_enb = NP'($urandom);
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(read_enb & vld_out) > 1) parallel_reads++;
      for (int i = 0; i < NP; i++)
        if (read_enb[i] && vld_out[i] && q[i].size() != 0) begin
          void'(q[i].pop_front());
          held[i]--;
        end
    end
  end

  initial begin
    int p, n;
    fifo_word_t pend[$];
    rst_n = 1'b0; dest_oh = '0; we = 0; commit = 0; discard = 0; wdata = '0;
    need = '0; read_enb = '0;
    for (int i = 0; i < NP; i++) held[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      p = $urandom_range(0, NP - 1);
      n = $urandom_range(1, 8);
      @(negedge clk);
      dest_oh = NP'(1) << p;
      need = (AW+1)'(n);
      #1 check(space_ok == (DEPTH - held[p] >= n), "space_ok");
      // wait for room, as the controller does
      while (!(DEPTH - held[p] >= n)) begin
        @(negedge clk);
        #1;
      end
      check(space_ok, "space_ok after wait");
      pend.delete();
      for (int j = 0; j < n; j++) begin
        wdata.data = byte_t'($urandom);
        wdata.last = (j == n - 1);
        we = 1'b1;
        commit = (j == n - 1) && (k % 7 != 6);
        if ((k % 7 == 6) && j == n - 1) begin
          we = 1'b0;
          discard = 1'b1;
        end
        @(posedge clk);
        if (we) begin
          pend.push_back(wdata);
          held[p]++;
        end
        if (commit) foreach (pend[m]) q[p].push_back(pend[m]);
        if (discard) held[p] -= pend.size();
        #1 we = 1'b0; commit = 1'b0; discard = 1'b0;
      end
    end
    repeat (300) @(negedge clk);
    for (int i = 0; i < NP; i++) check(q[i].size() == 0 && !vld_out[i], "drained");
    check(parallel_reads > 0, "ports read in parallel");
    $display("parallel reads: %0d", parallel_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
