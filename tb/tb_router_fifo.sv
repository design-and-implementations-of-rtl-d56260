// tb_router_fifo: self-checking test of the store-and-forward packet FIFO.
//
// Writes random packets, commits most of them and discards some, while a
// random reader pops. A queue in the testbench holds the committed words;
// every popped word is compared with it. Also checked: nothing written is
// visible before its commit, a discard restores the free count, free always
// equals depth minus the words held, and the pointers wrap many times.
module tb_router_fifo;
  import router_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic rst_n;
  logic we, commit, discard, re;
  fifo_word_t wdata, rdata;
  logic rvalid;
  logic [AW:0] free;

  int checks = 0, failures = 0;
  fifo_word_t committed[$];   // visible to the reader
  fifo_word_t pending[$];     // written, not yet committed
  int discards = 0, commits = 0, pops = 0;

  router_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader side: pop at random, compare with the committed queue
  always @(negedge clk) begin
    if (rst_n) begin
      check(rvalid == (committed.size() != 0), "rvalid matches committed words");
      check(int'(free) == DEPTH - committed.size() - pending.size(), "free count");
      if (rvalid && committed.size() != 0)
        check(rdata == committed[0], "read data order");
      re = ($urandom_range(0, 2) != 0);
    end
  end
  always @(posedge clk) begin
    if (rst_n && re && rvalid && committed.size() != 0) begin
      void'(committed.pop_front());
      pops++;
    end
  end

  task automatic put(input fifo_word_t w, input bit c);
    // wait for a free slot, then write one word (with commit when c)
    while (int'(free) == 0) @(negedge clk);
    we = 1'b1; wdata = w; commit = c;
    @(posedge clk);
    pending.push_back(w);
    if (c) begin
      while (pending.size() != 0) committed.push_back(pending.pop_front());
      commits++;
    end
    #1 we = 1'b0; commit = 1'b0;
  endtask

  initial begin
    int n;
    fifo_word_t w;
    rst_n = 1'b0; we = 0; commit = 0; discard = 0; re = 0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 300; p++) begin
      n = $urandom_range(1, 8);
      @(negedge clk);
      for (int k = 0; k < n; k++) begin
        w.data = byte_t'($urandom);
        w.last = (k == n - 1);
        if (k == n - 1 && (p % 5) == 4) begin
          // last word never written: the packet is thrown away instead
          @(negedge clk);
          check(!rvalid || committed.size() != 0, "uncommitted words invisible");
          discard = 1'b1;
          @(posedge clk);
          pending.delete();
          discards++;
          #1 discard = 1'b0;
        end else begin
          put(w, k == n - 1);
          if (k != n - 1) begin
            @(negedge clk);
            check(committed.size() != 0 || !rvalid, "no early visibility");
          end
        end
      end
    end
    // drain
    repeat (200) @(negedge clk);
    check(committed.size() == 0 && !rvalid, "FIFO drained");
    check(int'(free) == DEPTH, "all space back after drain");
    check(commits > 200 && discards > 50, "commits and discards exercised");
    $display("commits=%0d discards=%0d pops=%0d", commits, discards, pops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
