// tb_router_reg: self-checking test of the header register block.
//
// Feeds random packets' header and data bytes through the load strobes and
// checks the held DA and LEN, the running FCS against an XOR computed here,
// fcs_ok for a right and a wrong FCS byte, the one-hot address decode for
// every port address and for unknown addresses, and the write-byte mux.
module tb_router_reg;
  import router_pkg::*;

  localparam int unsigned NP = 3;
  localparam logic [NP-1:0][7:0] ADDR = {8'h02, 8'h01, 8'h00};

  logic clk = 1'b0;
  logic rst_n;
  byte_t data_in;
  logic ld_da, ld_len, ld_data, sel_da, sel_len;
  byte_t da_q, len_q, fcs_q, wr_byte;
  logic fcs_ok, addr_match;
  logic [NP-1:0] dest_oh;

  int checks = 0, failures = 0;

  router_reg #(.NUM_PORTS(NP), .PORT_ADDR(ADDR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic strobe(input byte_t b, input logic a, input logic l, input logic d);
    data_in = b; ld_da = a; ld_len = l; ld_data = d;
    @(posedge clk); #1;
    ld_da = 1'b0; ld_len = 1'b0; ld_data = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t da, len, ref_fcs, b;
    logic [NP-1:0] exp_oh;
    rst_n = 1'b0; data_in = '0; ld_da = 0; ld_len = 0; ld_data = 0;
    sel_da = 0; sel_len = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(da_q == 0 && len_q == 0 && fcs_q == 0, "registers cleared by reset");

    for (int p = 0; p < 200; p++) begin
      da  = (p % 4 == 3) ? byte_t'($urandom_range(3, 255)) : byte_t'(p % 3);
      len = byte_t'($urandom_range(0, MAX_LEN));
      strobe(da, 1, 0, 0);
      ref_fcs = da;
      check(da_q == da, "DA held");
      check(fcs_q == ref_fcs, "FCS starts with DA");
      exp_oh = '0;
      for (int i = 0; i < NP; i++) if (da == ADDR[i]) exp_oh[i] = 1'b1;
      check(dest_oh == exp_oh, $sformatf("decode of DA %0d", da));
      check(addr_match == (exp_oh != 0), "address match flag");
      strobe(len, 0, 1, 0);
      ref_fcs ^= len;
      check(len_q == len && da_q == da, "LEN held, DA kept");
      // write-byte mux
      data_in = 8'h5a;
      sel_da = 1; #1 check(wr_byte == da, "mux selects DA");
      sel_da = 0; sel_len = 1; #1 check(wr_byte == len, "mux selects LEN");
      sel_len = 0; #1 check(wr_byte == 8'h5a, "mux passes data_in");
      for (int k = 0; k < len; k++) begin
        b = byte_t'($urandom);
        strobe(b, 0, 0, 1);
        ref_fcs ^= b;
      end
      check(fcs_q == ref_fcs, "accumulated FCS");
      data_in = ref_fcs;  #1 check(fcs_ok, "correct FCS byte accepted");
      data_in = ref_fcs ^ byte_t'(1 << (p % 8)); #1 check(!fcs_ok, "corrupt FCS byte rejected");
      // a cycle without strobes changes nothing
      @(posedge clk); #1;
      check(fcs_q == ref_fcs && da_q == da && len_q == len, "hold without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
