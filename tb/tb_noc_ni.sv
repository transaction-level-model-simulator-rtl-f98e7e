// tb_noc_ni: self-checking test of the network interface.
// Write process: the test plays a PC that sends 200 messages with random
// destinations, lengths (1..20 flits) and data, while the network side
// accepts flits with random backpressure. Every flit leaving the NI is
// compared with the expected header {dst, src=PC_ID, len} followed by the
// payload, with the tail bit on the last flit only. The header must be
// offered in the same cycle the PC raises wr_valid.
// Read process: the test injects 200 random packets on the network side;
// the PC side must see each payload with the right source, length,
// first/last marks and data. For a stretch the PC stops reading, and the
// receive buffer must then fill, raise rx_overload and hold net_in_ready low.
module tb_noc_ni
  import transim_pkg::*;
;
  localparam int unsigned FLIT_W = 64;
  localparam int unsigned PC_ID  = 6;
  localparam int unsigned NMSG   = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_dst;
  logic [LEN_W-1:0]  wr_len;
  logic [FLIT_W-1:0] wr_data;
  logic              rd_valid, rd_ready, rd_first, rd_last;
  logic [ADDR_W-1:0] rd_src;
  logic [LEN_W-1:0]  rd_len;
  logic [FLIT_W-1:0] rd_data;
  logic              net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  logic [FLIT_W+1:0] net_out_flit, net_in_flit;
  logic              rx_overload;

  int checks = 0, failures = 0;
  logic [FLIT_W+1:0] exp_out [$];   // expected flits on net_out
  logic [FLIT_W+3+ADDR_W+LEN_W:0] exp_rd [$];  // {first,last,src,len,data}
  bit stall_pc = 0;
  int overload_cycles = 0, notready_cycles = 0, rx_done = 0, tx_done = 0;

  noc_ni #(.PC_ID(PC_ID), .FLIT_W(FLIT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [FLIT_W-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  // ---- write side driver ----
  initial begin : writer
    wr_valid = 0; wr_dst = '0; wr_len = '0; wr_data = '0;
    wait (rst_n);
    @(negedge clk);
    for (int m = 0; m < NMSG; m++) begin
      int len;
      logic [FLIT_W-1:0] hdr;
      len = 1 + $urandom % 20;
      hdr = '0;
      repeat ($urandom % 3) @(negedge clk);
      wr_dst = ADDR_W'($urandom % N_PC);
      wr_len = LEN_W'(len);
      hdr[HDR_DST_LSB +: ADDR_W] = wr_dst;
      hdr[HDR_SRC_LSB +: ADDR_W] = ADDR_W'(PC_ID);
      hdr[HDR_LEN_LSB +: LEN_W]  = wr_len;
      exp_out.push_back({2'b10, hdr});
      wr_valid = 1;
      wr_data  = rnd64();
      #1 check(net_out_valid, "header offered with wr_valid");
      for (int k = 0; k < len; k++) begin
        exp_out.push_back({1'b0, k == len - 1, wr_data});
        // wait until this word is accepted
        do @(posedge clk); while (!(wr_valid && wr_ready));
        @(negedge clk);
        wr_data = rnd64();
      end
      wr_valid = 0;
    end
    tx_done = 1;
  end

  // ---- network side sink with random backpressure ----
  always @(negedge clk) net_out_ready <= ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n && net_out_valid && net_out_ready) begin
    if (exp_out.size() == 0) check(0, "unexpected flit from NI");
    else check(net_out_flit == exp_out.pop_front(), "flit sent to network");
  end

  // ---- network side injector ----
  initial begin : injector
    net_in_valid = 0; net_in_flit = '0;
    wait (rst_n);
    @(negedge clk);
    for (int m = 0; m < NMSG; m++) begin
      int len;
      logic [ADDR_W-1:0] src;
      logic [FLIT_W-1:0] hdr;
      len = 1 + $urandom % 20;
      src = ADDR_W'($urandom % N_PC);
      hdr = '0;
      hdr[HDR_DST_LSB +: ADDR_W] = ADDR_W'(PC_ID);
      hdr[HDR_SRC_LSB +: ADDR_W] = src;
      hdr[HDR_LEN_LSB +: LEN_W]  = LEN_W'(len);
      if (m == 50) begin            // PC stops reading for 300 cycles
        stall_pc = 1;
        fork begin repeat (300) @(posedge clk); stall_pc = 0; end join_none
      end
      for (int k = -1; k < len; k++) begin
        logic [FLIT_W-1:0] d;
        d = rnd64();
        net_in_valid = 1;
        net_in_flit  = (k < 0) ? {2'b10, hdr} : {1'b0, k == len - 1, d};
        if (k >= 0) exp_rd.push_back({k == 0, k == len - 1, src, LEN_W'(len), d});
        do @(posedge clk); while (!net_in_ready);
        @(negedge clk);
        net_in_valid = ($urandom % 5) != 0;
        while (!net_in_valid) begin
          @(negedge clk);
          net_in_valid = ($urandom % 5) != 0;
        end
      end
      net_in_valid = 0;
    end
  end

  // ---- PC side reader ----
  always @(negedge clk) rd_ready <= !stall_pc && (($urandom % 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (rx_overload) overload_cycles++;
    if (!net_in_ready) notready_cycles++;
    check(net_in_ready == !rx_overload, "net_in_ready is the inverse of rx_overload");
    if (rd_valid && rd_ready) begin
      if (exp_rd.size() == 0) check(0, "unexpected word to PC");
      else check({rd_first, rd_last, rd_src, rd_len, rd_data} == exp_rd.pop_front(),
                 "word delivered to PC");
      if (rd_last) rx_done++;
    end
  end

  initial begin
    rd_ready = 0; net_out_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (tx_done && rx_done == NMSG);
    repeat (20) @(posedge clk);
    check(exp_out.size() == 0, "all flits sent");
    check(exp_rd.size() == 0, "all words delivered");
    check(overload_cycles > 0, "receive buffer reported overload");
    check(notready_cycles > 0, "network side saw backpressure");
    $display("overload cycles %0d", overload_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
