// tb_noc_switch: self-checking test of one mesh switch (switch 6 of the mesh
// reference layout, the one that carries PC3).
// 1. Latency: a lone 4-flit packet written into an idle switch must offer
//    its header on the routed output two cycles after it was written, hand it
//    over at the third edge and then stream one flit per cycle.
// 2. Traffic: all five inputs send 60 packets each to random destination PCs
//    with random lengths, with random input gaps and random output
//    backpressure, and for one stretch an output that refuses everything.
//    Each output checks that every packet arrives on the port the XY rule
//    gives (computed here from the tile placement), that its flits are
//    contiguous and in order (wormhole), that the tail closes it, and that
//    packets from one input to one output keep their order. All packets must
//    arrive. Contention, flow-control blocking and a full input buffer
//    (overload) must each be seen at least once.
module tb_noc_switch
  import transim_pkg::*;
;
  localparam int unsigned FLIT_W = 64;
  localparam int unsigned SW     = 5;     // switch S6
  localparam int unsigned NPKT   = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_PORT-1:0] in_valid, in_ready, out_valid, out_ready, overload;
  logic [FLIT_W+1:0] in_flit  [N_PORT];
  logic [FLIT_W+1:0] out_flit [N_PORT];
  logic contention, blocked;

  int checks = 0, failures = 0;
  int fig_sw [14] = '{13, 9, 6, 7, 2, 4, 14, 5, 1, 10, 11, 3, 12, 8};
  // expected packets per (input, output): header words
  logic [FLIT_W-1:0] expq [N_PORT][N_PORT][$];
  int n_contention = 0, n_blocked = 0, n_overload = 0, delivered = 0;
  int hold_port = -1;     // output forced to refuse everything
  bit random_ready = 0;
  int inj_done = 0;

  noc_switch #(.SW_ID(SW), .FLIT_W(FLIT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expect_port(int d);
    int x = SW % 4, y = SW / 4, tx = (fig_sw[d] - 1) % 4, ty = (fig_sw[d] - 1) / 4;
    if (tx > x) return 2;
    if (tx < x) return 4;
    if (ty > y) return 1;
    if (ty < y) return 3;
    return 0;
  endfunction

  function automatic logic [FLIT_W-1:0] header(int dst, int src, int len);
    logic [FLIT_W-1:0] h;
    h = '0;
    h[HDR_DST_LSB +: ADDR_W] = ADDR_W'(dst);
    h[HDR_SRC_LSB +: ADDR_W] = ADDR_W'(src);
    h[HDR_LEN_LSB +: LEN_W]  = LEN_W'(len);
    h[63:48] = 16'($urandom);             // tag to tell packets apart
    return h;
  endfunction

  // payload word k of the packet whose header is h, entering on input i
  function automatic logic [FLIT_W-1:0] payload(logic [FLIT_W-1:0] h, int i, int k);
    return {h[63:48], 8'(i), 8'(k), h[31:0]} ^ 64'h0F0F_0000_0000_0000;
  endfunction

  // ---- output monitors ----
  for (genvar o = 0; o < N_PORT; o++) begin : g_mon
    logic [FLIT_W-1:0] cur_h;
    int cur_in = -1, cur_k = 0, cur_len = 0;
    always @(negedge clk)
      out_ready[o] <= (o == hold_port) ? 1'b0 : (random_ready ? (($urandom % 3) != 0) : 1'b1);
    always @(posedge clk) if (rst_n && out_valid[o] && out_ready[o]) begin
      logic [FLIT_W+1:0] f;
      f = out_flit[o];
      if (cur_in < 0) begin
        check(f[FLIT_W+1] && !f[FLIT_W], "packet starts with a header");
        cur_in = -1;
        for (int i = 0; i < N_PORT; i++)
          if (expq[i][o].size() != 0 && expq[i][o][0] == f[FLIT_W-1:0]) cur_in = i;
        check(cur_in >= 0, $sformatf("header on output %0d matches an expected packet", o));
        if (cur_in >= 0) void'(expq[cur_in][o].pop_front());
        cur_h = f[FLIT_W-1:0];
        cur_k = 0;
        cur_len = int'(f[HDR_LEN_LSB +: LEN_W]);
        if (cur_in < 0) cur_in = 99;
      end else begin
        check(!f[FLIT_W+1], "no header inside a packet");
        check(f[FLIT_W-1:0] == payload(cur_h, cur_in, cur_k), "payload order and integrity");
        check(f[FLIT_W] == (cur_k == cur_len - 1), "tail on last flit only");
        cur_k++;
        if (f[FLIT_W]) begin
          cur_in = -1;
          delivered++;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (contention) n_contention++;
    if (blocked) n_blocked++;
    if (overload != '0) n_overload++;
  end

  // ---- input drivers ----
  task automatic send_packet(int i, int dst, int len, bit gaps);
    logic [FLIT_W-1:0] h;
    h = header(dst, $urandom % N_PC, len);
    expq[i][expect_port(dst)].push_back(h);
    for (int k = -1; k < len; k++) begin
      in_valid[i] = 1'b1;
      in_flit[i]  = (k < 0) ? {2'b10, h} : {1'b0, k == len - 1, payload(h, i, k)};
      do @(posedge clk); while (!in_ready[i]);
      @(negedge clk);
      in_valid[i] = 1'b0;
      if (gaps) repeat ($urandom % 2) @(negedge clk);
    end
  endtask

  initial begin
    int t0, t_hdr;
    in_valid = '0;
    for (int i = 0; i < N_PORT; i++) in_flit[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. latency of a lone packet: PC9 lives on S1, reached westwards
    fork
      send_packet(1, 8, 4, 0);
      begin
        @(posedge clk);            // the header is written at this edge
        t0 = $time;
        #1 check(!out_valid[4], "no output in the cycle of the write");
        @(posedge clk); #1;
        check(!out_valid[4], "header not yet offered one cycle after the write");
        @(posedge clk); #1;
        check(out_valid[4] && out_flit[4][FLIT_W+1], "header offered two cycles after the write");
        t_hdr = $time;
        for (int k = 0; k < 4; k++) begin
          @(posedge clk); #1;
          check(out_valid[4] && !out_flit[4][FLIT_W+1], "payload streams one flit per cycle");
        end
      end
    join
    check((t_hdr - t0) == 21, "header offered two cycles (+1 sampling delay) after the write");
    repeat (10) @(negedge clk);
    check(delivered == 1, "lone packet delivered");

    // 2. random traffic on all inputs
    random_ready = 1;
    fork
      begin
        repeat (300) @(negedge clk);
        hold_port = 2;              // east output refuses flits for a while
        repeat (400) @(negedge clk);
        hold_port = -1;
      end
    join_none
    for (int i = 0; i < N_PORT; i++) begin
      fork
        automatic int ii = i;
        begin
          for (int p = 0; p < NPKT; p++)
            send_packet(ii, $urandom % N_PC, 1 + $urandom % 12, 1);
          inj_done++;
        end
      join_none
    end
    wait (inj_done == N_PORT);
    repeat (200) @(negedge clk);
    for (int i = 0; i < N_PORT; i++)
      for (int o = 0; o < N_PORT; o++)
        check(expq[i][o].size() == 0, "every packet delivered");
    check(delivered == 1 + N_PORT * NPKT, "delivered count");
    check(n_contention > 0, "contention happened");
    check(n_blocked > 0, "flow-control blocking happened");
    check(n_overload > 0, "input buffer overload happened");
    $display("contention %0d blocked %0d overload %0d cycles", n_contention, n_blocked, n_overload);
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
