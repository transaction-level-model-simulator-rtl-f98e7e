// tb_noc_mesh_random: all-pairs random traffic through the full mesh at its
// default size. Every core sends NMSG messages of 1..40 flits to random other
// cores, with random pauses, while every core reads with random stalls.
// Each payload word carries (source, destination, sequence number, index);
// the receiver checks every word, and that messages between one pair of
// cores arrive in the order they were sent (one deterministic path, no
// reordering). At the end the number of messages delivered must equal the
// number sent for every one of the 14 x 14 pairs, and contention,
// backpressure and buffer overload must each have happened.
module tb_noc_mesh_random
  import transim_pkg::*;
;
  localparam int unsigned FLIT_W = DEF_FLIT_W;
  localparam int unsigned NMSG   = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_PC-1:0]   pc_wr_valid, pc_wr_ready, pc_rd_valid, pc_rd_ready, pc_rd_first, pc_rd_last;
  logic [ADDR_W-1:0] pc_wr_dst [N_PC];
  logic [LEN_W-1:0]  pc_wr_len [N_PC];
  logic [FLIT_W-1:0] pc_wr_data [N_PC];
  logic [ADDR_W-1:0] pc_rd_src [N_PC];
  logic [LEN_W-1:0]  pc_rd_len [N_PC];
  logic [FLIT_W-1:0] pc_rd_data [N_PC];
  logic [N_SW-1:0]   sw_overload, sw_contention, sw_blocked;
  logic [N_PC-1:0]   ni_overload;

  int checks = 0, failures = 0, senders_done = 0;
  int sent [N_PC][N_PC];
  int rcvd [N_PC][N_PC];
  int n_cont = 0, n_blk = 0, n_ovl = 0;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [FLIT_W-1:0] pat(int s, int d, int q, int k);
    return FLIT_W'({8'(s), 8'(d), 16'(q), 16'(k), 16'hBEEF});
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (sw_contention != '0) n_cont++;
    if (sw_blocked != '0) n_blk++;
    if (sw_overload != '0 || ni_overload != '0) n_ovl++;
  end

  for (genvar p = 0; p < N_PC; p++) begin : g_pc
    // sender
    initial begin
      int d, len, k, q;
      pc_wr_valid[p] = 1'b0; pc_wr_dst[p] = '0; pc_wr_len[p] = '0; pc_wr_data[p] = '0;
      wait (rst_n);
      for (int m = 0; m < NMSG; m++) begin
        d = (p + 1 + $urandom % (N_PC - 1)) % N_PC;
        len = 1 + $urandom % 40;
        q = sent[p][d];
        sent[p][d]++;
        repeat ($urandom % 20) @(negedge clk);
        @(negedge clk);
        pc_wr_valid[p] = 1'b1;
        pc_wr_dst[p]   = ADDR_W'(d);
        pc_wr_len[p]   = LEN_W'(len);
        pc_wr_data[p]  = pat(p, d, q, 0);
        k = 0;
        while (k < len) begin
          @(posedge clk);
          if (pc_wr_ready[p]) begin
            k++;
            @(negedge clk);
            pc_wr_data[p] = pat(p, d, q, k);
            if (k == len) pc_wr_valid[p] = 1'b0;
          end
        end
      end
      senders_done++;
    end

    // reader with random stalls
    int k_in = 0;
    always @(negedge clk) pc_rd_ready[p] <= ($urandom % 4) != 0;
    always @(posedge clk) if (rst_n && pc_rd_valid[p] && pc_rd_ready[p]) begin
      int s;
      s = int'(pc_rd_src[p]);
      check(s < N_PC, "source in range");
      if (s < N_PC) begin
        check(pc_rd_first[p] == (k_in == 0), "first mark");
        check(pc_rd_data[p] == pat(s, p, rcvd[s][p], k_in), "payload word and pair order");
        if (pc_rd_last[p]) begin
          check(k_in + 1 == int'(pc_rd_len[p]), "length");
          rcvd[s][p]++;
          k_in = 0;
        end else k_in++;
      end
    end
  end

  initial begin
    int tot;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (senders_done == N_PC);
    repeat (3000) @(posedge clk);
    tot = 0;
    for (int s = 0; s < N_PC; s++)
      for (int d = 0; d < N_PC; d++) begin
        check(rcvd[s][d] == sent[s][d], $sformatf("pair %0d->%0d delivered %0d of %0d", s, d, rcvd[s][d], sent[s][d]));
        tot += rcvd[s][d];
      end
    check(tot == N_PC * NMSG, "total messages");
    check(n_cont > 0, "contention happened");
    check(n_blk > 0, "backpressure happened");
    check(n_ovl > 0, "buffer overload happened");
    $display("messages %0d; contention %0d, blocked %0d, overload %0d cycles", tot, n_cont, n_blk, n_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
