// tb_noc_mesh_stream: throughput test of the full mesh at its default size.
// The balanced-load List Sphere Decoder traffic of tb_noc_mesh runs for
// NVEC vectors back to back (the IOC core issues all inputs at once; each
// core works through the vectors in order). Every word is checked as in
// tb_noc_mesh, the message and word totals must be NVEC times those of one
// vector, and the spacing of finished vectors may not be shorter than the
// busiest core's work per vector (each MCU2 core serves five requests of
// 960 cycles). The finishing cycle of each vector and the resulting
// throughput are printed.
module tb_noc_mesh_stream
  import transim_pkg::*;
;
  localparam int unsigned FLIT_W = DEF_FLIT_W;
  localparam int unsigned C_A1 = 135, C_A2 = 482, C_MCU2 = 960;
  localparam int unsigned NVEC = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_PC-1:0]   pc_wr_valid, pc_wr_ready, pc_rd_valid, pc_rd_ready, pc_rd_first, pc_rd_last;
  logic [ADDR_W-1:0] pc_wr_dst [N_PC];
  logic [LEN_W-1:0]  pc_wr_len [N_PC];
  logic [FLIT_W-1:0] pc_wr_data [N_PC];
  logic [ADDR_W-1:0] pc_rd_src [N_PC];
  logic [LEN_W-1:0]  pc_rd_len [N_PC];
  logic [FLIT_W-1:0] pc_rd_data [N_PC];
  logic [N_SW-1:0]   sw_overload, sw_contention, sw_blocked;
  logic [N_PC-1:0]   ni_overload, pc_done;
  logic              done;
  int tchecks, tfail, msgs, words, vectors_done;
  int checks = 0, failures = 0, cycles = 0, last_vd = 0;
  int t_vec [NVEC];

  noc_mesh dut (.*);

  lsd_bl_traffic #(.FLIT_W(FLIT_W), .C_A1(C_A1), .C_A2(C_A2), .C_MCU2(C_MCU2), .NVEC(NVEC)) u_traffic (
    .clk, .rst_n, .start, .pc_wr_valid, .pc_wr_ready, .pc_wr_dst, .pc_wr_len, .pc_wr_data,
    .pc_rd_valid, .pc_rd_ready, .pc_rd_src, .pc_rd_len, .pc_rd_data, .pc_rd_first,
    .pc_rd_last, .done, .pc_done, .checks(tchecks), .failures(tfail), .msgs, .words,
    .vectors_done
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (vectors_done != last_vd) begin
      if (vectors_done <= NVEC) t_vec[vectors_done - 1] = cycles;
      last_vd = vectors_done;
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int fl(int bits);
    return (bits + FLIT_W - 1) / FLIT_W;
  endfunction

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);
    start = 1'b1;
    t0 = cycles;
    wait (done && pc_done == '1);
    repeat (10) @(posedge clk);
    check(vectors_done == NVEC, "all vectors finished");
    check(msgs == NVEC * (5 + 5 * 9 + 8 * 5), $sformatf("message count %0d", msgs));
    check(words == NVEC * (5 * fl(8) + 5 * (fl(384) + 8 * fl(12480)) + 8 * 5 * fl(4480)),
          $sformatf("word count %0d", words));
    for (int v = 1; v < NVEC; v++) begin
      check(t_vec[v] - t_vec[v-1] >= 5 * C_MCU2,
            $sformatf("vector spacing %0d not below the MCU2 work per vector", t_vec[v] - t_vec[v-1]));
      $display("vector %0d finished at cycle %0d (+%0d)", v, t_vec[v] - t0, t_vec[v] - t_vec[v-1]);
    end
    $display("vector 0 finished at cycle %0d; %0d vectors in %0d cycles = %0d vectors per million cycles",
             t_vec[0] - t0, NVEC, t_vec[NVEC-1] - t0, (NVEC * 1000000) / (t_vec[NVEC-1] - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog: vectors_done=%0d pc_done=%b msgs=%0d", vectors_done, pc_done, msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail + 1);
    $finish;
  end
endmodule
