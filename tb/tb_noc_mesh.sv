// tb_noc_mesh: end-to-end test of the full mesh at its default size
// (64-bit links, 64-flit buffers, 16 switches, 14 cores), running one vector
// of the List Sphere Decoder in the balanced-load mapping.
// The IOC core sends the input to the five A cores; each A core sends its
// partial results to all eight MCU2 cores; each MCU2 core serves the five
// requests one after the other (960 processing cycles each) and answers with
// 12480 bits; the A cores finally report to the IOC. Every word received by
// every core is checked (source, order, length, first/last marks), as are
// the message and word totals against the transaction table. The test also
// requires that the network showed each of its mechanisms at least once:
// arbitration contention, flow-control blocking, a full switch input buffer
// and a full NI receive buffer; and that the vector's latency is no shorter
// than its critical path of processing and serialisation. The latency in
// network cycles is printed.
module tb_noc_mesh
  import transim_pkg::*;
;
  localparam int unsigned FLIT_W = DEF_FLIT_W;
  localparam int unsigned C_A1 = 135, C_A2 = 482, C_MCU2 = 960;

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
  int checks = 0, failures = 0;
  int n_cont = 0, n_blk = 0, n_swovl = 0, n_niovl = 0, cycles = 0;

  noc_mesh dut (.*);

  lsd_bl_traffic #(.FLIT_W(FLIT_W), .C_A1(C_A1), .C_A2(C_A2), .C_MCU2(C_MCU2)) u_traffic (
    .clk, .rst_n, .start, .pc_wr_valid, .pc_wr_ready, .pc_wr_dst, .pc_wr_len, .pc_wr_data,
    .pc_rd_valid, .pc_rd_ready, .pc_rd_src, .pc_rd_len, .pc_rd_data, .pc_rd_first,
    .pc_rd_last, .done, .pc_done, .checks(tchecks), .failures(tfail), .msgs, .words,
    .vectors_done
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (sw_contention != '0) n_cont++;
    if (sw_blocked != '0) n_blk++;
    if (sw_overload != '0) n_swovl++;
    if (ni_overload != '0) n_niovl++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int fl(int bits);
    return (bits + FLIT_W - 1) / FLIT_W;
  endfunction

  initial begin
    int t0, lat, bound;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);
    start = 1'b1;
    t0 = cycles;
    wait (done && pc_done == '1);
    lat = cycles - t0;
    repeat (10) @(posedge clk);
    // messages: 5 to IOC, 1 + 8 to each A, 5 to each MCU2
    check(msgs == 5 + 5 * 9 + 8 * 5, $sformatf("message count %0d", msgs));
    check(words == 5 * fl(8) + 5 * (fl(384) + 8 * fl(12480)) + 8 * 5 * fl(4480),
          $sformatf("word count %0d", words));
    // critical path: IOC -> A -> last request served by an MCU2 -> A -> IOC
    bound = fl(384) + C_A1 + fl(4480) + 5 * C_MCU2 + fl(12480) + C_A2 + fl(8);
    check(lat >= bound, $sformatf("latency %0d not below bound %0d", lat, bound));
    check(n_cont > 0, "contention happened");
    check(n_blk > 0, "flow-control blocking happened");
    check(n_swovl > 0, "switch input buffer overload happened");
    check(n_niovl > 0, "NI receive buffer overload happened");
    $display("vector latency %0d cycles (bound %0d); contention %0d, blocked %0d, switch overload %0d, NI overload %0d cycles",
             lat, bound, n_cont, n_blk, n_swovl, n_niovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog: done=%b pc_done=%b msgs=%0d", done, pc_done, msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail + 1);
    $finish;
  end
endmodule
