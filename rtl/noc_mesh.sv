// noc_mesh: the complete network-on-chip of the 14-core platform.
//
// Sixteen noc_switch routers form a 4x4 mesh; fourteen noc_ni network
// interfaces attach the processing cores (PCs) to the switch at the
// lower-left corner of their tile (transim_pkg::PC_SWITCH), leaving the two
// top-right switches without a core. Every link is a pair of one-way
// valid/ready flit channels, each ending in the receiving side's BUF_DEPTH
// flit buffer. Links that would leave the mesh are tied off (nothing comes
// in, anything going out would be accepted; XY routing never sends there).
// The cores themselves are outside this module: each PC's NI ports are
// brought out as element p of the pc_* arrays (PC1 is element 0), with the
// meaning and timing given in noc_ni. The status outputs report, per switch,
// a full input buffer (sw_overload), a header waiting for its output
// (sw_contention) and a flit held back by a full downstream buffer
// (sw_blocked), and per NI a full receive buffer (ni_overload); they mirror
// the buffer-overload notice of the original transaction-level model and make the flow control
// visible. Mesh size, core count, placement, link width and buffer depth
// follow the original transaction-level model; the wiring conventions are this design's own.
module noc_mesh
  import transim_pkg::*;
#(
  parameter int unsigned FLIT_W    = DEF_FLIT_W,
  parameter int unsigned BUF_DEPTH = DEF_BUF_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // write transactions, one per PC
  input  logic [N_PC-1:0]   pc_wr_valid,
  output logic [N_PC-1:0]   pc_wr_ready,
  input  logic [ADDR_W-1:0] pc_wr_dst  [N_PC],
  input  logic [LEN_W-1:0]  pc_wr_len  [N_PC],
  input  logic [FLIT_W-1:0] pc_wr_data [N_PC],
  // read transactions, one per PC
  output logic [N_PC-1:0]   pc_rd_valid,
  input  logic [N_PC-1:0]   pc_rd_ready,
  output logic [ADDR_W-1:0] pc_rd_src  [N_PC],
  output logic [LEN_W-1:0]  pc_rd_len  [N_PC],
  output logic [FLIT_W-1:0] pc_rd_data [N_PC],
  output logic [N_PC-1:0]   pc_rd_first,
  output logic [N_PC-1:0]   pc_rd_last,
  // status
  output logic [N_SW-1:0]   sw_overload,
  output logic [N_SW-1:0]   sw_contention,
  output logic [N_SW-1:0]   sw_blocked,
  output logic [N_PC-1:0]   ni_overload
);
  localparam int unsigned FW = FLIT_W + 2;

  logic [N_PORT-1:0] in_valid  [N_SW];
  logic [N_PORT-1:0] in_ready  [N_SW];
  logic [FW-1:0]     in_flit   [N_SW][N_PORT];
  logic [N_PORT-1:0] out_valid [N_SW];
  logic [N_PORT-1:0] out_ready [N_SW];
  logic [FW-1:0]     out_flit  [N_SW][N_PORT];
  logic [N_PORT-1:0] ovl       [N_SW];

  // NI <-> switch local port
  logic [N_PC-1:0]   ni_out_valid, ni_out_ready, ni_in_valid, ni_in_ready;
  logic [FW-1:0]     ni_out_flit [N_PC];
  logic [FW-1:0]     ni_in_flit  [N_PC];

  for (genvar s = 0; s < N_SW; s++) begin : g_sw
    noc_switch #(
      .SW_ID(s), .FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH),
      .SEED(16'(16'h1D0F + s * 16'h2F1))
    ) u_sw (
      .clk, .rst_n,
      .in_valid   (in_valid[s]),
      .in_ready   (in_ready[s]),
      .in_flit    (in_flit[s]),
      .out_valid  (out_valid[s]),
      .out_ready  (out_ready[s]),
      .out_flit   (out_flit[s]),
      .overload   (ovl[s]),
      .contention (sw_contention[s]),
      .blocked    (sw_blocked[s])
    );
    assign sw_overload[s] = |ovl[s];

    for (genvar p = 0; p < N_PORT; p++) begin : g_port
      localparam int unsigned NB = neighbour(s, p);
      localparam int unsigned OP = opposite(p);
      localparam int unsigned PC = pc_at(s);
      if (p == P_LOCAL && PC < N_PC) begin : g_pc
        assign in_valid[s][p]   = ni_out_valid[PC];
        assign in_flit[s][p]    = ni_out_flit[PC];
        assign ni_out_ready[PC] = in_ready[s][p];
        assign ni_in_valid[PC]  = out_valid[s][p];
        assign ni_in_flit[PC]   = out_flit[s][p];
        assign out_ready[s][p]  = ni_in_ready[PC];
      end else if (p != P_LOCAL && NB < N_SW) begin : g_link
        assign in_valid[s][p]  = out_valid[NB][OP];
        assign in_flit[s][p]   = out_flit[NB][OP];
        assign out_ready[s][p] = in_ready[NB][OP];
      end else begin : g_edge
        assign in_valid[s][p]  = 1'b0;
        assign in_flit[s][p]   = '0;
        assign out_ready[s][p] = 1'b1;
      end
    end
  end

  for (genvar p = 0; p < N_PC; p++) begin : g_ni
    noc_ni #(.PC_ID(p), .FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH)) u_ni (
      .clk, .rst_n,
      .wr_valid      (pc_wr_valid[p]),
      .wr_ready      (pc_wr_ready[p]),
      .wr_dst        (pc_wr_dst[p]),
      .wr_len        (pc_wr_len[p]),
      .wr_data       (pc_wr_data[p]),
      .rd_valid      (pc_rd_valid[p]),
      .rd_ready      (pc_rd_ready[p]),
      .rd_src        (pc_rd_src[p]),
      .rd_len        (pc_rd_len[p]),
      .rd_data       (pc_rd_data[p]),
      .rd_first      (pc_rd_first[p]),
      .rd_last       (pc_rd_last[p]),
      .net_out_valid (ni_out_valid[p]),
      .net_out_ready (ni_out_ready[p]),
      .net_out_flit  (ni_out_flit[p]),
      .net_in_valid  (ni_in_valid[p]),
      .net_in_ready  (ni_in_ready[p]),
      .net_in_flit   (ni_in_flit[p]),
      .rx_overload   (ni_overload[p])
    );
  end
endmodule
