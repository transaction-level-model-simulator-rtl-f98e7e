// lsd_bl_traffic: the 14 processing-core models of the balanced-load List
// Sphere Decoder mapping (PC1 = IOC, PC2..PC6 = A cores running SU, MCU1,
// MEU and LU, PC7..PC14 = MCU2 cores), wired to the pc_* ports of the mesh.
// Message sizes in bits follow the transaction table of the design
// (IOC->A 384, A->MCU2 4480, MCU2->A 12480, A->IOC 8); processing delays in
// network cycles are parameters. `start` launches NVEC decoded vectors; `done`
// rises when the IOC has every A core's result for the last one. Checks and failures of all
// models are summed on the outputs.
module lsd_bl_traffic
  import transim_pkg::*;
#(
  parameter int unsigned FLIT_W = 64,
  parameter int unsigned C_A1   = 135,
  parameter int unsigned C_A2   = 482,
  parameter int unsigned C_MCU2 = 960,
  parameter int unsigned NVEC   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [N_PC-1:0]   pc_wr_valid,
  input  logic [N_PC-1:0]   pc_wr_ready,
  output logic [ADDR_W-1:0] pc_wr_dst  [N_PC],
  output logic [LEN_W-1:0]  pc_wr_len  [N_PC],
  output logic [FLIT_W-1:0] pc_wr_data [N_PC],
  input  logic [N_PC-1:0]   pc_rd_valid,
  output logic [N_PC-1:0]   pc_rd_ready,
  input  logic [ADDR_W-1:0] pc_rd_src  [N_PC],
  input  logic [LEN_W-1:0]  pc_rd_len  [N_PC],
  input  logic [FLIT_W-1:0] pc_rd_data [N_PC],
  input  logic [N_PC-1:0]   pc_rd_first,
  input  logic [N_PC-1:0]   pc_rd_last,
  output logic              done,
  output logic [N_PC-1:0]   pc_done,
  output int                checks,
  output int                failures,
  output int                msgs,
  output int                words,
  output int                vectors_done
);
  int c [N_PC], f [N_PC], m [N_PC], w [N_PC], vd [N_PC];

  for (genvar p = 0; p < N_PC; p++) begin : g_pc
    lsd_pc_model #(
      .ROLE   (p == 0 ? 0 : (p <= 5 ? 1 : 2)),
      .PC_ID  (p),
      .FLIT_W (FLIT_W),
      .C_A1   (C_A1),
      .C_A2   (C_A2),
      .C_MCU2 (C_MCU2),
      .NVEC   (NVEC)
    ) u_pc (
      .clk, .rst_n, .start,
      .wr_valid (pc_wr_valid[p]),
      .wr_ready (pc_wr_ready[p]),
      .wr_dst   (pc_wr_dst[p]),
      .wr_len   (pc_wr_len[p]),
      .wr_data  (pc_wr_data[p]),
      .rd_valid (pc_rd_valid[p]),
      .rd_ready (pc_rd_ready[p]),
      .rd_src   (pc_rd_src[p]),
      .rd_len   (pc_rd_len[p]),
      .rd_data  (pc_rd_data[p]),
      .rd_first (pc_rd_first[p]),
      .rd_last  (pc_rd_last[p]),
      .done     (pc_done[p]),
      .checks   (c[p]),
      .failures (f[p]),
      .msgs_in  (m[p]),
      .words_in (w[p]),
      .vectors_done (vd[p])
    );
  end

  assign done = pc_done[0];
  assign vectors_done = vd[0];

  always_comb begin
    checks = 0; failures = 0; msgs = 0; words = 0;
    for (int p = 0; p < N_PC; p++) begin
      checks += c[p]; failures += f[p]; msgs += m[p]; words += w[p];
    end
  end
endmodule
