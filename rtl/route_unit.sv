// route_unit: the routing table of one switch.
//
// The table is indexed by source PC (row) and destination PC (column) and
// holds the number of the output port the switch forwards the packet to,
// as the routing table of the original transaction-level model does. Here the table is not read
// from a file: it is filled at elaboration time with dimension-ordered XY
// routing (transim_pkg::xy_route), which is deadlock-free on a mesh and is
// this design's reading of the "deterministic route scheme". The source
// column is kept so that a table computed another way (for instance a
// source-dependent route) can be dropped in; XY routing ignores it.
// Interface: src and dst addresses in, out_port out. Purely combinational:
// the lookup completes in the cycle the header flit is presented.
module route_unit
  import transim_pkg::*;
#(
  parameter int unsigned SW_ID = 0   // which switch (0..15) this table serves
) (
  input  logic [ADDR_W-1:0] src,
  input  logic [ADDR_W-1:0] dst,
  output logic [PORT_W-1:0] out_port,
  output logic              dst_ok     // dst names an existing PC
);
  // Flat table: entry s*N_PC + d is row s (source), column d (destination).
  typedef logic [PORT_W-1:0] table_t [N_PC*N_PC];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned s = 0; s < N_PC; s++)
      for (int unsigned d = 0; d < N_PC; d++)
        t[s*N_PC + d] = xy_route(SW_ID, d);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    dst_ok   = (int'(dst) < N_PC) && (int'(src) < N_PC);
    out_port = dst_ok ? TABLE[int'(src)*N_PC + int'(dst)] : PORT_LOCAL;
  end
endmodule
