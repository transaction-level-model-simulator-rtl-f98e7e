// noc_switch: one wormhole switch (router) of the mesh.
//
// The switch is built from the five functions of the original transaction-level model's switch
// model, each a separate piece of logic here:
//  * switching - every input port has a flit_fifo input buffer (BUF_DEPTH
//    flits). A flit is moved from the buffer into the input's holding
//    register when no earlier flit remains there (or it leaves this cycle)
//    and the buffer is not empty.
//  * route - when the flit in a holding register is a packet header, the
//    input's route_unit looks up the output port from the source and
//    destination addresses in the header.
//  * priority control - each output port has a prio_arbiter that picks one
//    of the inputs whose header asks for it, with a random priority order.
//  * crossbar - the winner owns the output until its tail flit has passed
//    (wormhole switching); the output multiplexer shows that input's holding
//    register.
//  * flow control - a header that lost arbitration, or whose output is owned
//    by another packet, simply stays in its holding register; a flit is only
//    sent when the next buffer has room (out_ready), and a full input buffer
//    drops in_ready so that the upstream switch waits in turn.
// Interface: per port p (0 local, 1 north, 2 east, 3 south, 4 west) an input
// link in_valid/in_ready/in_flit and an output link out_valid/out_ready/
// out_flit; a flit is {head, tail, data[FLIT_W-1:0]} and moves when valid and
// ready are both high at a rising clock edge. Status outputs: overload (an
// input buffer is full), contention (a header waits for its output) and
// blocked (an output holds a flit the next buffer cannot take).
// Timing: a header written into an empty input buffer in cycle t is in the
// holding register at t+1, wins its idle output at the end of t+1 and leaves
// in t+2; payload flits then follow one per cycle. The function split and the
// buffer depth follow the original transaction-level model; the one-cycle allocation, the
// holding-register pipeline and the wormhole locking are this design's.
module noc_switch
  import transim_pkg::*;
#(
  parameter int unsigned SW_ID     = 0,
  parameter int unsigned FLIT_W    = DEF_FLIT_W,
  parameter int unsigned BUF_DEPTH = DEF_BUF_DEPTH,
  parameter logic [15:0] SEED      = 16'h1D0F
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_PORT-1:0]   in_valid,
  output logic [N_PORT-1:0]   in_ready,
  input  logic [FLIT_W+1:0]   in_flit  [N_PORT],
  output logic [N_PORT-1:0]   out_valid,
  input  logic [N_PORT-1:0]   out_ready,
  output logic [FLIT_W+1:0]   out_flit [N_PORT],
  output logic [N_PORT-1:0]   overload,
  output logic                contention,
  output logic                blocked
);
  localparam int unsigned FW  = FLIT_W + 2;
  localparam int unsigned IDX = $clog2(N_PORT);

  // switching: input buffers and holding registers
  logic [N_PORT-1:0] f_valid, f_pop;
  logic [FW-1:0]     f_data [N_PORT];
  logic [FW-1:0]     hold   [N_PORT];
  logic [N_PORT-1:0] hold_v, pop;

  // route
  logic [PORT_W-1:0] rport [N_PORT];

  // priority control and crossbar state
  logic [N_PORT-1:0] req   [N_PORT];   // req[o][i]
  logic [N_PORT-1:0] gnt   [N_PORT];   // gnt[o][i]
  logic [N_PORT-1:0] locked;
  logic [IDX-1:0]    owner [N_PORT];
  logic [N_PORT-1:0] send;
  logic [N_PORT-1:0] alloc;            // input owns an output or wins one now

  for (genvar i = 0; i < N_PORT; i++) begin : g_in
    logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;

    flit_fifo #(.WIDTH(FW), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_valid (in_valid[i]),
      .wr_ready (in_ready[i]),
      .wr_data  (in_flit[i]),
      .rd_valid (f_valid[i]),
      .rd_ready (f_pop[i]),
      .rd_data  (f_data[i]),
      .full     (overload[i]),
      .count    (unused_count)
    );

    assign f_pop[i] = f_valid[i] && (!hold_v[i] || pop[i]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold_v[i] <= 1'b0;
        hold[i]   <= '0;
      end else if (f_pop[i]) begin
        hold_v[i] <= 1'b1;
        hold[i]   <= f_data[i];
      end else if (pop[i]) begin
        hold_v[i] <= 1'b0;
      end
    end

    logic dst_ok_unused;
    route_unit #(.SW_ID(SW_ID)) u_route (
      .src      (hold[i][HDR_SRC_LSB +: ADDR_W]),
      .dst      (hold[i][HDR_DST_LSB +: ADDR_W]),
      .out_port (rport[i]),
      .dst_ok   (dst_ok_unused)
    );
  end

  // requests: a header in a holding register asks for its routed output
  always_comb begin
    for (int o = 0; o < N_PORT; o++)
      for (int i = 0; i < N_PORT; i++)
        req[o][i] = hold_v[i] && hold[i][FW-1] && (int'(rport[i]) == o)
                    && !locked[o];
  end

  for (genvar o = 0; o < N_PORT; o++) begin : g_out
    logic [IDX-1:0] unused_start;
    prio_arbiter #(.N(N_PORT), .SEED(SEED ^ 16'(o * 16'h3B5 + SW_ID * 16'h71))) u_arb (
      .clk, .rst_n,
      .req   (req[o]),
      .grant (gnt[o]),
      .start (unused_start)
    );

    // crossbar
    assign out_valid[o] = locked[o] && hold_v[owner[o]];
    assign out_flit[o]  = hold[owner[o]];
    assign send[o]      = out_valid[o] && out_ready[o];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end else if (!locked[o]) begin
        if (gnt[o] != '0) begin
          locked[o] <= 1'b1;
          for (int i = 0; i < N_PORT; i++)
            if (gnt[o][i]) owner[o] <= IDX'(i);
        end
      end else if (send[o] && out_flit[o][FW-2]) begin
        locked[o] <= 1'b0;   // tail flit has left: release the output
      end
    end
  end

  // flow control: which holding registers empty this cycle, who is waiting
  always_comb begin
    pop   = '0;
    alloc = '0;
    for (int o = 0; o < N_PORT; o++) begin
      for (int i = 0; i < N_PORT; i++) begin
        if (send[o] && int'(owner[o]) == i) pop[i] = 1'b1;
        if ((locked[o] && int'(owner[o]) == i) || gnt[o][i]) alloc[i] = 1'b1;
      end
    end
    contention = 1'b0;
    for (int i = 0; i < N_PORT; i++)
      if (hold_v[i] && hold[i][FW-1] && !alloc[i]) contention = 1'b1;
    blocked = |(out_valid & ~out_ready);
  end
endmodule
