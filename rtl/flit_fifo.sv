// flit_fifo: the flit buffer on every network link.
//
// Each switch input and each network interface receive side holds one of
// these. It is a synchronous first-in first-out buffer of DEPTH words of
// WIDTH bits, kept in a register array with separate read and write pointers
// and an occupancy counter. Write side: wr_valid/wr_ready, with wr_ready low
// while the buffer is full, which is the link-level flow control. Read side:
// rd_valid/rd_ready, with rd_data showing the oldest word while rd_valid is
// high (first-word fall-through). A word written in cycle t can be read in
// cycle t+1; a simultaneous read and write of a full or empty buffer is
// handled. `full` is also brought out so that the owner can report an
// overloaded buffer. The depth of 64 is the buffer depth of the source
// design; the handshake and the fall-through behaviour are this design's own.
module flit_fifo #(
  parameter int unsigned WIDTH = 66,   // link width 64 plus head/tail bits
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign wr_ready = !full;
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= ($clog2(DEPTH+1))'(DEPTH));
endmodule
