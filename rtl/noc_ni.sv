// noc_ni: network interface between one processing core (PC) and its switch.
//
// Like the original transaction-level model's NI it runs two independent processes:
//  * write - the PC hands over a message for another PC: destination address,
//    length in flits and then the payload words, one per accepted beat
//    (wr_valid/wr_ready, with wr_dst and wr_len held steady for the whole
//    message). The NI first sends a header flit {dst, src = PC_ID, len} and
//    then one payload flit per word, the last one marked as tail.
//  * read - flits from the switch's local output land in a BUF_DEPTH-flit
//    receive buffer. The NI takes the header out of the stream, keeps its
//    source address and length, and hands the payload words to the PC
//    (rd_valid/rd_ready) with rd_src, rd_len, rd_first on the first word and
//    rd_last on the tail word.
// The original transaction-level model couples PC and NI through a blocking transport call; here
// that becomes the two valid/ready streams above, which is this design's own
// choice, as are the header layout (transim_pkg) and the rule that a message
// carries at least one payload word.
// Timing: the header leaves in the first cycle wr_valid is high and the
// switch can take it; payload words then pass at one per cycle. A flit that
// arrives from the switch in cycle t is visible to the read process at t+1.
module noc_ni
  import transim_pkg::*;
#(
  parameter int unsigned PC_ID     = 0,
  parameter int unsigned FLIT_W    = DEF_FLIT_W,
  parameter int unsigned BUF_DEPTH = DEF_BUF_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // PC -> NI: write transaction
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_dst,
  input  logic [LEN_W-1:0]  wr_len,
  input  logic [FLIT_W-1:0] wr_data,
  // NI -> PC: read transaction
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [ADDR_W-1:0] rd_src,
  output logic [LEN_W-1:0]  rd_len,
  output logic [FLIT_W-1:0] rd_data,
  output logic              rd_first,
  output logic              rd_last,
  // NI -> switch local input
  output logic              net_out_valid,
  input  logic              net_out_ready,
  output logic [FLIT_W+1:0] net_out_flit,
  // switch local output -> NI
  input  logic              net_in_valid,
  output logic              net_in_ready,
  input  logic [FLIT_W+1:0] net_in_flit,
  output logic              rx_overload
);
  localparam int unsigned FW = FLIT_W + 2;

  // the header fields must fit in one flit
  if (HDR_BITS > FLIT_W) begin : g_bad_width
    $error("noc_ni: FLIT_W is too narrow for the header");
  end

  // ---------------- write process ----------------
  typedef enum logic {W_HEAD, W_BODY} wstate_e;
  wstate_e          wstate;
  logic [LEN_W-1:0] wleft;           // payload flits still to send
  logic [FLIT_W-1:0] header;

  always_comb begin
    header = '0;
    header[HDR_DST_LSB +: ADDR_W] = wr_dst;
    header[HDR_SRC_LSB +: ADDR_W] = ADDR_W'(PC_ID);
    header[HDR_LEN_LSB +: LEN_W]  = wr_len;
    net_out_valid = wr_valid;     // a message is offered as soon as the PC has it
    if (wstate == W_HEAD) begin
      net_out_flit  = {1'b1, 1'b0, header};
      wr_ready      = 1'b0;
    end else begin
      net_out_flit  = {1'b0, (wleft == LEN_W'(1)), wr_data};
      wr_ready      = net_out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate <= W_HEAD;
      wleft  <= '0;
    end else if (net_out_valid && net_out_ready) begin
      if (wstate == W_HEAD) begin
        wstate <= W_BODY;
        wleft  <= wr_len;
      end else begin
        wleft <= wleft - 1'b1;
        if (wleft == LEN_W'(1)) wstate <= W_HEAD;
      end
    end
  end

  // ---------------- read process ----------------
  typedef enum logic {R_HEAD, R_BODY} rstate_e;
  rstate_e         rstate;
  logic            f_valid, f_pop;
  logic [FW-1:0]   f_data;
  logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;
  logic            first_q;

  flit_fifo #(.WIDTH(FW), .DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n,
    .wr_valid (net_in_valid),
    .wr_ready (net_in_ready),
    .wr_data  (net_in_flit),
    .rd_valid (f_valid),
    .rd_ready (f_pop),
    .rd_data  (f_data),
    .full     (rx_overload),
    .count    (unused_count)
  );

  assign rd_valid = (rstate == R_BODY) && f_valid;
  assign rd_data  = f_data[FLIT_W-1:0];
  assign rd_last  = f_data[FW-2];
  assign rd_first = first_q;
  assign f_pop    = (rstate == R_HEAD) ? f_valid : (f_valid && rd_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate  <= R_HEAD;
      rd_src  <= '0;
      rd_len  <= '0;
      first_q <= 1'b0;
    end else if (rstate == R_HEAD) begin
      if (f_valid) begin
        rstate  <= R_BODY;
        rd_src  <= f_data[HDR_SRC_LSB +: ADDR_W];
        rd_len  <= f_data[HDR_LEN_LSB +: LEN_W];
        first_q <= 1'b1;
      end
    end else if (f_valid && rd_ready) begin
      first_q <= 1'b0;
      if (f_data[FW-2]) rstate <= R_HEAD;
    end
  end

  // A message carries at least one payload word; headers reach only their
  // destination PC and always open a packet.
  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (wstate == W_HEAD && wr_valid) |-> wr_len != '0);
  a_header_first: assert property (@(posedge clk) disable iff (!rst_n)
    (rstate == R_HEAD && f_valid) |-> f_data[FW-1]);
  a_right_pc: assert property (@(posedge clk) disable iff (!rst_n)
    (rstate == R_HEAD && f_valid) |-> f_data[HDR_DST_LSB +: ADDR_W] == ADDR_W'(PC_ID));
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (wstate == W_BODY) |-> $stable(wr_dst) && $stable(wr_len));
endmodule
