// lsd_pc_model: behavioural model of one processing core (PC) running its
// share of the List Sphere Decoder in the balanced-load mapping, for the
// end-to-end tests. Not synthesizable; the PCs are not part of the network.
//
// Like a processing thread it reads a message, waits a fixed number of
// processing cycles and then writes its results. Three roles:
//  ROLE_IOC  - on `start` sends IOC_TO_A bits to each A core for each of the
//              NVEC vectors, then collects A_TO_IOC bits from each A core per
//              vector; vectors_done counts finished vectors, `done` the last.
//  ROLE_A    - (SU, MCU1, MEU, LU) reads the IOC message, processes C_A1
//              cycles, sends A_TO_MCU2 bits to every MCU2 core, collects
//              MCU2_TO_A bits from every MCU2 core, processes C_A2 cycles and
//              returns A_TO_IOC bits to the IOC; then the next vector.
//  ROLE_MCU2 - reads one request at a time (it does not read while it
//              computes, so the network has to hold the others), processes
//              C_MCU2 cycles and answers the requesting A core.
// IOC and A cores read in a separate process that is always ready, so a
// core that is still writing can always drain its input. Message sizes are
// in bits and rounded up to whole flits. Each payload word carries
// (source, destination, word index), and every received word, length and
// first/last mark is checked.
module lsd_pc_model
  import transim_pkg::*;
#(
  parameter int unsigned ROLE      = 0,    // 0 IOC, 1 A, 2 MCU2
  parameter int unsigned PC_ID     = 0,
  parameter int unsigned FLIT_W    = 64,
  parameter int unsigned N_A       = 5,
  parameter int unsigned FIRST_A   = 1,
  parameter int unsigned N_MCU2    = 8,
  parameter int unsigned FIRST_MCU2 = 6,
  parameter int unsigned IOC_TO_A  = 384,
  parameter int unsigned A_TO_MCU2 = 4480,
  parameter int unsigned MCU2_TO_A = 12480,
  parameter int unsigned A_TO_IOC  = 8,
  parameter int unsigned C_IOC     = 5,
  parameter int unsigned C_A1      = 135,
  parameter int unsigned C_A2      = 482,
  parameter int unsigned C_MCU2    = 960,
  parameter int unsigned NVEC      = 1     // vectors decoded back to back
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_dst,
  output logic [LEN_W-1:0]  wr_len,
  output logic [FLIT_W-1:0] wr_data,
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [ADDR_W-1:0] rd_src,
  input  logic [LEN_W-1:0]  rd_len,
  input  logic [FLIT_W-1:0] rd_data,
  input  logic              rd_first,
  input  logic              rd_last,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                msgs_in,
  output int                words_in,
  output int                vectors_done
);
  localparam int unsigned ROLE_IOC = 0, ROLE_A = 1, ROLE_MCU2 = 2;

  int from_ioc = 0, from_mcu2 = 0, from_a = 0;

  function automatic int flits(int bits);
    return (bits + FLIT_W - 1) / FLIT_W;
  endfunction

  function automatic logic [FLIT_W-1:0] pat(int s, int d, int k);
    logic [63:0] w;
    w = {8'(s), 8'(d), 16'(k), 8'(s) ^ 8'hA5, 8'(d) ^ 8'h5A, 16'(k) ^ 16'hC3C3};
    return FLIT_W'(w);
  endfunction

  function automatic int expected_bits(int s);
    if (ROLE == ROLE_IOC) return A_TO_IOC;
    if (ROLE == ROLE_MCU2) return A_TO_MCU2;
    return (s == 0) ? IOC_TO_A : MCU2_TO_A;
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL PC%0d: %s at %0t", PC_ID + 1, what, $time);
    end
  endtask

  task automatic send_msg(input int dst, input int bits);
    int len = flits(bits);
    int k = 0;
    @(negedge clk);
    wr_valid = 1'b1;
    wr_dst   = ADDR_W'(dst);
    wr_len   = LEN_W'(len);
    wr_data  = pat(PC_ID, dst, 0);
    while (k < len) begin
      @(posedge clk);
      if (wr_ready) begin
        k++;
        @(negedge clk);
        wr_data = pat(PC_ID, dst, k);
        if (k == len) wr_valid = 1'b0;
      end
    end
  endtask

  // read one message; returns its source
  task automatic recv_msg(output int src);
    int k = 0;
    bit last = 0;
    @(negedge clk);
    rd_ready = 1'b1;
    while (!last) begin
      @(posedge clk);
      if (rd_valid) begin
        src = int'(rd_src);
        check(rd_first == (k == 0), "first mark");
        check(rd_data == pat(int'(rd_src), PC_ID, k), "payload word");
        check(int'(rd_len) == flits(expected_bits(int'(rd_src))), "message length");
        last = rd_last;
        if (rd_last) check(k + 1 == int'(rd_len), "tail closes the message");
        k++;
        words_in++;
      end
    end
    msgs_in++;
    @(negedge clk);
    rd_ready = 1'b0;
  endtask

  initial begin
    wr_valid = 0; wr_dst = '0; wr_len = '0; wr_data = '0; rd_ready = 0;
    done = 0; checks = 0; failures = 0; msgs_in = 0; words_in = 0; vectors_done = 0;
  end

  // always-ready reader of the IOC and A cores
  if (ROLE != ROLE_MCU2) begin : g_reader
    initial begin
      int s;
      wait (rst_n);
      forever begin
        recv_msg(s);
        if (ROLE == ROLE_IOC) begin
          check(s >= FIRST_A && s < FIRST_A + N_A, "IOC hears only A cores");
          from_a++;
          if (from_a % N_A == 0) vectors_done++;
        end else if (s == 0) from_ioc++;
        else begin
          check(s >= FIRST_MCU2 && s < FIRST_MCU2 + N_MCU2, "A hears only IOC and MCU2");
          from_mcu2++;
        end
      end
    end
  end

  initial begin
    wait (rst_n);
    if (ROLE == ROLE_IOC) begin
      wait (start);
      repeat (C_IOC) @(posedge clk);
      for (int v = 0; v < NVEC; v++)
        for (int a = 0; a < N_A; a++) send_msg(FIRST_A + a, IOC_TO_A);
      wait (from_a == N_A * NVEC);
      done = 1'b1;
    end else if (ROLE == ROLE_A) begin
      for (int v = 0; v < NVEC; v++) begin
        wait (from_ioc > v);
        repeat (C_A1) @(posedge clk);
        for (int m = 0; m < N_MCU2; m++) send_msg(FIRST_MCU2 + m, A_TO_MCU2);
        wait (from_mcu2 == N_MCU2 * (v + 1));
        repeat (C_A2) @(posedge clk);
        send_msg(0, A_TO_IOC);
      end
      done = 1'b1;
    end else begin
      for (int r = 0; r < N_A * NVEC; r++) begin
        int s;
        recv_msg(s);
        check(s >= FIRST_A && s < FIRST_A + N_A, "MCU2 hears only A cores");
        repeat (C_MCU2) @(posedge clk);
        send_msg(s, MCU2_TO_A);
      end
      done = 1'b1;
    end
  end
endmodule
