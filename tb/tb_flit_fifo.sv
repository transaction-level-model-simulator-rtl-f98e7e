// tb_flit_fifo: self-checking test of the flit buffer at its full depth.
// A reference queue follows every accepted write and read. Phase 1 fills the
// buffer without reading and checks that it reports full (and refuses
// writes) after exactly DEPTH words; phase 2 drains it and checks order and
// the one-cycle write-to-read latency; phase 3 runs random traffic with
// simultaneous reads and writes and compares data and occupancy each cycle.
module tb_flit_fifo;
  localparam int unsigned WIDTH = 66;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid, wr_ready, rd_valid, rd_ready, full;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  flit_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [WIDTH-1:0] rnd_word();
    return {$urandom, $urandom, $urandom};
  endfunction

  // compare the DUT's visible state with the model, then clock one edge
  task automatic step();
    check(rd_valid == (model.size() != 0), "rd_valid vs model");
    check(int'(count) == model.size(), "count vs model");
    check(full == (model.size() == DEPTH), "full vs model");
    if (rd_valid && model.size() != 0) check(rd_data == model[0], "rd_data order");
    @(posedge clk);
    if (rd_valid && rd_ready) void'(model.pop_front());
    if (wr_valid && wr_ready) model.push_back(wr_data);
    #1;
  endtask

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!rd_valid && count == 0 && wr_ready, "empty after reset");
    // phase 1: fill
    for (int k = 0; k < DEPTH + 3; k++) begin
      wr_valid = 1; wr_data = rnd_word();
      if (k == 0) begin
        // a word written now is readable one cycle later
        step();
        check(rd_valid, "one-cycle write-to-read latency");
      end else step();
    end
    check(full && !wr_ready && model.size() == DEPTH, "full after DEPTH writes");
    wr_valid = 0;
    // phase 2: drain
    rd_ready = 1;
    while (model.size() != 0) step();
    step();
    check(!rd_valid, "empty after drain");
    // phase 3: random traffic
    for (int k = 0; k < 4000; k++) begin
      wr_valid = ($urandom % 100) < ((k / 500) % 2 ? 70 : 35);
      rd_ready = ($urandom % 100) < ((k / 500) % 2 ? 35 : 70);
      wr_data  = rnd_word();
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
