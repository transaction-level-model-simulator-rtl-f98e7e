// tb_prio_arbiter: checks the random priority control of one output.
// Each cycle a random request pattern is applied. The grant must be one-hot
// (or zero with no request), must go to a requester, and must go to the first
// requester at or after the reported top-priority input. The start point is
// checked to be a free-running 16-bit LFSR (taps 16,14,13,11) reduced modulo
// N, recomputed here from the seed. With all inputs requesting, every input
// must win between 10% and 30% of the time (fair random priority).
module tb_prio_arbiter;
  localparam int unsigned N = 5;
  localparam logic [15:0] SEED = 16'hACE1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] start;
  int checks = 0, failures = 0;
  int wins [N];
  logic [15:0] lfsr_ref;

  prio_arbiter #(.N(N), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_now();
    int exp_idx = -1;
    check(int'(start) == int'(lfsr_ref) % N, "start follows the LFSR");
    for (int k = 0; k < N; k++)
      if (exp_idx < 0 && req[(int'(start) + k) % N]) exp_idx = (int'(start) + k) % N;
    if (exp_idx < 0) check(grant == '0, "no grant without request");
    else check(grant == N'(1) << exp_idx, "grant to first requester from start");
  endtask

  initial begin
    req = '0;
    lfsr_ref = SEED;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      req = N'($urandom);
      #1 check_now();
      @(posedge clk);
      lfsr_ref = {lfsr_ref[14:0], lfsr_ref[15] ^ lfsr_ref[13] ^ lfsr_ref[12] ^ lfsr_ref[10]};
      #1;
    end
    req = '1;
    for (int c = 0; c < 5000; c++) begin
      #1 check_now();
      for (int k = 0; k < N; k++) if (grant[k]) wins[k]++;
      @(posedge clk);
      lfsr_ref = {lfsr_ref[14:0], lfsr_ref[15] ^ lfsr_ref[13] ^ lfsr_ref[12] ^ lfsr_ref[10]};
      #1;
    end
    for (int k = 0; k < N; k++)
      check(wins[k] > 500 && wins[k] < 1500, $sformatf("input %0d won %0d of 5000", k, wins[k]));
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
