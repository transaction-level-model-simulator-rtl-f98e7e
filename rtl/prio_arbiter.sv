// prio_arbiter: random priority control for one switch output.
//
// Several input ports may want the same output port in the same cycle. The
// original transaction-level model gives each input a priority with a "random" priority control
// scheme and lets the highest one through; how the random numbers are made
// is not given. Here a 16-bit maximal-length Fibonacci LFSR (taps 16,14,13,11)
// steps every clock cycle; its value modulo N names the input that has the
// highest priority in this cycle, and priority falls off in increasing port
// order from there (wrapping around). The grant is therefore the first
// requester found when scanning from that random start point.
// Interface: req (one bit per input) in, grant (one-hot, zero when no
// request) out, combinational within the cycle; SEED sets the LFSR's reset
// value so that the arbiters of a switch do not move in step.
module prio_arbiter #(
  parameter int unsigned N    = 5,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [$clog2(N)-1:0] start   // input with the top priority now
);
  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= (SEED == 16'h0) ? 16'h0001 : SEED;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  assign start = ($clog2(N))'(int'(lfsr) % N);

  always_comb begin
    logic [$clog2(N)-1:0] idx;
    logic                 found;
    grant = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = ($clog2(N))'((int'(start) + k) % N);
      if (!found && req[idx]) begin
        grant[idx] = 1'b1;
        found      = 1'b1;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_granted_requests: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~req) == '0);
endmodule
