// tb_route_unit: checks the routing tables of all 16 switches.
// The expected port is computed here from the tile placement drawn in the
// reference layout (independent of the package table) and the XY rule. Beyond
// the per-entry comparison, every source/destination pair is routed hop by
// hop through the 16 tables: the walk must reach the destination's switch
// and leave through its local port after exactly the Manhattan distance.
module tb_route_unit
  import transim_pkg::*;
;
  int checks = 0, failures = 0;

  // tile placement: PC -> switch number in the reference layout (1-based)
  int fig_sw [14] = '{13, 9, 6, 7, 2, 4, 14, 5, 1, 10, 11, 3, 12, 8};

  logic [ADDR_W-1:0] src, dst;
  logic [PORT_W-1:0] port [16];
  logic              ok   [16];

  for (genvar s = 0; s < 16; s++) begin : g_rt
    route_unit #(.SW_ID(s)) u_rt (.src, .dst, .out_port(port[s]), .dst_ok(ok[s]));
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int expect_port(int sw, int d);
    int x = sw % 4, y = sw / 4, tx = (fig_sw[d] - 1) % 4, ty = (fig_sw[d] - 1) / 4;
    if (tx > x) return 2;
    if (tx < x) return 4;
    if (ty > y) return 1;
    if (ty < y) return 3;
    return 0;
  endfunction

  initial begin
    for (int s = 0; s < 14; s++) begin
      for (int d = 0; d < 14; d++) begin
        int cur, hops, sx, sy, tx, ty;
        src = ADDR_W'(s); dst = ADDR_W'(d);
        #1;
        for (int w = 0; w < 16; w++) begin
          check(ok[w], "dst_ok");
          check(int'(port[w]) == expect_port(w, d),
                $sformatf("switch %0d src %0d dst %0d port %0d", w, s, d, port[w]));
        end
        // walk the route
        cur = fig_sw[s] - 1;
        hops = 0;
        while (port[cur] != 0 && hops < 10) begin
          case (int'(port[cur]))
            1: cur += 4;
            2: cur += 1;
            3: cur -= 4;
            4: cur -= 1;
            default: ;
          endcase
          hops++;
        end
        sx = (fig_sw[s] - 1) % 4; sy = (fig_sw[s] - 1) / 4;
        tx = (fig_sw[d] - 1) % 4; ty = (fig_sw[d] - 1) / 4;
        check(cur == fig_sw[d] - 1, "walk reaches destination switch");
        check(hops == (sx > tx ? sx - tx : tx - sx) + (sy > ty ? sy - ty : ty - sy),
              "walk length equals Manhattan distance");
      end
    end
    // out-of-range destination
    src = 0; dst = 4'd15; #1;
    check(!ok[0] && port[0] == 0, "out-of-range destination flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
