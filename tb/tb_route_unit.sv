// tb_route_unit -- checks the route of every mode at every tile against an
// independent reference: XY for unicast, South-Last towards the source's
// nearest WI, and the broadcast trees, for which it walks the masks from
// every WI and checks that each tile is reached exactly once and through
// legal turns.
module tb_route_unit;
  import winoc_pkg::*;
  localparam int RX [10] = '{1, 3, 6, 1, 7, 0, 4, 6, 2, 7};
  localparam int RY [10] = '{7, 6, 6, 4, 4, 2, 2, 2, 0, 0};

  flit_t  head;
  pmask_t mask [64];
  for (genvar t = 0; t < 64; t++) begin : g_r
    route_unit #(.X(t % 8), .Y(t / 8)) u (.head(head), .mask(mask[t]));
  end

  int checks = 0, failures = 0;
  function automatic int md(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction
  function automatic int near(int x, int y);
    int b = 0;
    for (int w = 1; w < 10; w++) if (md(x, y, RX[w], RY[w]) < md(x, y, RX[b], RY[b])) b = w;
    return b;
  endfunction
  function automatic flit_t mk(int mode, int sx, int sy, int dx, int dy, int wi, int leg);
    flit_t f;
    f = '0;
    f[31:30] = 2'b01; f[29:28] = 2'(mode);
    f[27:25] = 3'(dx); f[24:22] = 3'(dy); f[21:19] = 3'(sx); f[18:16] = 3'(sy);
    f[15:12] = 4'(wi); f[11] = 1'(leg);
    return f;
  endfunction

  initial begin
    // unicast XY: follow the masks from every source to every destination
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++) begin
        automatic int cx = s % 8, cy = s / 8, steps = 0;
        automatic bit ok = 1, turned_y = 0;
        head = mk(0, s % 8, s / 8, d % 8, d / 8, 0, 0);
        #1;
        while (steps < 20) begin
          automatic pmask_t m = mask[cy * 8 + cx];
          if (m == 6'b000001) break;
          if (m == 6'b000100 || m == 6'b010000) begin if (turned_y) ok = 0; cx += (m == 6'b000100) ? 1 : -1; end
          else if (m == 6'b000010) begin turned_y = 1; cy++; end
          else if (m == 6'b001000) begin turned_y = 1; cy--; end
          else begin ok = 0; break; end
          steps++;
        end
        checks++;
        if (!ok || cx != d % 8 || cy != d / 8 || steps != md(s % 8, s / 8, d % 8, d / 8)) begin
          failures++; $display("FAIL XY %0d->%0d mask %b head %h", s, d, mask[s], head);
        end
      end
    // South-Last to nearest WI for broadcast and wireless unicast leg 0
    for (int mode = 1; mode <= 2; mode++)
      for (int s = 0; s < 64; s++) begin
        automatic int w = near(s % 8, s / 8), cx = s % 8, cy = s / 8, steps = 0;
        automatic bit ok = 1, went_south = 0, moved_x = 0;
        head = mk(mode, s % 8, s / 8, 7 - s % 8, 7 - s / 8, 3, 0);
        #1;
        while (steps < 20) begin
          automatic pmask_t m = mask[cy * 8 + cx];
          if (m == 6'b100000) break;
          if (went_south && m != 6'b001000) ok = 0;
          if (m == 6'b000100) begin moved_x = 1; cx++; end
          else if (m == 6'b010000) begin moved_x = 1; cx--; end
          else if (m == 6'b000010) begin if (moved_x) ok = 0; cy++; end
          else if (m == 6'b001000) begin went_south = 1; cy--; end
          else begin ok = 0; break; end
          steps++;
        end
        checks++;
        if (!ok || cx != RX[w] || cy != RY[w] || steps != md(s % 8, s / 8, RX[w], RY[w])) begin
          failures++; $display("FAIL south-last mode %0d from %0d", mode, s);
        end
      end
    // wireless unicast after the hop: XY from the WI
    head = mk(1, 0, 0, 5, 5, 2, 1);
    #1;
    checks++;
    if (mask[6 * 8 + 6] != 6'b000010 >> 0 && mask[6 * 8 + 6] != 6'b010000) begin
      failures++; $display("FAIL leg-1 XY");
    end
    checks++;
    if (mask[6 * 8 + 6] != 6'b010000) begin failures++; $display("FAIL leg-1 XY W first"); end
    // distribution trees: breadth-first walk from every WI
    for (int w = 0; w < 10; w++) begin
      automatic int got [64];
      automatic int q [$];
      automatic bit ok = 1;
      head = mk(3, 0, 0, 0, 0, w, 0);
      #1;
      foreach (got[i]) got[i] = 0;
      q.push_back(RY[w] * 8 + RX[w]);
      while (q.size() > 0) begin
        automatic int t = q.pop_front();
        automatic pmask_t m = mask[t];
        if (m[0]) got[t]++;
        if (m[5]) ok = 0;
        if (m[1]) q.push_back(t + 8);
        if (m[3]) q.push_back(t - 8);
        if (m[2]) q.push_back(t + 1);
        if (m[4]) q.push_back(t - 1);
        if (q.size() > 64) begin ok = 0; break; end
      end
      for (int t = 0; t < 64; t++) begin
        checks++;
        if (got[t] != ((near(t % 8, t / 8) == w) ? 1 : 0)) begin
          failures++; $display("FAIL tree of WI %0d gives tile %0d %0d copies", w, t, got[t]);
        end
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL tree of WI %0d malformed", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
