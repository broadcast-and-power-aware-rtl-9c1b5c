// tb_noc_router -- hybrid router at (4,2), the root of WI 6's tree.
// Random unicast packets enter on all five wired ports towards random
// destinations; every output returns credits after a random delay, so
// buffers fill and senders stall. A broadcast from the local port must go to
// the WI port; a distribution packet from the WI port must be copied to the
// local port and to every neighbour inside WI 6's region. Checks: each
// packet leaves on exactly the expected ports, whole and in order, never
// interleaved with another on the same port; no port ever exceeds its
// credits; an unloaded head flit takes 4 cycles from input to output.
module tb_noc_router;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int NP = 6, BD = 4, X = 4, Y = 2;
  localparam int RX [10] = '{1, 3, 6, 1, 7, 0, 4, 6, 2, 7};
  localparam int RY [10] = '{7, 6, 6, 4, 4, 2, 2, 2, 0, 0};

  logic  in_valid [NP], in_credit [NP], out_valid [NP], out_credit [NP];
  flit_t in_flit [NP], out_flit [NP];
  noc_router #(.X(X), .Y(Y), .HAS_WI(1'b1), .BUF_DEPTH(BD), .WI_CREDITS(BD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic int md(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction
  function automatic int near(int x, int y);
    int b = 0;
    for (int w = 1; w < 10; w++) if (md(x, y, RX[w], RY[w]) < md(x, y, RX[b], RY[b])) b = w;
    return b;
  endfunction

  // expected packets: flits and output mask, by id
  flit_t exp_flits [256][$];
  int    exp_mask  [256];
  int    got_mask  [256];
  int    n_pkts = 0;

  // ---- drivers ----
  flit_t txq [NP][$];
  int    cred [NP];
  always @(posedge clk) if (rst_n) for (int i = 0; i < NP; i++) if (in_credit[i]) cred[i]++;
  always @(negedge clk) begin
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 0;
      if (rst_n && txq[i].size() > 0 && cred[i] > 0 && $urandom_range(0, 9) < 8) begin
        in_valid[i] = 1;
        in_flit[i]  = txq[i].pop_front();
        cred[i]--;
      end
    end
  end

  task automatic add_pkt(int port, int mode, int dx, int dy, int len, int emask, int wi = 0);
    automatic int id = n_pkts++;
    automatic flit_t h = '0;
    h[31:30] = (len == 1) ? FT_SINGLE : FT_HEAD;
    h[29:28] = 2'(mode); h[27:25] = 3'(dx); h[24:22] = 3'(dy);
    h[21:19] = 3'(X); h[18:16] = 3'(Y); h[15:12] = 4'(wi); h[7:0] = 8'(id);
    exp_flits[id].push_back(h);
    txq[port].push_back(h);
    for (int i = 1; i < len; i++) begin
      automatic flit_t b = {(i == len - 1) ? FT_TAIL : FT_BODY, 6'd0, 8'(id), 16'(i)};
      exp_flits[id].push_back(b);
      txq[port].push_back(b);
    end
    exp_mask[id] = emask;
    got_mask[id] = 0;
  endtask

  // ---- monitors ----
  int cur_id [NP];
  int cur_idx [NP];
  int outstanding [NP];
  int ret_q [NP][$];
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NP; o++) begin
      out_credit[o] <= 0;
      if (out_valid[o]) begin
        automatic flit_t f = out_flit[o];
        automatic int id;
        outstanding[o]++;
        check(outstanding[o] <= BD, $sformatf("port %0d over its credits", o));
        if (is_head(f)) begin
          id = int'(f[7:0]);
          check(cur_id[o] < 0, $sformatf("port %0d: packet %0d interleaved", o, id));
          cur_id[o] = id; cur_idx[o] = 0;
          got_mask[id] |= (1 << o);
        end
        id = cur_id[o];
        if (id >= 0) begin
          check(cur_idx[o] < exp_flits[id].size() && f == exp_flits[id][cur_idx[o]],
                $sformatf("port %0d packet %0d flit %0d", o, id, cur_idx[o]));
          cur_idx[o]++;
        end
        if (is_last(f)) cur_id[o] = -1;
        ret_q[o].push_back(int'($urandom_range(0, 5)));
      end
      // return credits after a random delay
      for (int k = 0; k < ret_q[o].size(); k++) ret_q[o][k]--;
      if (ret_q[o].size() > 0 && ret_q[o][0] <= 0) begin
        void'(ret_q[o].pop_front());
        out_credit[o] <= 1;
        outstanding[o]--;
      end
    end
  end

  function automatic int xy_port(int dx, int dy);
    if (dx > X) return P_E;
    if (dx < X) return P_W;
    if (dy > Y) return P_N;
    if (dy < Y) return P_S;
    return P_L;
  endfunction

  initial begin
    #400000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; cred[i] = BD; cur_id[i] = -1; cur_idx[i] = 0;
      outstanding[i] = 0; out_credit[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // unloaded latency of a single-flit packet from W to E
    @(negedge clk);
    begin
      automatic int t0;
      add_pkt(P_W, 0, 7, 2, 1, 1 << P_E);
      @(posedge clk);  // the flit is sampled here
      t0 = 0;
      while (!out_valid[P_E] && t0 < 20) begin @(posedge clk); t0++; end
      check(t0 == 4, $sformatf("hop latency %0d cycles, expected 4", t0));
    end
    // random unicast traffic from the five wired ports
    for (int k = 0; k < 120; k++) begin
      automatic int p = int'($urandom_range(0, 4));
      automatic int dx = int'($urandom_range(0, 7)), dy = int'($urandom_range(0, 7));
      if (p == P_E && dx > X) dx = X;      // no U-turns back where it came from
      if (p == P_W && dx < X) dx = X;
      if (p == P_N && dx == X && dy > Y) dy = Y;
      if (p == P_S && dx == X && dy < Y) dy = Y;
      add_pkt(p, 0, dx, dy, int'($urandom_range(1, 9)), 1 << xy_port(dx, dy));
    end
    // broadcast from the local core: this router is its nearest WI
    add_pkt(P_L, 2, 0, 0, 5, 1 << P_WI, 15);
    // distribution of WI 6 entering from the WI port
    begin
      automatic int m = 1 << P_L;
      if (near(X, Y + 1) == 6) m |= 1 << P_N;
      if (near(X, Y - 1) == 6) m |= 1 << P_S;
      if (near(X + 1, Y) == 6) m |= 1 << P_E;
      if (near(X - 1, Y) == 6) m |= 1 << P_W;
      check(m != (1 << P_L), "tree root has children");
      add_pkt(P_WI, 3, 0, 0, 7, m, 6);
      add_pkt(P_WI, 3, 0, 0, 3, m, 6);
    end
    repeat (6000) @(negedge clk);
    for (int id = 0; id < n_pkts; id++)
      check(got_mask[id] == exp_mask[id], $sformatf("packet %0d left on %b, expected %b", id, got_mask[id], exp_mask[id]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
