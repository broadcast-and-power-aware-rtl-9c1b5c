// tb_winoc_top -- end-to-end test of the wireless NoC at its default size
// (8x8 tiles, 10 WIs, 64-flit packets).
//
// Phase 1, unicast: several data packets, short ones on the wires and long
// ones that qualify for a wireless hop, two of them launched together from
// different WI regions so the token has to move between WIs. Each must
// arrive once, at the right tile, with the right source, tag and length,
// and the wireless flag the hop rule predicts.
// Phase 2, barriers: all 64 cores arrive at barrier 0 at random times; no
// core may be released before the last arrival; afterwards every core gets
// exactly one release. Then barriers 1 and 2 run at the same time.
// Mechanisms counted (each must happen): wireless unicast, broadcast frame
// on air, header rejected by a WI, WI wake-up from sleep, token handed to a
// different WI. Phase 3 also keeps two barriers in flight at once.
module tb_winoc_top;
  import winoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic        core_tx_valid [NUM_TILE];
  logic        core_tx_ready [NUM_TILE];
  logic [2:0]  core_tx_dst_x [NUM_TILE];
  logic [2:0]  core_tx_dst_y [NUM_TILE];
  logic [6:0]  core_tx_len   [NUM_TILE];
  logic [7:0]  core_tx_tag   [NUM_TILE];
  logic        core_rx_valid [NUM_TILE];
  logic [2:0]  core_rx_src_x [NUM_TILE];
  logic [2:0]  core_rx_src_y [NUM_TILE];
  logic [7:0]  core_rx_tag   [NUM_TILE];
  logic [6:0]  core_rx_len   [NUM_TILE];
  logic        core_rx_wireless [NUM_TILE];
  logic        core_bar_arrive  [NUM_TILE];
  logic [2:0]  core_bar_id      [NUM_TILE];
  logic        core_bar_release [NUM_TILE];
  logic [2:0]  core_bar_release_id [NUM_TILE];
  logic [3:0]  core_bar_waiting [NUM_TILE];
  logic [15:0] rx_errors [NUM_TILE];
  logic [3:0]  wi_pgs      [NUM_WI];
  logic        wi_asleep   [NUM_WI];
  logic [15:0] wi_power_uw [NUM_WI];
  logic        wi_rx_reject[NUM_WI];
  logic        air_busy;

  winoc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- independent reference for the wireless-hop rule -------
  localparam int RX [10] = '{1, 3, 6, 1, 7, 0, 4, 6, 2, 7};
  localparam int RY [10] = '{7, 6, 6, 4, 4, 2, 2, 2, 0, 0};
  function automatic int md(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction
  function automatic int near(int x, int y);
    int b = 0;
    for (int w = 1; w < 10; w++) if (md(x, y, RX[w], RY[w]) < md(x, y, RX[b], RY[b])) b = w;
    return b;
  endfunction
  function automatic bit expect_wireless(int sx, int sy, int dx, int dy);
    int ws = near(sx, sy), wd = near(dx, dy);
    return ws != wd && md(sx, sy, RX[ws], RY[ws]) + 1 + md(RX[wd], RY[wd], dx, dy) + 6 <= md(sx, sy, dx, dy);
  endfunction

  // ---------------- monitors ----------------
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int rx_count  [NUM_TILE];
  int rel_count [NUM_TILE][8];
  int rel_cycle [NUM_TILE];
  int n_wireless_rx = 0, n_bcast_frames = 0, n_reject = 0, n_wake = 0, n_token_moves = 0;
  int last_talker = -1;
  int n_frames = 0;
  logic air_q = 1'b0;
  logic asleep_q [NUM_WI];

  // expected data packet
  int exp_src_x [NUM_TILE], exp_src_y [NUM_TILE], exp_tag [NUM_TILE], exp_len [NUM_TILE];
  bit exp_wl [NUM_TILE];

  bit tx_accepted [NUM_TILE];

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NUM_TILE; t++) begin
      // a request is taken once: drop valid right after the handshake
      if (core_tx_valid[t] && core_tx_ready[t]) begin
        tx_accepted[t] = 1'b1;
        core_tx_valid[t] <= 1'b0;
      end
      if (core_rx_valid[t]) begin
        rx_count[t]++;
        check(int'(core_rx_src_x[t]) == exp_src_x[t] && int'(core_rx_src_y[t]) == exp_src_y[t],
              $sformatf("tile %0d data source", t));
        check(int'(core_rx_tag[t]) == exp_tag[t], $sformatf("tile %0d tag", t));
        check(int'(core_rx_len[t]) == exp_len[t], $sformatf("tile %0d length %0d", t, core_rx_len[t]));
        check(core_rx_wireless[t] == exp_wl[t], $sformatf("tile %0d wireless flag", t));
        if (core_rx_wireless[t]) n_wireless_rx++;
      end
      if (core_bar_release[t]) begin
        rel_count[t][core_bar_release_id[t]]++;
        rel_cycle[t] = cyc;
      end
    end
    for (int w = 0; w < NUM_WI; w++) begin
      if (wi_rx_reject[w]) n_reject++;
      if (asleep_q[w] && !wi_asleep[w]) n_wake++;
      asleep_q[w] = wi_asleep[w];
      if (dut.wi_car[w] && !air_q) begin
        if (last_talker >= 0 && last_talker != w) n_token_moves++;
        last_talker = w;
      end
    end
    if (air_busy && !air_q) n_frames++;
    air_q = air_busy;
  end

  // ---------------- stimulus helpers ----------------
  task automatic send(int s, int d, int len, int tag);
    exp_src_x[d] = s % 8;  exp_src_y[d] = s / 8;
    exp_tag[d] = tag;      exp_len[d] = len;
    exp_wl[d] = expect_wireless(s % 8, s / 8, d % 8, d / 8);
    core_tx_dst_x[s] = 3'(d % 8);
    core_tx_dst_y[s] = 3'(d / 8);
    core_tx_len[s]   = 7'(len);
    core_tx_tag[s]   = 8'(tag);
    tx_accepted[s]   = 1'b0;
    core_tx_valid[s] = 1'b1;
  endtask

  task automatic wait_sent(int s);
    do @(posedge clk); while (!tx_accepted[s]);
  endtask

  int all_arrived_cycle;
  bit early_release;

  // every core arrives once at each of nb barriers (b0, b0+1, ...), in a
  // random order per barrier; the barriers' arrivals are interleaved
  task automatic run_barriers(int nb, int b0);
    int order [4][NUM_TILE];
    for (int k = 0; k < nb; k++) begin
      for (int t = 0; t < NUM_TILE; t++) order[k][t] = t;
      for (int t = NUM_TILE - 1; t > 0; t--) begin
        int j = int'($urandom_range(0, t));
        int tmp = order[k][t]; order[k][t] = order[k][j]; order[k][j] = tmp;
      end
    end
    for (int t = 0; t < NUM_TILE; t++) begin
      for (int k = 0; k < nb; k++) begin
        @(posedge clk);
        #0;
        core_bar_arrive[order[k][t]] = 1'b1;
        core_bar_id[order[k][t]]     = 3'(b0 + k);
        @(posedge clk);
        #0 core_bar_arrive[order[k][t]] = 1'b0;
      end
      repeat ($urandom_range(0, 6)) @(posedge clk);
      if (t < NUM_TILE - 1)
        for (int u = 0; u < NUM_TILE; u++)
          for (int k = 0; k < nb; k++)
            if (rel_count[u][b0 + k] != 0) early_release = 1;
    end
    all_arrived_cycle = cyc;
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NUM_TILE; t++) begin
      core_tx_valid[t] = 0; core_tx_dst_x[t] = 0; core_tx_dst_y[t] = 0;
      core_tx_len[t] = 1; core_tx_tag[t] = 0; core_bar_arrive[t] = 0; core_bar_id[t] = 0;
      rx_count[t] = 0; rel_cycle[t] = 0; tx_accepted[t] = 0;
      exp_src_x[t] = -1; exp_src_y[t] = -1; exp_tag[t] = -1; exp_len[t] = -1; exp_wl[t] = 0;
      for (int b = 0; b < 8; b++) rel_count[t][b] = 0;
    end
    for (int w = 0; w < NUM_WI; w++) asleep_q[w] = 1'b1;
    repeat (5) @(posedge clk);
    #0 rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // ---- phase 1: unicast ----
    // all WIs asleep at rest
    for (int w = 0; w < NUM_WI; w++) check(wi_asleep[w] && wi_power_uw[w] == 16'd6300, "WI asleep after reset");
    #0 send(9, 10, 5, 'h11);          // one hop, wired
    wait_sent(9);
    #0 send(0, 63, 64, 'h22);         // corner to corner: wireless
    #0 send(7, 56, 64, 'h33);         // other diagonal: wireless, other WIs
    wait_sent(0);
    wait_sent(7);
    #0 send(20, 44, 1, 'h44);         // single-flit wired packet
    wait_sent(20);
    repeat (3000) @(posedge clk);
    check(rx_count[10] == 1 && rx_count[63] == 1 && rx_count[56] == 1 && rx_count[44] == 1,
          "each unicast delivered exactly once");
    check(exp_wl[63] && exp_wl[56] && !exp_wl[10], "reference predicts wireless for the long packets");

    // ---- phase 2: one barrier ----
    run_barriers(1, 0);
    repeat (20000) begin
      @(posedge clk);
    end
    check(!early_release, "no release before the last arrival");
    check(n_frames >= 3, "broadcast frame went on air");
    begin
      automatic int missing = 0, dup = 0, last = 0;
      for (int t = 0; t < NUM_TILE; t++) begin
        if (rel_count[t][0] == 0) missing++;
        if (rel_count[t][0] > 1) dup++;
        if (rel_cycle[t] > last) last = rel_cycle[t];
        check(core_bar_waiting[t][0] == 1'b0, $sformatf("tile %0d still waiting", t));
      end
      check(missing == 0 && dup == 0, $sformatf("barrier 0: %0d missing, %0d duplicate releases", missing, dup));
      $display("barrier 0: last arrival at %0d, last release at %0d (%0d cycles)",
               all_arrived_cycle, last, last - all_arrived_cycle);
    end

    // ---- phase 3: barriers 1 and 2 together (masters at tiles 36 and 28) ----
    run_barriers(2, 1);
    repeat (30000) @(posedge clk);
    begin
      automatic int bad = 0;
      for (int t = 0; t < NUM_TILE; t++) begin
        if (rel_count[t][1] != 1 || rel_count[t][2] != 1) bad++;
        check(core_bar_waiting[t] == 4'b0, "no core left waiting");
      end
      check(bad == 0, $sformatf("barriers 1,2: %0d tiles without exactly one release each", bad));
      check(!early_release, "no early release with two barriers in flight");
    end

    for (int t = 0; t < NUM_TILE; t++) check(rx_errors[t] == 0, $sformatf("tile %0d flit errors", t));
    for (int w = 0; w < NUM_WI; w++) check(wi_asleep[w], "WI back asleep at the end");

    $display("mechanisms: wireless_unicast=%0d frames=%0d reject=%0d wake=%0d token_moves=%0d",
             n_wireless_rx, n_frames, n_reject, n_wake, n_token_moves);
    check(n_frames >= 5, "two unicast and three broadcast frames on air");
    check(n_wireless_rx > 0, "wireless unicast happened");
    check(n_reject > 0, "a WI rejected a foreign header");
    check(n_wake > 0, "a WI woke from sleep");
    check(n_token_moves > 0, "the token moved between transmitting WIs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
