// tb_nic -- network interface at tile (0,0) with small packets (PKT_FLITS 8,
// barrier messages of 2 flits, 3 participants; tile 0 masters barrier 0,
// tile 63 barrier 1). The router side is modelled by the testbench, which
// returns credits slowly so the NIC must stall.
// Checks: head and body flits of a short wired data packet and of a long one
// that the hop rule sends over the air; never more flits than credits; a
// received data packet is reported with source, tag and length; a corrupted
// body flit is counted; a barrier arrival becomes an ARRIVE packet to the
// master; as master, the third arrival produces a broadcast RELEASE; a
// received RELEASE pulses the core's release.
module tb_nic;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int BD = 4;
  logic rt_out_valid, rt_out_credit, rt_in_valid, rt_in_credit;
  flit_t rt_out_flit, rt_in_flit;
  logic core_tx_valid, core_tx_ready, core_rx_valid, core_rx_wireless;
  logic [2:0] core_tx_dst_x, core_tx_dst_y, core_rx_src_x, core_rx_src_y, core_bar_id, core_bar_release_id;
  logic [6:0] core_tx_len, core_rx_len;
  logic [7:0] core_tx_tag, core_rx_tag;
  logic core_bar_arrive, core_bar_release;
  logic [3:0] core_bar_waiting;
  logic [15:0] rx_errors;
  nic #(.X(0), .Y(0), .PKT_FLITS(8), .BAR_FLITS(2), .BUF_DEPTH(BD), .NUM_BAR(4), .NUM_PART(3),
        .MASTERS({6'd0, 6'd0, 6'd0, 6'd0, 6'd0, 6'd0, 6'd63, 6'd0})) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  // router model: collect flits, return credits one every 3 cycles
  flit_t got [$];
  int outstanding = 0, tick = 0;
  always @(posedge clk) if (rst_n) begin
    rt_out_credit <= 0;
    if (rt_out_valid) begin
      got.push_back(rt_out_flit);
      outstanding++;
      check(outstanding <= BD, "NIC sent without credit");
    end
    tick++;
    if (outstanding > 0 && tick % 3 == 0) begin
      rt_out_credit <= 1;
      outstanding--;
    end
  end
  int n_rel = 0;
  always @(posedge clk) if (rst_n && core_bar_release) n_rel++;

  task automatic wait_flits(int n);
    automatic int t = 0;
    while (got.size() < n && t < 500) begin @(negedge clk); t++; end
    check(got.size() == n, $sformatf("%0d flits sent, expected %0d", got.size(), n));
  endtask
  task automatic inject(flit_t f);
    @(negedge clk); rt_in_valid = 1; rt_in_flit = f;
    @(negedge clk); rt_in_valid = 0;
  endtask
  function automatic flit_t hd(int ft, int mode, int dx, int dy, int sx, int sy, int wi, int msg, int arg);
    flit_t h = '0;
    h[31:30] = 2'(ft); h[29:28] = 2'(mode); h[27:25] = 3'(dx); h[24:22] = 3'(dy);
    h[21:19] = 3'(sx); h[18:16] = 3'(sy); h[15:12] = 4'(wi); h[10:8] = 3'(msg); h[7:0] = 8'(arg);
    return h;
  endfunction

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    core_tx_valid = 0; core_tx_dst_x = 0; core_tx_dst_y = 0; core_tx_len = 1; core_tx_tag = 0;
    core_bar_arrive = 0; core_bar_id = 0; rt_in_valid = 0; rt_in_flit = '0; rt_out_credit = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // short data packet, wired
    core_tx_valid = 1; core_tx_dst_x = 1; core_tx_dst_y = 0; core_tx_len = 3; core_tx_tag = 8'h5A;
    @(negedge clk);
    core_tx_valid = 0;
    wait_flits(3);
    check(got[0] == hd(1, 0, 1, 0, 0, 0, 8, 0, 8'h5A), $sformatf("wired head %h", got[0]));
    check(got[1] == {FT_BODY, 6'd0, 8'h5A, 16'd1} && got[2] == {FT_TAIL, 6'd0, 8'h5A, 16'd2}, "body and tail flits");
    got.delete();
    // long packet to (7,7): nearest WI of (0,0) is WI 8 at (2,0), of (7,7) WI 2 at (6,6);
    // 2 + 1 + 2 wireless hops against 14 wired hops -> wireless
    core_tx_valid = 1; core_tx_dst_x = 7; core_tx_dst_y = 7; core_tx_len = 8; core_tx_tag = 8'h77;
    @(negedge clk); core_tx_valid = 0;
    wait_flits(8);
    check(got[0] == hd(1, 1, 7, 7, 0, 0, 2, 0, 8'h77), $sformatf("wireless head %h", got[0]));
    check(got[7][31:30] == FT_TAIL, "tail");
    got.delete();
    // receive a 4-flit data packet from (2,3)
    inject(hd(1, 0, 0, 0, 2, 3, 0, 0, 8'h31));
    for (int i = 1; i < 4; i++) inject({(i == 3) ? FT_TAIL : FT_BODY, 3'd3, 3'd2, 8'h31, 16'(i)});
    repeat (2) @(negedge clk);
    check(n_rx == 1, "data packet reported once");
    // receive a corrupted packet
    inject(hd(1, 3, 0, 0, 5, 5, 4, 0, 8'h32));
    inject({FT_TAIL, 3'd5, 3'd5, 8'h32, 16'd9});
    repeat (2) @(negedge clk);
    check(rx_errors == 16'd1, $sformatf("rx_errors %0d", rx_errors));
    // non-master arrival at barrier 1 (master tile 63)
    @(negedge clk); core_bar_arrive = 1; core_bar_id = 1;
    @(negedge clk); core_bar_arrive = 0;
    wait_flits(2);
    check(got[0] == hd(1, 1, 7, 7, 0, 0, 2, 1, 1) || got[0] == hd(1, 0, 7, 7, 0, 0, 2, 1, 1), $sformatf("arrive head %h", got[0]));
    check(core_bar_waiting[1], "core waits at barrier 1");
    got.delete();
    inject(hd(3, 3, 0, 0, 7, 7, 8, 2, 1));
    repeat (2) @(negedge clk);
    check(n_rel == 1 && !core_bar_waiting[1], "release of barrier 1 reported");
    // master of barrier 0: own arrival and two messages
    @(negedge clk); core_bar_arrive = 1; core_bar_id = 0;
    @(negedge clk); core_bar_arrive = 0;
    inject(hd(3, 0, 0, 0, 3, 0, 8, 1, 0));
    repeat (4) @(negedge clk);
    check(got.size() == 0, "no release before the last arrival");
    inject(hd(3, 0, 0, 0, 0, 4, 8, 1, 0));
    wait_flits(2);
    check(got[0] == hd(1, 2, 0, 0, 0, 0, 15, 2, 0), $sformatf("broadcast release head %h", got[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data packet report
  int n_rx = 0;
  always @(posedge clk) if (rst_n && core_rx_valid) begin
    n_rx++;
    if (n_rx == 1)
      check(core_rx_src_x == 2 && core_rx_src_y == 3 && core_rx_tag == 8'h31 && core_rx_len == 4 && !core_rx_wireless,
            "received packet report");
    else
      check(core_rx_src_x == 5 && core_rx_src_y == 5 && core_rx_tag == 8'h32 && core_rx_len == 2 && core_rx_wireless,
            "second packet report");
  end
endmodule
