// tb_wireless_interface -- one WI (address 3) with the testbench playing the
// router, the token ring and the other WIs on the shared channel.
// Checks: a wireless unicast from the router goes on air only after the
// token, with the transmit chain powered WAKE_CYC cycles before the
// carrier, as PRE_CYC preamble cycles plus the flits, and the token is
// returned with done; a frame for this WI is received, its header marked
// past the wireless hop and injected into the router; a frame for another
// WI is dropped after its header and the receive chain sleeps again; a
// received broadcast is injected as this WI's distribution packet; a
// broadcast sent by this WI is also looped back into its own router; the
// power figure follows the power state.
module tb_wireless_interface;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int L = 4, WAKE = 4, PRE = WAKE + 2, SYMS = 32 / L, ID = 3;
  logic rt_in_valid, rt_in_credit, rt_out_valid, rt_out_credit, tok_req, tok_grant, tok_done;
  flit_t rt_in_flit, rt_out_flit;
  logic air_carrier_in, air_carrier_out, asleep, rx_reject;
  logic [L-1:0] air_sym_in, air_sym_out;
  logic [3:0] pgs;
  logic [15:0] power_uw;
  wireless_interface #(.MY_ID(ID), .LANE_W(L), .PKT_FLITS(8), .WAKE_CYC(WAKE), .ROUTER_BUF(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic flit_t hd(int ft, int mode, int wi, int leg, int arg);
    flit_t h = '0;
    h[31:30] = 2'(ft); h[29:28] = 2'(mode); h[27:25] = 3'd5; h[24:22] = 3'd6;
    h[21:19] = 3'd1; h[18:16] = 3'd2; h[15:12] = 4'(wi); h[11] = 1'(leg); h[7:0] = 8'(arg);
    return h;
  endfunction

  // router side: collect injected flits, return credits at once
  flit_t inj [$];
  always @(posedge clk) begin
    rt_out_credit <= rst_n && rt_out_valid;
    if (rst_n && rt_out_valid) inj.push_back(rt_out_flit);
  end
  int rejects = 0;
  always @(posedge clk) if (rst_n && rx_reject) rejects++;

  // air monitor: decode what the WI transmits
  flit_t air_got [$];
  int on_cyc = 0;
  flit_t acc;
  int si = 0;
  always @(posedge clk) if (rst_n) begin
    if (air_carrier_out) begin
      if (on_cyc >= PRE) begin
        acc = {air_sym_out, acc[31:L]};
        si++;
        if (si == SYMS) begin air_got.push_back(acc); si = 0; end
      end
      on_cyc++;
    end else begin
      on_cyc = 0; si = 0;
    end
  end

  task automatic send_air(flit_t f [$]);
    air_carrier_in = 1;
    repeat (PRE) @(negedge clk);
    foreach (f[i])
      for (int s = 0; s < SYMS; s++) begin
        air_sym_in = f[i][s*L +: L];
        @(negedge clk);
      end
    air_carrier_in = 0; air_sym_in = '0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    automatic flit_t pkt [$];
    rt_in_valid = 0; rt_in_flit = '0; tok_grant = 0; air_carrier_in = 0; air_sym_in = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(asleep && pgs == 4'b0000 && power_uw == 16'd6300, "asleep at rest (6.30 mW)");

    // ---- 1. transmit a wireless unicast ----
    pkt = '{hd(1, 1, 6, 0, 1), {FT_BODY, 30'h111}, {FT_BODY, 30'h222}, {FT_TAIL, 30'h333}};
    foreach (pkt[i]) begin rt_in_valid = 1; rt_in_flit = pkt[i]; @(negedge clk); end
    rt_in_valid = 0;
    repeat (2) @(negedge clk);
    check(tok_req && !air_carrier_out && asleep, "requests the token, still asleep");
    repeat (5) @(negedge clk);
    tok_grant = 1;
    begin
      automatic int t = 0;
      @(negedge clk);
      check(pgs[3] && pgs[2] && !pgs[1] && power_uw == 16'd19300, "PA and up-mixer on with the token");
      while (!air_carrier_out && t < 50) begin @(negedge clk); t++; end
      check(t == WAKE + 1, $sformatf("carrier %0d cycles after power-up, expected %0d", t + 1, WAKE + 2));
      t = 0;
      while (!tok_done && t < 200) begin @(negedge clk); t++; end
      check(t == PRE + 4 * SYMS - 1, $sformatf("frame length %0d", t + 1));
    end
    @(negedge clk); tok_grant = 0;
    repeat (2) @(negedge clk);
    check(air_got.size() == 4 && air_got[0] == pkt[0] && air_got[3] == pkt[3], "frame content on air");
    check(asleep && !air_carrier_out && inj.size() == 0, "asleep after sending, no loop-back of a unicast");

    // ---- 2. receive a frame for this WI ----
    send_air('{hd(1, 1, ID, 0, 2), {FT_BODY, 30'h444}, {FT_TAIL, 30'h555}});
    repeat (5) @(negedge clk);
    check(inj.size() == 3 && inj[0] == hd(1, 1, ID, 1, 2) && inj[2] == {FT_TAIL, 30'h555},
          "unicast received, header marked past the wireless hop");
    check(asleep, "asleep after receiving");
    inj.delete();

    // ---- 3. a frame for another WI ----
    fork
      send_air('{hd(1, 1, 7, 0, 3), {FT_BODY, 30'h666}, {FT_BODY, 30'h777}, {FT_TAIL, 30'h888}});
      begin
        repeat (PRE + SYMS + 3) @(negedge clk);
        check(asleep && air_carrier_in, "receive chain off again during a foreign frame");
      end
    join
    repeat (5) @(negedge clk);
    check(inj.size() == 0 && rejects == 1, "foreign frame dropped");

    // ---- 4. receive a broadcast ----
    send_air('{hd(1, 2, 15, 0, 4), {FT_TAIL, 30'h999}});
    repeat (5) @(negedge clk);
    check(inj.size() == 2 && inj[0] == hd(1, 3, ID, 0, 4), "broadcast injected as this WI's distribution");
    inj.delete();

    // ---- 5. send a broadcast: on air and looped back ----
    air_got.delete();
    pkt = '{hd(1, 2, 15, 0, 5), {FT_BODY, 30'haaa}, {FT_TAIL, 30'hbbb}};
    foreach (pkt[i]) begin rt_in_valid = 1; rt_in_flit = pkt[i]; @(negedge clk); end
    rt_in_valid = 0;
    repeat (2) @(negedge clk);
    tok_grant = 1;
    while (!tok_done) @(negedge clk);
    @(negedge clk); tok_grant = 0;
    repeat (8) @(negedge clk);
    check(air_got.size() == 3 && air_got[0] == pkt[0], "broadcast on air unchanged");
    check(inj.size() == 3 && inj[0] == hd(1, 3, ID, 0, 5) && inj[1] == pkt[1] && inj[2] == pkt[2],
          "broadcast looped back into the own region");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
