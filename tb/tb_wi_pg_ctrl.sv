// tb_wi_pg_ctrl -- walks the controller through its cases: sleep at rest,
// wake on a rising carrier, accept and stay on to the tail, reject and go
// back to sleep at once, ignore a carrier that was already up, and a
// transmission with its WAKE_CYC settle time counted in cycles.
module tb_wi_pg_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int WAKE = 5;
  logic carrier_detect, hdr_valid, hdr_accept, hdr_last, rx_last, tx_ready, tx_grant, tx_done;
  logic tx_start, rx_hdr_phase, rx_data_phase, pgs_lna, pgs_rxmix, pgs_pa, pgs_txmix, asleep;
  wi_pg_ctrl #(.WAKE_CYC(WAKE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic step(int n = 1);
    repeat (n) @(negedge clk);
  endtask
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    {carrier_detect, hdr_valid, hdr_accept, hdr_last, rx_last, tx_ready, tx_grant, tx_done} = '0;
    step(3); rst_n = 1; step(2);
    check(asleep && !pgs_lna && !pgs_pa, "asleep after reset");
    // accepted frame
    carrier_detect = 1; step();
    check(pgs_lna && pgs_rxmix && !pgs_pa && rx_hdr_phase, "receive chain woken by carrier");
    step(3);
    hdr_valid = 1; hdr_accept = 1; step(); hdr_valid = 0;
    check(rx_data_phase && pgs_lna, "accepted: stays on");
    step(10);
    check(pgs_lna, "on during data");
    rx_last = 1; step(); rx_last = 0;
    check(asleep, "asleep after tail");
    carrier_detect = 0; step(2);
    // rejected frame
    carrier_detect = 1; step(2);
    hdr_valid = 1; hdr_accept = 0; step(); hdr_valid = 0;
    check(asleep && !pgs_lna, "rejected: receive chain off");
    step(5);
    check(asleep, "stays off while the foreign carrier lasts");
    carrier_detect = 0; step();
    check(asleep, "asleep after the foreign frame");
    // transmission
    tx_ready = 1; tx_grant = 1;
    step();
    check(pgs_pa && pgs_txmix && !pgs_lna, "transmit chain on with the token");
    begin
      int n = 0;
      while (!tx_start && n < 50) begin step(); n++; end
      check(n == WAKE, $sformatf("tx_start after %0d cycles (expected %0d)", n, WAKE));
    end
    step(); tx_ready = 0;
    step(20);
    check(pgs_pa, "transmit chain on during the frame");
    tx_done = 1; step(); tx_done = 0; tx_grant = 0;
    check(asleep, "asleep after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
