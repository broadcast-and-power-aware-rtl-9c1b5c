// tb_sync_controller -- a controller at tile (3,3), master of barrier 0 and
// not of barrier 1 (master tile 36 = (4,4)), with NUM_PART = 5.
// Checks: the master counts its own arrival and four ARRIVE messages and
// offers exactly one RELEASE (broadcast) only after the last one, twice in a
// row; a non-master arrival offers one ARRIVE to (4,4); a received RELEASE
// pulses release with its id and clears waiting.
module tb_sync_controller;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic arrive, release_o, req_valid, req_ready, rx_valid;
  logic [2:0] arrive_id, release_id, req_bar, req_dst_x, req_dst_y, rx_bar;
  logic [3:0] waiting;
  msg_e req_msg, rx_msg;
  sync_controller #(.X(3), .Y(3), .NUM_BAR(4), .NUM_PART(5)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  int n_rel = 0, n_arr = 0;
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    if (req_msg == MSG_BAR_RELEASE) n_rel++; else n_arr++;
  end
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic rx(msg_e m, int b);
    @(negedge clk); rx_valid = 1; rx_msg = m; rx_bar = 3'(b);
    @(negedge clk); rx_valid = 0;
  endtask
  initial begin
    arrive = 0; arrive_id = 0; req_ready = 0; rx_valid = 0; rx_msg = MSG_DATA; rx_bar = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); arrive = 1; arrive_id = 0;
      @(negedge clk); arrive = 0;
      check(waiting[0], "master core waits");
      for (int k = 0; k < 4; k++) begin
        check(!req_valid, "no message before all arrived");
        rx(MSG_BAR_ARRIVE, 0);
      end
      check(req_valid && req_msg == MSG_BAR_RELEASE && req_bar == 0, "release offered after the last arrival");
      @(negedge clk); req_ready = 1; @(negedge clk); req_ready = 0;
      check(!req_valid, "release offered once");
      rx(MSG_BAR_RELEASE, 0);
      check(release_o && release_id == 0 && !waiting[0], "release pulse for barrier 0");
      @(negedge clk);
      check(!release_o, "release is a pulse");
    end
    check(n_rel == 2, "two releases in two rounds");
    // non-master
    @(negedge clk); arrive = 1; arrive_id = 1;
    @(negedge clk); arrive = 0;
    check(req_valid && req_msg == MSG_BAR_ARRIVE && req_bar == 1 && req_dst_x == 4 && req_dst_y == 4,
          "arrival message to master (4,4)");
    req_ready = 1; @(negedge clk); req_ready = 0;
    check(!req_valid && waiting[1], "one arrival message, core waits");
    rx(MSG_BAR_ARRIVE, 1);
    check(!req_valid, "non-master does not count");
    rx(MSG_BAR_RELEASE, 1);
    check(release_o && release_id == 1 && waiting == 4'b0, "release of barrier 1");
    check(n_arr == 1, "exactly one arrival message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
