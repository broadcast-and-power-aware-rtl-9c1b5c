// tb_wi_serializer -- loads random packets, waits for pkt_ready, starts a
// frame and rebuilds the flits from the symbols with its own shift logic.
// Checks: pkt_ready only with a whole packet buffered, carrier length
// (PRE_CYC + flits * 32/LANE_W cycles), data, the done pulse, the tap and
// one credit per flit.
module tb_wi_serializer;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int L = 4, PRE = 6, D = 16, SYMS = 32 / L;
  logic in_valid, in_credit, pkt_ready, start, done, tx_carrier, tap_valid;
  flit_t in_flit, tap_flit;
  logic [L-1:0] tx_sym;
  wi_serializer #(.LANE_W(L), .PRE_CYC(PRE), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  flit_t pkt [$];
  int credits;
  always @(posedge clk) if (in_credit) credits++;
  initial begin
    in_valid = 0; in_flit = '0; start = 0; credits = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      automatic int len = (p == 0) ? 1 : int'($urandom_range(2, D));
      pkt.delete();
      credits = 0;
      for (int i = 0; i < len; i++) begin
        automatic flit_t f = $urandom;
        f[31:30] = (len == 1) ? FT_SINGLE : (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
        pkt.push_back(f);
        @(negedge clk);
        check(!pkt_ready, "no pkt_ready before the tail");
        in_valid = 1; in_flit = f;
      end
      @(negedge clk); in_valid = 0;
      check(pkt_ready, "pkt_ready with a whole packet");
      start = 1; @(negedge clk); start = 0;
      begin
        automatic int on = 0, fi = 0, si = 0, taps = 0, dones = 0;
        automatic flit_t acc = '0;
        while (!tx_carrier) @(negedge clk);
        while (tx_carrier) begin
          if (tap_valid) begin
            check(taps < len && tap_flit == pkt[taps], "tap flit");
            taps++;
          end
          if (done) dones++;
          if (on >= PRE) begin
            acc = {tx_sym, acc[31:L]};
            si++;
            if (si == SYMS) begin
              check(fi < len && acc == pkt[fi], $sformatf("packet %0d flit %0d", p, fi));
              fi++; si = 0;
            end
          end
          on++;
          @(negedge clk);
        end
        check(on == PRE + len * SYMS, $sformatf("carrier %0d cycles, expected %0d", on, PRE + len * SYMS));
        check(fi == len && taps == len && dones == 1, "all flits, taps and one done");
        check(credits == len, "one credit per flit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
