// tb_ook_rf_frontend -- all 16 power-gating combinations: checks that the
// transmitter reaches the air only with PA and up-mixer on, the receiver
// passes data only with LNA and down-mixer on, the comparator always sees
// the carrier, and the power figure (6.30 mW asleep, 32.30 mW all on).
module tb_ook_rf_frontend;
  localparam int L = 4;
  logic tx_carrier, pgs_pa, pgs_txmix, air_carrier_out, air_carrier_in, pgs_lna, pgs_rxmix, carrier_detect;
  logic [L-1:0] tx_sym, air_sym_out, air_sym_in, rx_sym;
  logic [15:0] power_uw;
  ook_rf_frontend #(.LANE_W(L)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int g = 0; g < 16; g++)
      for (int r = 0; r < 8; r++) begin
        int p;
        {pgs_pa, pgs_txmix, pgs_lna, pgs_rxmix} = 4'(g);
        tx_carrier = 1'b1; tx_sym = 4'($urandom); air_carrier_in = r[0]; air_sym_in = 4'($urandom);
        #1;
        p = 6300 + (pgs_pa ? 10000 : 0) + (pgs_lna ? 10000 : 0) + (pgs_txmix ? 3000 : 0) + (pgs_rxmix ? 3000 : 0);
        checks++;
        if (air_carrier_out != (pgs_pa && pgs_txmix) ||
            air_sym_out != ((pgs_pa && pgs_txmix) ? tx_sym : 4'h0) ||
            rx_sym != ((pgs_lna && pgs_rxmix) ? air_sym_in : 4'h0) ||
            carrier_detect != air_carrier_in || int'(power_uw) != p) begin
          failures++;
          $display("FAIL gating %b", g[3:0]);
        end
      end
    {pgs_pa, pgs_txmix, pgs_lna, pgs_rxmix} = 4'b0000; #1;
    checks++; if (power_uw != 16'd6300) failures++;
    {pgs_pa, pgs_txmix, pgs_lna, pgs_rxmix} = 4'b1111; #1;
    checks++; if (power_uw != 16'd32300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
