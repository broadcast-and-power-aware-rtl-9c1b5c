// ook_rf_frontend -- behavioural model of the power-gated OOK transceiver of
// one WI (analog: up-conversion mixer and power amplifier on the transmit
// side; low noise amplifier, down-conversion mixer and baseband amplifier on
// the receive side; the comparator that detects a valid received signal).
// This is not synthesizable hardware of the real part; it stands in for it
// at the digital boundary so the wireless channel can be simulated.
//
// The channel is modelled digitally as a carrier flag plus LANE_W data bits
// per clock. The transmitter puts its frame on air only while both the PA
// and the up-conversion mixer are powered. The receive chain passes the
// channel's data only while both the LNA and the down-conversion mixer are
// powered, otherwise it outputs zeros. The comparator is never gated and
// always reports whether a carrier is on air.
// power_uw is the transceiver power in microwatts: the document's 6.30 mW
// with all four gated parts asleep (ungated parts plus the 0.30 mW of
// comparator, controller and switches) and 32.30 mW with all of them on.
// The split of the gated 26 mW (PA and LNA 10 mW each, each mixer 3 mW)
// follows the document's power pie chart (PA+LNA 63 %, mixers 19 % of
// 32 mW) with an even split inside each pair, which is this model's choice.
module ook_rf_frontend #(
  parameter int LANE_W = 4
) (
  // transmit side
  input  logic              tx_carrier,
  input  logic [LANE_W-1:0] tx_sym,
  input  logic              pgs_pa,
  input  logic              pgs_txmix,
  output logic              air_carrier_out,
  output logic [LANE_W-1:0] air_sym_out,
  // receive side
  input  logic              air_carrier_in,
  input  logic [LANE_W-1:0] air_sym_in,
  input  logic              pgs_lna,
  input  logic              pgs_rxmix,
  output logic [LANE_W-1:0] rx_sym,
  output logic              carrier_detect,
  // power estimate
  output logic [15:0]       power_uw
);
  localparam int P_SLEEP_UW = 6300;
  localparam int P_PA_UW    = 10000;
  localparam int P_LNA_UW   = 10000;
  localparam int P_MIX_UW   = 3000;

  logic tx_on, rx_on;
  assign tx_on           = pgs_pa && pgs_txmix;
  assign rx_on           = pgs_lna && pgs_rxmix;
  assign air_carrier_out = tx_carrier && tx_on;
  assign air_sym_out     = tx_on ? tx_sym : '0;
  assign rx_sym          = rx_on ? air_sym_in : '0;
  assign carrier_detect  = air_carrier_in;
  assign power_uw = 16'(P_SLEEP_UW + (pgs_pa ? P_PA_UW : 0) + (pgs_lna ? P_LNA_UW : 0)
                      + (pgs_txmix ? P_MIX_UW : 0) + (pgs_rxmix ? P_MIX_UW : 0));
endmodule
