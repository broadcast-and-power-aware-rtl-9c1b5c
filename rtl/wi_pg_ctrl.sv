// wi_pg_ctrl -- light-weight power-gating controller (CTRL) of one WI.
//
// Drives the power-gating switch signals of the four gated RF parts: LNA
// and down-conversion mixer (receive chain), PA and up-conversion mixer
// (transmit chain). A 1 on a pgs_* output powers the part. With nothing to
// do, all four are off and only the comparator listens.
//   SLEEP     : all off. A rising carrier seen by the comparator wakes the
//               receive chain (RX_HDR). Holding the token with a frame ready
//               wakes the transmit chain (TX_WAKE).
//   RX_HDR    : receive chain on until the header flit is decoded; if the
//               pattern decoder accepts it go to RX_DATA, else RX_IGNORE.
//   RX_DATA   : receive chain on until the tail flit or the carrier ends.
//   RX_IGNORE : all off again until the carrier of the foreign frame ends.
//   TX_WAKE   : transmit chain on, wait WAKE_CYC cycles for it to settle,
//               then pulse tx_start.
//   TX_BUSY   : transmit chain on until the serializer reports done.
// The document gives the controller's role, the comparator trigger and the
// decoder; the states, the wake time and the early return to sleep on a
// foreign header are this design's choices.
module wi_pg_ctrl #(
  parameter int WAKE_CYC = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic carrier_detect,   // comparator: a valid signal is on air
  input  logic hdr_valid,        // a header flit has been received
  input  logic hdr_accept,       // ... and the pattern decoder accepted it
  input  logic hdr_last,         // ... and it is a single-flit packet
  input  logic rx_last,          // tail flit of the accepted packet received
  input  logic tx_ready,         // a complete packet waits to be sent
  input  logic tx_grant,         // this WI holds the token
  input  logic tx_done,          // serializer finished the frame
  output logic tx_start,
  output logic rx_hdr_phase,     // a received flit is a header to decode
  output logic rx_data_phase,    // received flits belong to an accepted packet
  output logic pgs_lna,
  output logic pgs_rxmix,
  output logic pgs_pa,
  output logic pgs_txmix,
  output logic asleep
);
  typedef enum logic [2:0] {SLEEP, RX_HDR, RX_DATA, RX_IGNORE, TX_WAKE, TX_BUSY} st_e;
  st_e st;
  logic carrier_q;
  logic [$clog2(WAKE_CYC+1)-1:0] wcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= SLEEP;
      carrier_q <= 1'b0;
      wcnt      <= '0;
    end else begin
      carrier_q <= carrier_detect;
      unique case (st)
        SLEEP:
          if (carrier_detect && !carrier_q) st <= RX_HDR;
          else if (tx_grant && tx_ready) begin
            st   <= TX_WAKE;
            wcnt <= '0;
          end
        RX_HDR:
          if (!carrier_detect) st <= SLEEP;
          else if (hdr_valid) st <= !hdr_accept ? RX_IGNORE : (hdr_last ? SLEEP : RX_DATA);
        RX_DATA:
          if (rx_last || !carrier_detect) st <= SLEEP;
        RX_IGNORE:
          if (!carrier_detect) st <= SLEEP;
        TX_WAKE:
          if (wcnt == ($clog2(WAKE_CYC+1))'(WAKE_CYC)) st <= TX_BUSY;
          else wcnt <= wcnt + 1'b1;
        TX_BUSY:
          if (tx_done) st <= SLEEP;
        default: st <= SLEEP;
      endcase
    end
  end

  assign tx_start      = (st == TX_WAKE) && (wcnt == ($clog2(WAKE_CYC+1))'(WAKE_CYC));
  assign rx_hdr_phase  = (st == RX_HDR);
  assign rx_data_phase = (st == RX_DATA);
  assign pgs_lna       = (st == RX_HDR) || (st == RX_DATA);
  assign pgs_rxmix     = pgs_lna;
  assign pgs_pa        = (st == TX_WAKE) || (st == TX_BUSY);
  assign pgs_txmix     = pgs_pa;
  assign asleep        = !pgs_lna && !pgs_pa;
endmodule
