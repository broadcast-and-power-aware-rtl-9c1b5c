// wireless_interface -- power-aware wireless interface (WI) of a hybrid
// router.
//
// Transmit: packets the router sends to its WI port (wireless unicasts and
// broadcasts on their way out) collect in the serializer buffer. When one is
// complete the WI requests the token; once it holds the token the
// controller powers PA and up-mixer, waits WAKE_CYC cycles, and the
// serializer sends preamble and flits. A broadcast is also copied, flit by
// flit, into this WI's own receive buffer so that its own region is served
// too (a WI does not hear its own frame).
// Receive: the comparator sees a carrier and the controller powers LNA and
// down-mixer. The header flit goes to the pattern decoder: a frame for
// another WI sends the receive chain back to sleep at once; an accepted
// frame is stored, header rewritten, in the receive buffer and injected into
// the router's WI port under credit flow control (ROUTER_BUF credits).
// Ports: router side (rt_*), token (tok_*), shared channel (air_*), and the
// four power-gating switch signals plus a power estimate for monitoring.
// Timing: frame = PRE_CYC preamble cycles + 32/LANE_W cycles per flit.
// The document gives the blocks of Fig. 4 and their roles; buffer sizes,
// the loop-back of broadcasts and all timing are this design's choices.
module wireless_interface
  import winoc_pkg::*;
#(
  parameter int MY_ID      = 0,
  parameter int LANE_W     = 4,
  parameter int PKT_FLITS  = 64,
  parameter int WAKE_CYC   = 8,
  parameter int PRE_CYC    = WAKE_CYC + 2,
  parameter int ROUTER_BUF = 4,
  parameter int RX_DEPTH   = 2 * PKT_FLITS
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the router's WI output port
  input  logic              rt_in_valid,
  input  flit_t             rt_in_flit,
  output logic              rt_in_credit,
  // to the router's WI input port
  output logic              rt_out_valid,
  output flit_t             rt_out_flit,
  input  logic              rt_out_credit,
  // token ring
  output logic              tok_req,
  input  logic              tok_grant,
  output logic              tok_done,
  // shared wireless channel
  input  logic              air_carrier_in,
  input  logic [LANE_W-1:0] air_sym_in,
  output logic              air_carrier_out,
  output logic [LANE_W-1:0] air_sym_out,
  // power state
  output logic [3:0]        pgs,          // {pa, txmix, lna, rxmix}
  output logic              asleep,
  output logic [15:0]       power_uw,
  output logic              rx_reject     // a foreign header was dropped
);
  // ---- transmit path ----
  logic              ser_start, ser_done, pkt_ready;
  logic              tx_carrier, tap_valid;
  logic [LANE_W-1:0] tx_sym;
  flit_t             tap_flit;

  wi_serializer #(.LANE_W(LANE_W), .PRE_CYC(PRE_CYC), .DEPTH(PKT_FLITS)) u_ser (
    .clk, .rst_n,
    .in_valid(rt_in_valid), .in_flit(rt_in_flit), .in_credit(rt_in_credit),
    .pkt_ready, .start(ser_start), .done(ser_done),
    .tx_carrier, .tx_sym, .tap_valid, .tap_flit
  );

  assign tok_req  = pkt_ready;
  assign tok_done = ser_done;

  // ---- RF front end (behavioural) ----
  logic              pgs_lna, pgs_rxmix, pgs_pa, pgs_txmix, carrier_detect;
  logic [LANE_W-1:0] rx_sym;

  ook_rf_frontend #(.LANE_W(LANE_W)) u_rf (
    .tx_carrier, .tx_sym, .pgs_pa, .pgs_txmix,
    .air_carrier_out, .air_sym_out,
    .air_carrier_in, .air_sym_in, .pgs_lna, .pgs_rxmix,
    .rx_sym, .carrier_detect, .power_uw
  );
  assign pgs = {pgs_pa, pgs_txmix, pgs_lna, pgs_rxmix};

  // ---- receive path ----
  logic  des_valid;
  flit_t des_flit;
  wi_deserializer #(.LANE_W(LANE_W), .PRE_CYC(PRE_CYC)) u_des (
    .clk, .rst_n, .carrier(carrier_detect), .rx_sym,
    .flit_valid(des_valid), .flit(des_flit)
  );

  // the decoder looks at the received flit, or at the looped-back flit
  flit_t dec_in, dec_out;
  logic  match_uni, match_bcast, dec_accept;
  assign dec_in = tap_valid ? tap_flit : des_flit;
  pattern_decoder #(.MY_ID(MY_ID)) u_dec (
    .hdr(dec_in), .match_uni, .match_bcast, .accept(dec_accept), .hdr_out(dec_out)
  );

  logic rx_hdr_phase, rx_data_phase;
  wi_pg_ctrl #(.WAKE_CYC(WAKE_CYC)) u_ctrl (
    .clk, .rst_n,
    .carrier_detect,
    .hdr_valid (des_valid && rx_hdr_phase),
    .hdr_accept(dec_accept),
    .hdr_last  (is_last(des_flit)),
    .rx_last   (des_valid && rx_data_phase && is_last(des_flit)),
    .tx_ready  (pkt_ready),
    .tx_grant  (tok_grant),
    .tx_done   (ser_done),
    .tx_start  (ser_start),
    .rx_hdr_phase, .rx_data_phase,
    .pgs_lna, .pgs_rxmix, .pgs_pa, .pgs_txmix, .asleep
  );

  // loop-back of an outgoing broadcast into the own region
  logic loop_bcast;
  always_ff @(posedge clk) begin
    if (!rst_n) loop_bcast <= 1'b0;
    else if (tap_valid && is_head(tap_flit))
      loop_bcast <= (flit_mode(tap_flit) == MODE_BCAST);
  end

  logic  rx_push;
  flit_t rx_din;
  always_comb begin
    rx_push = 1'b0;
    rx_din  = des_flit;
    if (tap_valid) begin
      if (is_head(tap_flit)) begin
        rx_push = (flit_mode(tap_flit) == MODE_BCAST);
        rx_din  = dec_out;
      end else begin
        rx_push = loop_bcast;
        rx_din  = tap_flit;
      end
    end else if (des_valid && rx_hdr_phase && dec_accept) begin
      rx_push = 1'b1;
      rx_din  = dec_out;
    end else if (des_valid && rx_data_phase) begin
      rx_push = 1'b1;
    end
  end
  assign rx_reject = des_valid && rx_hdr_phase && !dec_accept;

  flit_t rxq_dout;
  logic  rxq_empty, rxq_pop, unused_rxq_full;
  logic [$clog2(RX_DEPTH+1)-1:0] unused_rxq_count;
  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n, .push(rx_push), .din(rx_din), .pop(rxq_pop), .dout(rxq_dout),
    .empty(rxq_empty), .full(unused_rxq_full), .count(unused_rxq_count)
  );

  // ---- injection into the router ----
  localparam int CRW = $clog2(ROUTER_BUF + 1);
  logic [CRW-1:0] credit;
  assign rxq_pop = !rxq_empty && credit != '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credit       <= CRW'(ROUTER_BUF);
      rt_out_valid <= 1'b0;
      rt_out_flit  <= '0;
    end else begin
      credit       <= credit - CRW'(rxq_pop) + CRW'(rt_out_credit);
      rt_out_valid <= rxq_pop;
      rt_out_flit  <= rxq_dout;
    end
  end

  logic unused_match;
  assign unused_match = match_uni ^ match_bcast;

  a_rx_awake: assert property (@(posedge clk) disable iff (!rst_n)
    des_valid && (rx_hdr_phase || rx_data_phase) |-> pgs_lna && pgs_rxmix);
endmodule
