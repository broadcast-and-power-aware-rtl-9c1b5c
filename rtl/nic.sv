// nic -- network interface controller of one tile.
//
// Sits between the tile's core and its router and holds the tile's barrier
// synchronization controller.
// Send side: a message comes either from the sync controller (barrier
// ARRIVE or RELEASE, which go first) or from the core (data, core_tx_*).
// The NIC builds a head flit and LEN-1 body flits and feeds them to the
// router's local port at up to one flit per cycle under credit flow control.
// Barrier messages are BAR_FLITS flits long. Routing mode:
//   * RELEASE -> broadcast (to the nearest WI, then over the air to all WIs);
//   * unicast -> one wireless hop when it saves at least WL_MIN_SAVE wired
//     hops (source WI and destination WI differ), else wired XY.
// Body flit payload: {source tile (6 b), tag (8 b), sequence number (16 b)}.
// Receive side: every flit from the router is taken at once (its credit goes
// back in the same cycle). At a tail flit the packet is reported: barrier
// messages to the sync controller, data packets on core_rx_*. rx_errors
// counts body flits whose source or sequence number is wrong.
// The document only names the NIC; packet format and the wireless-unicast
// rule are this design's choices.
module nic
  import winoc_pkg::*;
#(
  parameter int X           = 0,
  parameter int Y           = 0,
  parameter int PKT_FLITS   = 64,
  parameter int BAR_FLITS   = PKT_FLITS,
  parameter int BUF_DEPTH   = 4,
  parameter int NUM_BAR     = 4,
  parameter int NUM_PART    = 64,
  parameter int WL_MIN_SAVE = 6,
  parameter logic [47:0] MASTERS = {6'd27, 6'd27, 6'd27, 6'd27, 6'd35, 6'd28, 6'd36, 6'd27}
) (
  input  logic       clk,
  input  logic       rst_n,
  // router local port
  output logic       rt_out_valid,
  output flit_t      rt_out_flit,
  input  logic       rt_out_credit,
  input  logic       rt_in_valid,
  input  flit_t      rt_in_flit,
  output logic       rt_in_credit,
  // core: data packets
  input  logic       core_tx_valid,
  output logic       core_tx_ready,
  input  logic [2:0] core_tx_dst_x,
  input  logic [2:0] core_tx_dst_y,
  input  logic [6:0] core_tx_len,      // flits, 1..PKT_FLITS
  input  logic [7:0] core_tx_tag,
  output logic       core_rx_valid,
  output logic [2:0] core_rx_src_x,
  output logic [2:0] core_rx_src_y,
  output logic [7:0] core_rx_tag,
  output logic [6:0] core_rx_len,
  output logic       core_rx_wireless,  // packet took a wireless hop
  // core: barriers
  input  logic       core_bar_arrive,
  input  logic [2:0] core_bar_id,
  output logic       core_bar_release,
  output logic [2:0] core_bar_release_id,
  output logic [NUM_BAR-1:0] core_bar_waiting,
  // status
  output logic [15:0] rx_errors
);
  localparam int CRW = $clog2(BUF_DEPTH + 1);
  localparam logic [5:0] ME = 6'(Y * MESH_X + X);

  // ---------------- barrier controller ----------------
  logic       sc_req_valid, sc_req_ready;
  msg_e       sc_req_msg;
  logic [2:0] sc_req_bar, sc_req_dst_x, sc_req_dst_y;
  logic       sc_rx_valid;
  msg_e       sc_rx_msg;
  logic [2:0] sc_rx_bar;

  sync_controller #(.X(X), .Y(Y), .NUM_BAR(NUM_BAR), .NUM_PART(NUM_PART), .MASTERS(MASTERS)) u_sync (
    .clk, .rst_n,
    .arrive(core_bar_arrive), .arrive_id(core_bar_id),
    .release_o(core_bar_release), .release_id(core_bar_release_id),
    .waiting(core_bar_waiting),
    .req_valid(sc_req_valid), .req_ready(sc_req_ready), .req_msg(sc_req_msg),
    .req_bar(sc_req_bar), .req_dst_x(sc_req_dst_x), .req_dst_y(sc_req_dst_y),
    .rx_valid(sc_rx_valid), .rx_msg(sc_rx_msg), .rx_bar(sc_rx_bar)
  );

  // ---------------- packetizer ----------------
  function automatic mode_e unicast_mode(logic [2:0] dx, logic [2:0] dy);
    logic [3:0]  ws, wd;
    int unsigned wired, wl;
    ws    = nearest_wi(3'(X), 3'(Y));
    wd    = nearest_wi(dx, dy);
    wired = hops(3'(X), 3'(Y), dx, dy);
    wl    = hops(3'(X), 3'(Y), wi_x(ws), wi_y(ws)) + 1 + hops(wi_x(wd), wi_y(wd), dx, dy);
    if (ws != wd && wl + WL_MIN_SAVE <= wired) return MODE_WUNI;
    return MODE_UNI;
  endfunction

  logic        busy;
  head_t       hdr_q;
  logic [6:0]  len_q, cnt_q;
  logic [CRW-1:0] credit;
  logic        take_sc, take_core;

  assign take_sc       = !busy && sc_req_valid;
  assign take_core     = !busy && !sc_req_valid && core_tx_valid;
  assign sc_req_ready  = take_sc;
  assign core_tx_ready = take_core;

  head_t new_hdr;
  always_comb begin
    new_hdr       = '0;
    new_hdr.ftype = FT_HEAD;
    new_hdr.src_x = 3'(X);
    new_hdr.src_y = 3'(Y);
    if (take_sc) begin
      new_hdr.msg   = sc_req_msg;
      new_hdr.arg   = 8'(sc_req_bar);
      new_hdr.dst_x = sc_req_dst_x;
      new_hdr.dst_y = sc_req_dst_y;
    end else begin
      new_hdr.msg   = MSG_DATA;
      new_hdr.arg   = core_tx_tag;
      new_hdr.dst_x = core_tx_dst_x;
      new_hdr.dst_y = core_tx_dst_y;
    end
    if (take_sc && sc_req_msg == MSG_BAR_RELEASE) begin
      new_hdr.mode = MODE_BCAST;
      new_hdr.wi   = WI_BCAST_ADDR;
    end else begin
      new_hdr.mode = unicast_mode(new_hdr.dst_x, new_hdr.dst_y);
      new_hdr.wi   = nearest_wi(new_hdr.dst_x, new_hdr.dst_y);
    end
  end

  logic  send;
  flit_t cur_flit;
  assign send = busy && credit != '0;
  always_comb begin
    logic  last;
    head_t h;
    last    = (cnt_q == len_q - 1'b1);
    h       = hdr_q;
    h.ftype = last ? FT_SINGLE : FT_HEAD;
    if (cnt_q == '0) begin
      cur_flit = flit_t'(h);
    end else begin
      cur_flit = {last ? FT_TAIL : FT_BODY, ME, hdr_q.arg, 16'(cnt_q)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      hdr_q        <= '0;
      len_q        <= 7'd1;
      cnt_q        <= '0;
      credit       <= CRW'(BUF_DEPTH);
      rt_out_valid <= 1'b0;
      rt_out_flit  <= '0;
    end else begin
      credit       <= credit - CRW'(send) + CRW'(rt_out_credit);
      rt_out_valid <= send;
      rt_out_flit  <= cur_flit;
      if (take_sc || take_core) begin
        busy  <= 1'b1;
        hdr_q <= new_hdr;
        cnt_q <= '0;
        if (take_sc) len_q <= 7'(BAR_FLITS);
        else         len_q <= (core_tx_len == '0) ? 7'd1
                            : (core_tx_len > 7'(PKT_FLITS)) ? 7'(PKT_FLITS) : core_tx_len;
      end else if (send) begin
        if (cnt_q == len_q - 1'b1) busy <= 1'b0;
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  // ---------------- depacketizer ----------------
  head_t      rh;
  logic [6:0] rcnt;
  head_t      in_h;
  assign in_h = head_t'(rt_in_flit);
  assign rt_in_credit = rt_in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rh               <= '0;
      rcnt             <= '0;
      rx_errors        <= '0;
      core_rx_valid    <= 1'b0;
      core_rx_src_x    <= '0;
      core_rx_src_y    <= '0;
      core_rx_tag      <= '0;
      core_rx_len      <= '0;
      core_rx_wireless <= 1'b0;
      sc_rx_valid      <= 1'b0;
      sc_rx_msg        <= MSG_DATA;
      sc_rx_bar        <= '0;
    end else begin
      core_rx_valid <= 1'b0;
      sc_rx_valid   <= 1'b0;
      if (rt_in_valid) begin
        head_t h;
        logic [6:0] n;
        h = rh;
        n = rcnt + 1'b1;
        if (is_head(rt_in_flit)) begin
          h = in_h;
          n = 7'd1;
        end else if (rt_in_flit[29:24] != {rh.src_y, rh.src_x} ||
                     rt_in_flit[15:0] != 16'(rcnt)) begin
          rx_errors <= rx_errors + 1'b1;
        end
        rh   <= h;
        rcnt <= n;
        if (is_last(rt_in_flit)) begin
          if (h.msg == MSG_DATA) begin
            core_rx_valid    <= 1'b1;
            core_rx_src_x    <= h.src_x;
            core_rx_src_y    <= h.src_y;
            core_rx_tag      <= h.arg;
            core_rx_len      <= n;
            core_rx_wireless <= (h.mode == MODE_WUNI) || (h.mode == MODE_DIST);
          end else begin
            sc_rx_valid <= 1'b1;
            sc_rx_msg   <= h.msg;
            sc_rx_bar   <= h.arg[2:0];
          end
        end
      end
    end
  end
endmodule
