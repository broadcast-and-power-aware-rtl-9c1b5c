// winoc_top -- broadcast- and power-aware wireless NoC, 8x8 tiles.
//
// Every tile has a router and a network interface (with its barrier
// synchronization controller); the core and caches of a tile are outside
// this design and reach it through the core_* ports, indexed by tile number
// y*8+x. Ten routers are hybrid routers with a wireless interface; their
// positions are in winoc_pkg. All WIs share one wireless channel, modelled
// as a wired-OR of the transmitters (carrier flag plus LANE_W bits per
// cycle); a token ring makes sure only one WI transmits at a time.
// A barrier release travels from its master tile to the nearest WI, is sent
// once over the air, is picked up by every WI and spread by each over its
// own region, so every tile receives exactly one copy. Idle WIs keep only
// their comparator powered (wi_pgs, wi_asleep, wi_power_uw show this).
// Parameters default to the document's configuration where it gives one
// (64 tiles, 10 WIs, 32-bit flits, 64-flit packets, 4-stage routers); the
// rest are this design's choices, documented at the modules that use them.
module winoc_top
  import winoc_pkg::*;
#(
  parameter int PKT_FLITS   = 64,
  parameter int BAR_FLITS   = PKT_FLITS,
  parameter int BUF_DEPTH   = 4,
  parameter int LANE_W      = 4,
  parameter int WAKE_CYC    = 8,
  parameter int NUM_BAR     = 4,
  parameter int NUM_PART    = 64,
  parameter int WL_MIN_SAVE = 6,
  parameter logic [47:0] MASTERS = {6'd27, 6'd27, 6'd27, 6'd27, 6'd35, 6'd28, 6'd36, 6'd27}
) (
  input  logic        clk,
  input  logic        rst_n,
  // per-tile core ports
  input  logic        core_tx_valid [NUM_TILE],
  output logic        core_tx_ready [NUM_TILE],
  input  logic [2:0]  core_tx_dst_x [NUM_TILE],
  input  logic [2:0]  core_tx_dst_y [NUM_TILE],
  input  logic [6:0]  core_tx_len   [NUM_TILE],
  input  logic [7:0]  core_tx_tag   [NUM_TILE],
  output logic        core_rx_valid [NUM_TILE],
  output logic [2:0]  core_rx_src_x [NUM_TILE],
  output logic [2:0]  core_rx_src_y [NUM_TILE],
  output logic [7:0]  core_rx_tag   [NUM_TILE],
  output logic [6:0]  core_rx_len   [NUM_TILE],
  output logic        core_rx_wireless [NUM_TILE],
  input  logic        core_bar_arrive  [NUM_TILE],
  input  logic [2:0]  core_bar_id      [NUM_TILE],
  output logic        core_bar_release [NUM_TILE],
  output logic [2:0]  core_bar_release_id [NUM_TILE],
  output logic [NUM_BAR-1:0] core_bar_waiting [NUM_TILE],
  output logic [15:0] rx_errors [NUM_TILE],
  // wireless interfaces
  output logic [3:0]  wi_pgs      [NUM_WI],   // {pa, txmix, lna, rxmix}
  output logic        wi_asleep   [NUM_WI],
  output logic [15:0] wi_power_uw [NUM_WI],
  output logic        wi_rx_reject[NUM_WI],
  output logic        air_busy
);
  localparam int NP = NPORT_MAX;

  // router port signals, [tile][port]
  logic  rv_in   [NUM_TILE][NP];
  flit_t rf_in   [NUM_TILE][NP];
  logic  rc_in   [NUM_TILE][NP];  // credit returned by this input
  logic  rv_out  [NUM_TILE][NP];
  flit_t rf_out  [NUM_TILE][NP];
  logic  rc_out  [NUM_TILE][NP];  // credit arriving at this output

  // wireless
  logic [NUM_WI-1:0] tok_req, tok_done, tok_grant;
  logic              wi_car   [NUM_WI];
  logic [LANE_W-1:0] wi_sym   [NUM_WI];
  logic              air_carrier;
  logic [LANE_W-1:0] air_sym;

  function automatic int wi_at(int x, int y);
    for (int w = 0; w < NUM_WI; w++) if (WI_X[w] == x && WI_Y[w] == y) return w;
    return -1;
  endfunction

  function automatic int nb(int t, int p);   // neighbour tile through port p
    int x, y;
    x = t % MESH_X;
    y = t / MESH_X;
    case (p)
      P_N: return (y < MESH_Y - 1) ? t + MESH_X : -1;
      P_S: return (y > 0)          ? t - MESH_X : -1;
      P_E: return (x < MESH_X - 1) ? t + 1      : -1;
      P_W: return (x > 0)          ? t - 1      : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    case (p)
      P_N: return P_S;
      P_S: return P_N;
      P_E: return P_W;
      default: return P_E;
    endcase
  endfunction

  for (genvar t = 0; t < NUM_TILE; t++) begin : g_tile
    localparam int TX = t % MESH_X;
    localparam int TY = t / MESH_X;
    localparam int W  = wi_at(TX, TY);

    // mesh links
    for (genvar p = 1; p < 5; p++) begin : g_link
      localparam int N = nb(t, p);
      if (N >= 0) begin : g_con
        assign rv_in[t][p] = rv_out[N][opp(p)];
        assign rf_in[t][p] = rf_out[N][opp(p)];
        assign rc_out[t][p] = rc_in[N][opp(p)];
      end else begin : g_edge
        assign rv_in[t][p]  = 1'b0;
        assign rf_in[t][p]  = '0;
        assign rc_out[t][p] = 1'b0;
      end
    end

    nic #(.X(TX), .Y(TY), .PKT_FLITS(PKT_FLITS), .BAR_FLITS(BAR_FLITS), .BUF_DEPTH(BUF_DEPTH),
          .NUM_BAR(NUM_BAR), .NUM_PART(NUM_PART), .WL_MIN_SAVE(WL_MIN_SAVE),
          .MASTERS(MASTERS)) u_nic (
      .clk, .rst_n,
      .rt_out_valid(rv_in[t][P_L]), .rt_out_flit(rf_in[t][P_L]), .rt_out_credit(rc_in[t][P_L]),
      .rt_in_valid(rv_out[t][P_L]), .rt_in_flit(rf_out[t][P_L]), .rt_in_credit(rc_out[t][P_L]),
      .core_tx_valid(core_tx_valid[t]), .core_tx_ready(core_tx_ready[t]),
      .core_tx_dst_x(core_tx_dst_x[t]), .core_tx_dst_y(core_tx_dst_y[t]),
      .core_tx_len(core_tx_len[t]), .core_tx_tag(core_tx_tag[t]),
      .core_rx_valid(core_rx_valid[t]), .core_rx_src_x(core_rx_src_x[t]),
      .core_rx_src_y(core_rx_src_y[t]), .core_rx_tag(core_rx_tag[t]),
      .core_rx_len(core_rx_len[t]), .core_rx_wireless(core_rx_wireless[t]),
      .core_bar_arrive(core_bar_arrive[t]), .core_bar_id(core_bar_id[t]),
      .core_bar_release(core_bar_release[t]), .core_bar_release_id(core_bar_release_id[t]),
      .core_bar_waiting(core_bar_waiting[t]),
      .rx_errors(rx_errors[t])
    );

    if (W >= 0) begin : g_hybrid
      logic  v_i [6], c_i [6], v_o [6], c_o [6];
      flit_t f_i [6], f_o [6];
      for (genvar p = 0; p < 6; p++) begin : g_p
        if (p < 5) begin : g_wired
          assign v_i[p] = rv_in[t][p];
          assign f_i[p] = rf_in[t][p];
          assign c_o[p] = rc_out[t][p];
        end
        assign rc_in[t][p]  = c_i[p];
        assign rv_out[t][p] = v_o[p];
        assign rf_out[t][p] = f_o[p];
      end
      noc_router #(.X(TX), .Y(TY), .HAS_WI(1'b1), .BUF_DEPTH(BUF_DEPTH),
                   .WI_CREDITS(PKT_FLITS)) u_router (
        .clk, .rst_n,
        .in_valid(v_i), .in_flit(f_i), .in_credit(c_i),
        .out_valid(v_o), .out_flit(f_o), .out_credit(c_o)
      );
      wireless_interface #(.MY_ID(W), .LANE_W(LANE_W), .PKT_FLITS(PKT_FLITS),
                           .WAKE_CYC(WAKE_CYC), .ROUTER_BUF(BUF_DEPTH)) u_wi (
        .clk, .rst_n,
        .rt_in_valid(v_o[P_WI]), .rt_in_flit(f_o[P_WI]), .rt_in_credit(c_o[P_WI]),
        .rt_out_valid(v_i[P_WI]), .rt_out_flit(f_i[P_WI]), .rt_out_credit(c_i[P_WI]),
        .tok_req(tok_req[W]), .tok_grant(tok_grant[W]), .tok_done(tok_done[W]),
        .air_carrier_in(air_carrier), .air_sym_in(air_sym),
        .air_carrier_out(wi_car[W]), .air_sym_out(wi_sym[W]),
        .pgs(wi_pgs[W]), .asleep(wi_asleep[W]), .power_uw(wi_power_uw[W]),
        .rx_reject(wi_rx_reject[W])
      );
      // the WI port is wired inside this block, not through the mesh arrays
      assign rv_in[t][P_WI]  = 1'b0;
      assign rf_in[t][P_WI]  = '0;
      assign rc_out[t][P_WI] = 1'b0;
    end else begin : g_base
      logic  v_i [5], c_i [5], v_o [5], c_o [5];
      flit_t f_i [5], f_o [5];
      for (genvar p = 0; p < 5; p++) begin : g_p
        assign v_i[p] = rv_in[t][p];
        assign f_i[p] = rf_in[t][p];
        assign c_o[p] = rc_out[t][p];
        assign rc_in[t][p]  = c_i[p];
        assign rv_out[t][p] = v_o[p];
        assign rf_out[t][p] = f_o[p];
      end
      noc_router #(.X(TX), .Y(TY), .HAS_WI(1'b0), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst_n,
        .in_valid(v_i), .in_flit(f_i), .in_credit(c_i),
        .out_valid(v_o), .out_flit(f_o), .out_credit(c_o)
      );
      assign rv_in[t][P_WI]  = 1'b0;
      assign rf_in[t][P_WI]  = '0;
      assign rc_out[t][P_WI] = 1'b0;
      assign rc_in[t][P_WI]  = 1'b0;
      assign rv_out[t][P_WI] = 1'b0;
      assign rf_out[t][P_WI] = '0;
    end
  end

  token_ring #(.N(NUM_WI)) u_token (
    .clk, .rst_n, .req(tok_req), .done(tok_done), .grant(tok_grant)
  );

  // shared channel: wired-OR of all transmitters
  always_comb begin
    air_carrier = 1'b0;
    air_sym     = '0;
    for (int w = 0; w < NUM_WI; w++) begin
      air_carrier = air_carrier | wi_car[w];
      air_sym     = air_sym | wi_sym[w];
    end
  end
  assign air_busy = air_carrier;

  a_one_talker: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({wi_car[0], wi_car[1], wi_car[2], wi_car[3], wi_car[4],
              wi_car[5], wi_car[6], wi_car[7], wi_car[8], wi_car[9]}))
    else $error("winoc_top: two WIs on air at once");
endmodule
