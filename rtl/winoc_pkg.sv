// winoc_pkg -- types, constants and routing functions shared by the
// broadcast- and power-aware wireless NoC.
//
// The network is an 8x8 mesh of tiles (router + network interface). Ten of
// the routers are hybrid routers that also hold a wireless interface (WI).
// Flits are 32 bits wide, the same width as every wired link. A packet is a
// head flit followed by body flits; the flit type sits in the top two bits of
// every flit, so a body flit carries 30 payload bits.
//
// Head flit layout (this design's own encoding):
//   [31:30] flit type        [29:28] routing mode
//   [27:25] destination x    [24:22] destination y
//   [21:19] source x         [18:16] source y
//   [15:12] WI address       [11]    leg (0 before, 1 after the wireless hop)
//   [10:8]  message kind     [7:0]   argument (barrier id or data tag)
// The WI address 4'hF is the unique broadcast pattern every WI accepts.
//
// Routing modes:
//   MODE_UNI   wired unicast, XY routing.
//   MODE_WUNI  unicast over one wireless hop: South-Last to the source's
//              nearest WI, air to the destination's nearest WI, then XY.
//   MODE_BCAST broadcast on its way from the source to its nearest WI
//              (South-Last routing).
//   MODE_DIST  broadcast being spread by a WI over its own region of tiles
//              along an XY tree.
// Each tile belongs to the region of the WI nearest to it (Manhattan
// distance, ties to the lower WI index). Such regions contain the whole XY
// path from their WI to every member tile, so the ten distribution trees are
// disjoint and together deliver exactly one copy to every tile.
package winoc_pkg;

  localparam int MESH_X   = 8;
  localparam int MESH_Y   = 8;
  localparam int NUM_TILE = MESH_X * MESH_Y;
  localparam int NUM_WI   = 10;
  localparam int FLIT_W   = 32;
  localparam logic [3:0] WI_BCAST_ADDR = 4'hF;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00, FT_HEAD = 2'b01, FT_TAIL = 2'b10, FT_SINGLE = 2'b11
  } ftype_e;

  typedef enum logic [1:0] {
    MODE_UNI = 2'b00, MODE_WUNI = 2'b01, MODE_BCAST = 2'b10, MODE_DIST = 2'b11
  } mode_e;

  typedef enum logic [2:0] {
    MSG_DATA = 3'd0, MSG_BAR_ARRIVE = 3'd1, MSG_BAR_RELEASE = 3'd2
  } msg_e;

  typedef struct packed {
    ftype_e      ftype;
    mode_e       mode;
    logic [2:0]  dst_x;
    logic [2:0]  dst_y;
    logic [2:0]  src_x;
    logic [2:0]  src_y;
    logic [3:0]  wi;
    logic        leg;
    msg_e        msg;
    logic [7:0]  arg;
  } head_t;

  // router port numbering; a base router uses ports 0..4, a hybrid router
  // adds port 5 towards its wireless interface
  localparam int P_L  = 0;
  localparam int P_N  = 1;   // +y
  localparam int P_E  = 2;   // +x
  localparam int P_S  = 3;   // -y
  localparam int P_W  = 4;   // -x
  localparam int P_WI = 5;
  localparam int NPORT_MAX = 6;
  typedef logic [NPORT_MAX-1:0] pmask_t;

  // Hybrid router positions (x, y), y growing northwards.
  localparam int WI_X [NUM_WI] = '{1, 3, 6, 1, 7, 0, 4, 6, 2, 7};
  localparam int WI_Y [NUM_WI] = '{7, 6, 6, 4, 4, 2, 2, 2, 0, 0};

  function automatic bit is_last(flit_t f);
    return f[31];   // FT_TAIL or FT_SINGLE
  endfunction

  function automatic bit is_head(flit_t f);
    return f[30];   // FT_HEAD or FT_SINGLE
  endfunction

  function automatic mode_e flit_mode(flit_t f);
    head_t h;
    h = head_t'(f);
    return h.mode;
  endfunction

  function automatic int unsigned absdiff(int unsigned a, int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // index of the WI nearest to tile (x, y); evaluated at elaboration only
  function automatic int nearest_wi_c(int x, int y);
    int unsigned best_d;
    int best;
    best_d = 1000;
    best   = 0;
    for (int w = 0; w < NUM_WI; w++) begin
      int unsigned d;
      d = absdiff(x, WI_X[w]) + absdiff(y, WI_Y[w]);
      if (d < best_d) begin
        best_d = d;
        best   = w;
      end
    end
    return best;
  endfunction

  // constant lookup tables: nearest WI of every tile (index y*8+x) and the
  // coordinates {y, x} of every WI
  function automatic logic [NUM_TILE*4-1:0] nearest_table();
    logic [NUM_TILE*4-1:0] r;
    for (int t = 0; t < NUM_TILE; t++) r[t*4 +: 4] = 4'(nearest_wi_c(t % MESH_X, t / MESH_X));
    return r;
  endfunction
  function automatic logic [16*6-1:0] wi_xy_table();
    logic [16*6-1:0] r;
    r = '0;
    for (int w = 0; w < NUM_WI; w++) r[w*6 +: 6] = {3'(WI_Y[w]), 3'(WI_X[w])};
    return r;
  endfunction
  localparam logic [NUM_TILE*4-1:0] NEAREST_TAB = nearest_table();
  localparam logic [16*6-1:0]       WI_XY_TAB   = wi_xy_table();

  function automatic logic [3:0] nearest_wi(logic [2:0] x, logic [2:0] y);
    logic [5:0] t;
    t = {y, x};
    return NEAREST_TAB[t*4 +: 4];
  endfunction

  function automatic logic [5:0] wi_xy(logic [3:0] w);
    return WI_XY_TAB[w*6 +: 6];
  endfunction

  function automatic logic [2:0] wi_x(logic [3:0] w);
    logic [5:0] v;
    v = wi_xy(w);
    return v[2:0];
  endfunction

  function automatic logic [2:0] wi_y(logic [3:0] w);
    logic [5:0] v;
    v = wi_xy(w);
    return v[5:3];
  endfunction

  function automatic pmask_t onehot_port(int p);
    pmask_t m;
    m = '0;
    m[p] = 1'b1;
    return m;
  endfunction

  // XY routing: X first, then Y, then eject
  function automatic pmask_t route_xy(logic [2:0] cx, logic [2:0] cy,
                                      logic [2:0] tx, logic [2:0] ty);
    if (tx > cx)      return onehot_port(P_E);
    else if (tx < cx) return onehot_port(P_W);
    else if (ty > cy) return onehot_port(P_N);
    else if (ty < cy) return onehot_port(P_S);
    else              return onehot_port(P_L);
  endfunction

  // South-Last routing towards a WI: north first, then X, south last; a
  // packet that has turned south never turns again. At the target the
  // packet leaves through the WI port.
  function automatic pmask_t route_south_last(logic [2:0] cx, logic [2:0] cy,
                                              logic [2:0] tx, logic [2:0] ty);
    if (ty > cy)      return onehot_port(P_N);
    else if (tx > cx) return onehot_port(P_E);
    else if (tx < cx) return onehot_port(P_W);
    else if (ty < cy) return onehot_port(P_S);
    else              return onehot_port(P_WI);
  endfunction

  // XY-tree parent test: is tile (px,py) the parent of (nx,ny) in the XY
  // tree rooted at (wx,wy)?
  function automatic bit xy_parent(int px, int py, int nx, int ny, int wx, int wy);
    int qx, qy;
    if (ny == wy) begin
      qx = (nx > wx) ? nx - 1 : nx + 1;
      qy = ny;
      if (nx == wx) return 1'b0;
    end else begin
      qx = nx;
      qy = (ny > wy) ? ny - 1 : ny + 1;
    end
    return (qx == px) && (qy == py);
  endfunction

  // Distribution-tree outputs at router (cx, cy) for the tree of WI w:
  // every neighbour in w's region whose XY-tree parent is this router, plus
  // local ejection when this router is itself in w's region.
  function automatic pmask_t route_dist(int cx, int cy, int w);
    pmask_t m;
    int wx, wy;
    int nx [5];
    int ny [5];
    m  = '0;
    wx = WI_X[w];
    wy = WI_Y[w];
    nx = '{cx, cx, cx + 1, cx, cx - 1};
    ny = '{cy, cy + 1, cy, cy - 1, cy};
    if (nearest_wi_c(cx, cy) == w) m[P_L] = 1'b1;
    for (int p = 1; p < 5; p++) begin
      if (nx[p] >= 0 && nx[p] < MESH_X && ny[p] >= 0 && ny[p] < MESH_Y)
        if (nearest_wi_c(nx[p], ny[p]) == w &&
            xy_parent(cx, cy, nx[p], ny[p], wx, wy))
          m[p] = 1'b1;
    end
    return m;
  endfunction

  function automatic int unsigned hops(logic [2:0] ax, logic [2:0] ay,
                                       logic [2:0] bx, logic [2:0] by);
    return absdiff(int'(ax), int'(bx)) + absdiff(int'(ay), int'(by));
  endfunction

endpackage
