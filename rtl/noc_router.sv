// noc_router -- wormhole router of one mesh tile, with tree replication.
//
// A base router has five ports (local, N, E, S, W); a hybrid router
// (HAS_WI = 1) has a sixth port to its wireless interface. A flit takes four
// pipeline stages per hop, matching the document's four-stage router:
//   1. buffer write  : the flit enters the input port's buffer;
//   2. route compute : a head flit at the buffer front gets its set of
//                      output ports from route_unit (registered);
//   3. switch alloc  : one round-robin pass over the inputs grants a packet
//                      all of its outputs at once, and only if all are free,
//                      so a replicating broadcast never holds half its ports;
//   4. switch travel : the flit is copied into the output register of every
//                      port it owns; the next tile buffers it one cycle later.
// Body flits of a packet that owns its outputs follow at one per cycle. An
// output stays owned from the head flit to the tail flit. Flow control is
// credit based: each output counts the free slots of the buffer behind it,
// and every input returns one credit per flit it removes. The WI port starts
// with WI_CREDITS credits because the WI buffers whole packets.
// Buffer depth, credit flow control and the allocator are this design's
// choices; the document gives the stage count and the flit width.
module noc_router
  import winoc_pkg::*;
#(
  parameter int X          = 0,
  parameter int Y          = 0,
  parameter bit HAS_WI     = 1'b0,
  parameter int BUF_DEPTH  = 4,
  parameter int WI_CREDITS = 64,
  localparam int NP        = HAS_WI ? 6 : 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NP],
  input  flit_t in_flit   [NP],
  output logic  in_credit [NP],    // one flit removed from this input buffer
  output logic  out_valid [NP],
  output flit_t out_flit  [NP],
  input  logic  out_credit[NP]     // one slot freed downstream
);
  localparam int CRW = $clog2(((WI_CREDITS > BUF_DEPTH) ? WI_CREDITS : BUF_DEPTH) + 1);
  localparam int PW  = $clog2(NP);

  typedef enum logic [1:0] {IN_IDLE, IN_ROUTED, IN_ACTIVE} in_state_e;

  flit_t      head   [NP];
  logic       empty  [NP];
  logic       pop    [NP];
  pmask_t     rc_mask[NP];
  pmask_t     route_q[NP];
  in_state_e  st     [NP];

  // ---------------- stage 1: input buffers ----------------
  for (genvar i = 0; i < NP; i++) begin : g_in
    logic unused_full;
    logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push (in_valid[i]),
      .din  (in_flit[i]),
      .pop  (pop[i]),
      .dout (head[i]),
      .empty(empty[i]),
      .full (unused_full),
      .count(unused_count)
    );
    route_unit #(.X(X), .Y(Y)) u_rc (.head(head[i]), .mask(rc_mask[i]));
    assign in_credit[i] = pop[i];
  end

  // ---------------- stage 3: switch allocation ----------------
  logic              locked [NP];
  logic [PW-1:0]     owner  [NP];
  logic [CRW-1:0]    credit [NP];
  logic [PW-1:0]     rr_ptr;
  logic [NP-1:0]     grant;
  logic [PW-1:0]     last_grant;

  always_comb begin
    pmask_t avail;
    avail      = '0;
    grant      = '0;
    last_grant = rr_ptr;
    for (int o = 0; o < NP; o++) avail[o] = !locked[o];
    for (int k = 0; k < NP; k++) begin
      int i;
      i = (int'(rr_ptr) + k) % NP;
      if (st[i] == IN_ROUTED && (route_q[i] & ~avail) == '0) begin
        grant[i]   = 1'b1;
        avail      = avail & ~route_q[i];
        last_grant = PW'(i);
      end
    end
  end

  // ---------------- stage 4: switch traversal ----------------
  logic send [NP];   // input i forwards its front flit this cycle
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      logic ok;
      ok = (st[i] == IN_ACTIVE) && !empty[i];
      for (int o = 0; o < NP; o++)
        if (route_q[i][o] && credit[o] == '0) ok = 1'b0;
      send[i] = ok;
      pop[i]  = ok;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_ptr <= '0;
      for (int i = 0; i < NP; i++) begin
        st[i]      <= IN_IDLE;
        route_q[i] <= '0;
      end
      for (int o = 0; o < NP; o++) begin
        locked[o]    <= 1'b0;
        owner[o]     <= '0;
        credit[o]    <= (HAS_WI && o == P_WI) ? CRW'(WI_CREDITS) : CRW'(BUF_DEPTH);
        out_valid[o] <= 1'b0;
        out_flit[o]  <= '0;
      end
    end else begin
      if (grant != '0) rr_ptr <= (last_grant == PW'(NP - 1)) ? '0 : last_grant + 1'b1;
      for (int i = 0; i < NP; i++) begin
        unique case (st[i])
          IN_IDLE:
            if (!empty[i] && is_head(head[i])) begin
              route_q[i] <= rc_mask[i] & pmask_t'((1 << NP) - 1);
              st[i]      <= IN_ROUTED;
            end
          IN_ROUTED:
            if (grant[i]) st[i] <= IN_ACTIVE;
          IN_ACTIVE:
            if (send[i] && is_last(head[i])) st[i] <= IN_IDLE;
          default: st[i] <= IN_IDLE;
        endcase
      end
      for (int o = 0; o < NP; o++) begin
        logic sent;
        sent = locked[o] && send[owner[o]];
        out_valid[o] <= sent;
        out_flit[o]  <= head[owner[o]];
        credit[o]    <= credit[o] - CRW'(sent) + CRW'(out_credit[o]);
        if (sent && is_last(head[owner[o]])) locked[o] <= 1'b0;
        for (int i = 0; i < NP; i++)
          if (grant[i] && route_q[i][o]) begin
            locked[o] <= 1'b1;
            owner[o]  <= PW'(i);
          end
      end
    end
  end

  for (genvar i = 0; i < NP; i++) begin : g_chk
    a_route_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
      st[i] == IN_ROUTED |-> route_q[i] != '0)
      else $error("noc_router(%0d,%0d): packet with no output port", X, Y);
  end
endmodule
