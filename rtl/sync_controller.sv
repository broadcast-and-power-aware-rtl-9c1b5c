// sync_controller -- barrier synchronization controller of one tile.
//
// Each barrier b has a master tile, MASTERS[6*b +: 6] (tile index y*8+x).
// The master's barrier control register counts arrivals: its own core's
// arrival and one ARRIVE message from every other participant. When the
// count reaches NUM_PART the register clears and a single RELEASE message is
// sent as a broadcast, instead of one unicast per waiting core. A
// non-master core's arrival sends one ARRIVE message to the master. A core
// that has arrived waits (waiting[b] = 1) until a RELEASE for b is
// received; release pulses with its barrier id.
// Interface: core side (arrive/arrive_id, release/release_id, waiting);
// towards the network interface a valid/ready request (req_*) for a message
// to send, and rx_* events for barrier messages received.
// The document gives the counting register, the release flag and the
// broadcast release; message encoding, the master placement and the order
// in which pending messages are sent are this design's choices.
module sync_controller
  import winoc_pkg::*;
#(
  parameter int X        = 0,
  parameter int Y        = 0,
  parameter int NUM_BAR  = 4,
  parameter int NUM_PART = 64,
  parameter logic [47:0] MASTERS = {6'd27, 6'd27, 6'd27, 6'd27, 6'd35, 6'd28, 6'd36, 6'd27}
) (
  input  logic       clk,
  input  logic       rst_n,
  // core
  input  logic       arrive,
  input  logic [2:0] arrive_id,
  output logic       release_o,
  output logic [2:0] release_id,
  output logic [NUM_BAR-1:0] waiting,
  // requests to the network interface
  output logic       req_valid,
  input  logic       req_ready,
  output msg_e       req_msg,
  output logic [2:0] req_bar,
  output logic [2:0] req_dst_x,
  output logic [2:0] req_dst_y,
  // barrier messages received
  input  logic       rx_valid,
  input  msg_e       rx_msg,
  input  logic [2:0] rx_bar
);
  localparam int CNTW = $clog2(NUM_PART + 1);
  localparam logic [5:0] ME = 6'(Y * MESH_X + X);

  function automatic logic [5:0] master_of(int b);
    return MASTERS[6*b +: 6];
  endfunction

  logic [CNTW-1:0]    count    [NUM_BAR];
  logic [NUM_BAR-1:0] pend_arr, pend_rel;

  // choose the message to offer: releases first, lowest barrier first
  always_comb begin
    req_valid = 1'b0;
    req_msg   = MSG_BAR_ARRIVE;
    req_bar   = '0;
    for (int b = NUM_BAR - 1; b >= 0; b--)
      if (pend_arr[b]) begin
        req_valid = 1'b1;
        req_msg   = MSG_BAR_ARRIVE;
        req_bar   = 3'(b);
      end
    for (int b = NUM_BAR - 1; b >= 0; b--)
      if (pend_rel[b]) begin
        req_valid = 1'b1;
        req_msg   = MSG_BAR_RELEASE;
        req_bar   = 3'(b);
      end
    req_dst_x = master_of(int'(req_bar))[2:0];
    req_dst_y = master_of(int'(req_bar))[5:3];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_arr   <= '0;
      pend_rel   <= '0;
      waiting    <= '0;
      release_o  <= 1'b0;
      release_id <= '0;
      for (int b = 0; b < NUM_BAR; b++) count[b] <= '0;
    end else begin
      release_o <= 1'b0;
      for (int b = 0; b < NUM_BAR; b++) begin
        logic is_master;
        logic [CNTW:0] inc, sum;
        if (req_valid && req_ready && req_bar == 3'(b)) begin
          if (req_msg == MSG_BAR_RELEASE) pend_rel[b] <= 1'b0;
          else                            pend_arr[b] <= 1'b0;
        end
        is_master = (master_of(b) == ME);
        inc = '0;
        if (arrive && arrive_id == 3'(b)) begin
          waiting[b] <= 1'b1;
          if (is_master) inc = inc + 1'b1;
          else           pend_arr[b] <= 1'b1;
        end
        if (is_master && rx_valid && rx_msg == MSG_BAR_ARRIVE && rx_bar == 3'(b))
          inc = inc + 1'b1;
        sum = {1'b0, count[b]} + inc;
        if (sum >= (CNTW+1)'(NUM_PART)) begin
          count[b]    <= CNTW'(sum - (CNTW+1)'(NUM_PART));
          pend_rel[b] <= 1'b1;
        end else begin
          count[b] <= CNTW'(sum);
        end
        if (rx_valid && rx_msg == MSG_BAR_RELEASE && rx_bar == 3'(b)) begin
          waiting[b] <= 1'b0;
          release_o  <= 1'b1;
          release_id <= 3'(b);
        end
      end
    end
  end
endmodule
