// wi_serializer -- transmit buffer and serializer of a WI.
//
// Flits from the router are stored in a buffer of DEPTH flits (at least one
// full packet). Once a whole packet is buffered, pkt_ready rises and the WI
// asks for the token. On start the serializer keys the carrier for PRE_CYC
// preamble cycles, which lets sleeping receivers wake up, and then sends the
// packet's flits back to back, LANE_W bits per cycle, least significant
// bits first, so one flit takes 32/LANE_W cycles. done pulses with the last
// symbol of the tail flit; the carrier drops in the next cycle. tap_valid
// and tap_flit show each flit as it starts on air. in_credit returns one
// credit to the router per flit that leaves the buffer.
// The document names the serializer buffer; store-and-forward, the preamble
// and the lane width are this design's choices.
module wi_serializer
  import winoc_pkg::*;
#(
  parameter int LANE_W  = 4,
  parameter int PRE_CYC = 10,
  parameter int DEPTH   = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_credit,
  output logic              pkt_ready,
  input  logic              start,
  output logic              done,
  output logic              tx_carrier,
  output logic [LANE_W-1:0] tx_sym,
  output logic              tap_valid,
  output flit_t             tap_flit
);
  localparam int SYMS = FLIT_W / LANE_W;
  localparam int CNTW = $clog2(((SYMS > PRE_CYC) ? SYMS : PRE_CYC) + 1);
  localparam int TW   = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA} st_e;
  st_e         st;
  logic [CNTW-1:0] cnt;
  flit_t       sh;
  logic        cur_last;
  logic [TW-1:0] tails;

  flit_t fifo_dout;
  logic  fifo_empty, fifo_pop;
  logic  unused_full;
  logic [TW-1:0] unused_count;

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .push (in_valid), .din(in_flit),
    .pop  (fifo_pop), .dout(fifo_dout),
    .empty(fifo_empty), .full(unused_full), .count(unused_count)
  );

  logic load;
  assign load = (st == S_PRE  && cnt == CNTW'(PRE_CYC - 1)) ||
                (st == S_DATA && cnt == CNTW'(SYMS - 1) && !cur_last);
  assign fifo_pop  = load;
  assign in_credit = load;
  assign tap_valid = load;
  assign tap_flit  = fifo_dout;
  assign pkt_ready = (tails != '0) && (st == S_IDLE);
  assign done      = (st == S_DATA) && cnt == CNTW'(SYMS - 1) && cur_last;
  assign tx_carrier = (st != S_IDLE);
  assign tx_sym     = (st == S_DATA) ? sh[LANE_W-1:0] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      cnt      <= '0;
      sh       <= '0;
      cur_last <= 1'b0;
      tails    <= '0;
    end else begin
      tails <= tails + TW'(in_valid && is_last(in_flit)) - TW'(load && is_last(fifo_dout));
      unique case (st)
        S_IDLE:
          if (start) begin
            st  <= S_PRE;
            cnt <= '0;
          end
        S_PRE:
          if (load) begin
            st <= S_DATA;
            cnt <= '0;
            sh <= fifo_dout;
            cur_last <= is_last(fifo_dout);
          end else cnt <= cnt + 1'b1;
        S_DATA:
          if (done) begin
            st <= S_IDLE;
            cnt <= '0;
          end else if (load) begin
            cnt <= '0;
            sh <= fifo_dout;
            cur_last <= is_last(fifo_dout);
          end else begin
            cnt <= cnt + 1'b1;
            sh  <= sh >> LANE_W;
          end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> !fifo_empty)
    else $error("wi_serializer: buffer ran empty inside a packet");
endmodule
