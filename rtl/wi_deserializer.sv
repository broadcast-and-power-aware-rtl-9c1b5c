// wi_deserializer -- receive deserializer of a WI.
//
// Frames are recovered from the carrier alone: the comparator's carrier
// detect marks the start of a frame, the first PRE_CYC cycles are preamble,
// and from then on every 32/LANE_W cycles of LANE_W-bit symbols (least
// significant bits first) make one flit, presented for one cycle on
// flit_valid/flit. A frame ends when the carrier drops; a partial flit is
// discarded. The buffer that follows sits in the wireless interface.
// The document names the deserializer; framing by preamble length and the
// lane width are this design's choices and must match wi_serializer.
module wi_deserializer
  import winoc_pkg::*;
#(
  parameter int LANE_W  = 4,
  parameter int PRE_CYC = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              carrier,
  input  logic [LANE_W-1:0] rx_sym,
  output logic              flit_valid,
  output flit_t             flit
);
  localparam int SYMS = FLIT_W / LANE_W;
  localparam int CNTW = $clog2(((SYMS > PRE_CYC) ? SYMS : PRE_CYC) + 1);

  typedef enum logic [1:0] {D_IDLE, D_PRE, D_DATA} st_e;
  st_e             st;
  logic [CNTW-1:0] cnt;
  flit_t           sh;
  flit_t           sh_next;

  assign sh_next = {rx_sym, sh[FLIT_W-1:LANE_W]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= D_IDLE;
      cnt        <= '0;
      sh         <= '0;
      flit_valid <= 1'b0;
      flit       <= '0;
    end else begin
      flit_valid <= 1'b0;
      unique case (st)
        D_IDLE:
          if (carrier) begin
            st  <= (PRE_CYC > 1) ? D_PRE : D_DATA;
            cnt <= CNTW'(1);
            if (PRE_CYC <= 1) cnt <= '0;
          end
        D_PRE:
          if (!carrier) st <= D_IDLE;
          else if (cnt == CNTW'(PRE_CYC - 1)) begin
            st  <= D_DATA;
            cnt <= '0;
          end else cnt <= cnt + 1'b1;
        D_DATA:
          if (!carrier) st <= D_IDLE;
          else begin
            sh <= sh_next;
            if (cnt == CNTW'(SYMS - 1)) begin
              cnt        <= '0;
              flit_valid <= 1'b1;
              flit       <= sh_next;
            end else cnt <= cnt + 1'b1;
          end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
