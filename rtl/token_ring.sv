// token_ring -- token passing with round-robin order for the shared
// wireless channel.
//
// One token visits the N wireless interfaces in index order. The WI that
// holds the token may transmit: if it requests, it is granted and keeps the
// token until it signals done (end of its frame); otherwise the token moves
// to the next WI after one cycle. Only one WI can therefore be on air at a
// time, so a broadcast owns the whole channel. The document gives the token
// passing and its round-robin order; the one-cycle hop is this design's.
// Interface: req[i] is held while WI i has a frame ready; grant[i] is high
// from the cycle the token is taken until the cycle after done[i].
module token_ring #(
  parameter int N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] done,
  output logic [N-1:0] grant
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] tok;
  logic          busy;

  function automatic logic [IW-1:0] next_tok(logic [IW-1:0] t);
    return (t == IW'(N - 1)) ? '0 : t + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok  <= '0;
      busy <= 1'b0;
    end else if (busy) begin
      if (done[tok]) begin
        busy <= 1'b0;
        tok  <= next_tok(tok);
      end
    end else if (req[tok]) begin
      busy <= 1'b1;
    end else begin
      tok <= next_tok(tok);
    end
  end

  always_comb begin
    grant = '0;
    grant[tok] = busy;
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
