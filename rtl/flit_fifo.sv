// flit_fifo -- synchronous first-in first-out flit buffer.
//
// Used as the router input buffers and as the serializer and deserializer
// buffers of the wireless interface. DEPTH entries of WIDTH bits, held in a
// register array with wrapping read and write pointers and an occupancy
// counter. Push and pop may happen in the same cycle. dout shows the oldest
// entry whenever empty is low (first-word fall-through), so a reader sees a
// pushed word one cycle after the push. A push into a full buffer is a
// protocol error and is flagged by an assertion; the word is dropped.
// The document only names these buffers; depth and organisation are this
// design's choice.
module flit_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= next_ptr(wp);
      if (do_pop)  rp <= next_ptr(rp);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("flit_fifo: push into full buffer");
endmodule
