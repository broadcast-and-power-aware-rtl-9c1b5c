// tb_flit_fifo -- random push/pop against a queue model; checks order,
// empty/full flags and the occupancy count.
module tb_flit_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int D = 5;
  logic push, pop, empty, full;
  logic [31:0] din, dout;
  logic [2:0] count;
  flit_fifo #(.WIDTH(32), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [$];
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == D) || int'(count) != model.size()) begin
        failures++;
        $display("FAIL flags size=%0d empty=%0b full=%0b count=%0d", model.size(), empty, full, count);
      end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("FAIL data %h != %h", dout, model[0]); end
      end
      push = ($urandom_range(0, 99) < 55) && (model.size() < D || 1'b0);
      pop  = $urandom_range(0, 99) < 45;
      din  = $urandom;
      // a push into a full buffer only when a pop frees a slot
      if (model.size() == D && !pop) push = 0;
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
