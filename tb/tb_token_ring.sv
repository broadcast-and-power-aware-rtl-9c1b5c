// tb_token_ring -- random requests and frame lengths; checks that at most
// one WI holds the grant, that grants follow round-robin order from the
// token position, that an idle token advances one WI per cycle, and that a
// grant lasts until done.
module tb_token_ring;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int N = 5;
  logic [N-1:0] req, done, grant;
  token_ring #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int tok_model = 0;        // reference token position
  bit busy_model = 0;
  int remaining [N];
  int grants [N];
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    req = 0; done = 0;
    for (int i = 0; i < N; i++) begin remaining[i] = 0; grants[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      if (c != 0) @(negedge clk);
      // compare the grant with the model
      checks++;
      if (grant != (busy_model ? N'(1) << tok_model : '0)) begin
        failures++;
        $display("FAIL cycle %0d grant=%b model tok=%0d busy=%0b", c, grant, tok_model, busy_model);
      end
      // new random requests; a granted WI finishes after a random time
      for (int i = 0; i < N; i++) begin
        if (!req[i] && $urandom_range(0, 99) < 5) begin
          req[i] = 1; remaining[i] = int'($urandom_range(1, 12));
        end
      end
      done = '0;
      if (busy_model) begin
        remaining[tok_model]--;
        if (remaining[tok_model] == 0) done[tok_model] = 1;
      end
      @(posedge clk);
      // model update at the clock edge
      if (busy_model) begin
        if (done[tok_model]) begin
          req[tok_model] <= 0;
          busy_model = 0;
          grants[tok_model]++;
          tok_model = (tok_model + 1) % N;
        end
      end else if (req[tok_model]) busy_model = 1;
      else tok_model = (tok_model + 1) % N;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (grants[i] == 0) begin failures++; $display("FAIL WI %0d never granted", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
