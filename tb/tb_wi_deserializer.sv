// tb_wi_deserializer -- sends frames built by the testbench (carrier,
// PRE_CYC preamble cycles, flits as LANE_W-bit symbols, LSB first) and
// checks every recovered flit and the cycle it appears in; a frame cut short
// inside a flit must not produce that flit.
module tb_wi_deserializer;
  import winoc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  localparam int L = 4, PRE = 7, SYMS = 32 / L;
  logic carrier, flit_valid;
  logic [L-1:0] rx_sym;
  flit_t flit;
  wi_deserializer #(.LANE_W(L), .PRE_CYC(PRE)) dut (.*);

  int checks = 0, failures = 0;
  flit_t exp_q [$];
  int exp_t [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (flit_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected flit %h", flit); end
    else begin
      automatic flit_t e = exp_q.pop_front();
      automatic int t = exp_t.pop_front();
      if (flit != e || cyc != t) begin failures++; $display("FAIL flit %h@%0d exp %h@%0d", flit, cyc, e, t); end
    end
  end
  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    carrier = 0; rx_sym = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int fr = 0; fr < 8; fr++) begin
      automatic int n = int'($urandom_range(1, 6));
      automatic bit cut = (fr == 7);
      carrier = 1;
      repeat (PRE) @(negedge clk);
      for (int i = 0; i < n; i++) begin
        automatic flit_t f = $urandom;
        for (int s = 0; s < SYMS; s++) begin
          rx_sym = f[s*L +: L];
          if (cut && i == n - 1 && s == SYMS / 2) break;
          @(negedge clk);
        end
        if (!(cut && i == n - 1)) begin
          exp_q.push_back(f);
          exp_t.push_back(cyc);
        end
      end
      carrier = 0; rx_sym = '0;
      repeat (int'($urandom_range(1, 5))) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d flits missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
