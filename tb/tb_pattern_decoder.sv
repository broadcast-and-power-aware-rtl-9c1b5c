// tb_pattern_decoder -- exhaustive over WI address, routing mode, leg and
// flit type: checks acceptance and the rewritten header.
module tb_pattern_decoder;
  import winoc_pkg::*;
  localparam int ID = 6;
  flit_t hdr, hdr_out;
  logic match_uni, match_bcast, accept;
  pattern_decoder #(.MY_ID(ID)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int a = 0; a < 16; a++)
      for (int m = 0; m < 4; m++)
        for (int l = 0; l < 2; l++)
          for (int ft = 0; ft < 4; ft++) begin
            logic [31:0] f, e;
            bit exp_acc;
            f = $urandom;
            f[31:30] = 2'(ft); f[29:28] = 2'(m); f[15:12] = 4'(a); f[11] = 1'(l);
            hdr = f;
            #1;
            exp_acc = (ft == 1 || ft == 3) && ((m == 1 && l == 0 && a == ID) || (m == 2 && a == 15));
            checks++;
            if (accept != exp_acc || match_uni != (a == ID) || match_bcast != (a == 15)) begin
              failures++;
              $display("FAIL a=%0d m=%0d l=%0d ft=%0d accept=%0b", a, m, l, ft, accept);
            end
            e = f;
            if (m == 2) begin e[29:28] = 2'b11; e[15:12] = 4'(ID); end
            else e[11] = 1'b1;
            if (exp_acc) begin
              checks++;
              if (hdr_out != e) begin failures++; $display("FAIL rewrite %h -> %h exp %h", f, hdr_out, e); end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
