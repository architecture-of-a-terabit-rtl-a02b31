// tb_extractor_arbiter: self-checking test of the extractor arbiter.
//
// Random request and busy patterns are applied; the expected grant is
// computed with a different method: the free extractors, in ascending
// order, are paired with the requesting channels in ascending order until
// one of the two lists runs out.
module tb_extractor_arbiter;
  localparam int unsigned C = 16, NE = 2;

  logic [C-1:0] req;
  logic [NE-1:0] busy;
  logic [C-1:0][NE-1:0] grant, exp_g;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  extractor_arbiter #(.C(C), .NE(NE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int reqs[$], frees[$];
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req  = (t < 20) ? C'(t) : C'($urandom) & C'($urandom);
      busy = NE'($urandom);
      #1;
      reqs.delete(); frees.delete();
      for (int c = 0; c < C; c++) if (req[c]) reqs.push_back(c);
      for (int e = 0; e < NE; e++) if (!busy[e]) frees.push_back(e);
      exp_g = '0;
      while (reqs.size() > 0 && frees.size() > 0) exp_g[reqs.pop_front()][frees.pop_front()] = 1'b1;
      checks++;
      if (grant !== exp_g) begin
        failures++;
        $display("FAIL req=%h busy=%b grant=%h exp=%h", req, busy, grant, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
