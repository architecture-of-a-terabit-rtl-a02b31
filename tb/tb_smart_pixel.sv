// tb_smart_pixel: self-checking test of one column of smart pixels.
//
// Random optical words enter every cycle while the delay, expander select,
// concentrator enables and address change at random. A history of the
// inputs gives the expected delayed word (input of 1 + dly cycles ago); from
// it the test predicts the optical output of each pixel state (transparent,
// transmitting an injector word), the extractor drives and the address hits.
module tb_smart_pixel;
  localparam int unsigned W = 8, NI = 2, NE = 2, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] opt_in, opt_out, dly_out, addr, addr_hit;
  logic [1:0] dly, exp_sel;
  logic [NE-1:0] conc_en;
  logic [NI-1:0][W-1:0] inj;
  logic [NE-1:0][W-1:0] ext_drv;
  logic [W-1:0] hist [0:D];
  int checks = 0, failures = 0;

  smart_pixel #(.W(W), .NI(NI), .NE(NE), .DLY_STAGES(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_d, exp_o;
    opt_in = '0; dly = '0; exp_sel = '0; conc_en = '0; inj = '0; addr = '0;
    for (int i = 0; i <= D; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      // hist[i] = input applied i+1 edges ago
      opt_in  = W'($urandom);
      dly     = 2'($urandom);
      exp_sel = 2'($urandom_range(0, NI));
      conc_en = NE'($urandom);
      inj[0]  = W'($urandom);
      inj[1]  = W'($urandom);
      addr    = W'($urandom);
      #1;
      if (cyc >= D) begin
        exp_d = hist[dly];
        check(dly_out == exp_d, $sformatf("delay %0d: got %h exp %h", dly, dly_out, exp_d));
        exp_o = (exp_sel == 0) ? exp_d : inj[exp_sel - 1];
        check(opt_out == exp_o, $sformatf("expander sel %0d: got %h exp %h", exp_sel, opt_out, exp_o));
        for (int e = 0; e < NE; e++)
          check(ext_drv[e] == (conc_en[e] ? exp_d : '0), $sformatf("concentrator %0d", e));
        check(addr_hit == (exp_d & addr), "address comparator");
      end
      @(posedge clk);
      for (int i = D; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = opt_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
