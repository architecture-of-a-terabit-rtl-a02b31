// tb_inj_gearbox: self-checking test of the injector multiplexor.
//
// A source offers random 64-bit words with random valid; every accepted word
// (e_vld & e_rdy) is queued as its two expected 32-bit halves. The optical
// side must show the low half (with the word's sop) on the cycle after the
// accept and the high half on the next, and nothing framed otherwise. Under
// a continuous offer the gearbox must accept exactly every second cycle,
// which is the 2:1 rate of the electrical and optical clocks.
module tb_inj_gearbox;
  localparam int unsigned W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic e_vld, e_sop, e_rdy;
  logic [2*W-1:0] e_data;
  logic [W+1:0] o_word;
  int checks = 0, failures = 0;

  inj_gearbox #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+1:0] expq[$];
    logic [W+1:0] exp_w;
    int accepts;
    accepts = 0;
    e_vld = 0; e_sop = 0; e_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // output produced by the previous edge
      exp_w = (expq.size() > 0) ? expq.pop_front() : '0;
      check(o_word == exp_w, $sformatf("t=%0d got %h exp %h", t, o_word, exp_w));
      e_vld  = (t >= 2000) ? 1'b1 : 1'($urandom_range(0, 1));
      e_sop  = 1'($urandom);
      e_data = {$urandom, $urandom};
      #1;
      if (e_vld && e_rdy) begin
        // low half next, high half after; an empty slot keeps the queue aligned
        if (expq.size() == 0) begin
          expq.push_back({1'b1, e_sop, e_data[W-1:0]});
          expq.push_back({1'b1, 1'b0, e_data[2*W-1:W]});
        end else begin
          failures++;
          $display("FAIL accepted while sending a high half");
        end
      end
      if (t >= 2002) accepts += (e_vld && e_rdy) ? 1 : 0;
    end
    check(accepts == 499, $sformatf("full-rate accepts %0d of 998 cycles", accepts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
