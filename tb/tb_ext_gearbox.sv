// tb_ext_gearbox: self-checking test of the extractor demultiplexor.
//
// Random packets (1 to 9 words, sop on the first) arrive on the optical side
// with random gaps, and some start in the cycle right after the previous
// packet ends. The expected electrical words are built per packet: words 0+1,
// 2+3, ... (first word in the low half, sop on the packet's first pair), an
// odd last word padded with zeros. The test checks the sequence of 64-bit
// words and that a full pair leaves exactly one cycle after its second half.
module tb_ext_gearbox;
  localparam int unsigned W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W+1:0] o_word;
  logic e_vld, e_sop;
  logic [2*W-1:0] e_data;
  int checks = 0, failures = 0;
  logic [2*W:0] expq[$];     // {sop, data}
  int pair_due[$];           // cycle at which a full pair must appear
  int cyc;

  ext_gearbox #(.W(W)) dut (.*);

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

  // Output monitor.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (e_vld) begin
      logic [2*W:0] exp_w;
      exp_w = (expq.size() > 0) ? expq.pop_front() : '1;
      check({e_sop, e_data} == exp_w, $sformatf("word got %b_%h exp %h", e_sop, e_data, exp_w));
      if (pair_due.size() > 0 && pair_due[0] == cyc) void'(pair_due.pop_front());
    end
    if (pair_due.size() > 0 && pair_due[0] < cyc) begin
      check(0, "full pair late");
      void'(pair_due.pop_front());
    end
  end

  initial begin
    logic [W-1:0] words[$];
    int len;
    cyc = 0;
    o_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      len = $urandom_range(1, 9);
      words.delete();
      for (int i = 0; i < len; i++) words.push_back($urandom);
      for (int i = 0; i < len; i += 2)
        expq.push_back({1'(i == 0), (i + 1 < len) ? words[i+1] : '0, words[i]});
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        o_word = {1'b1, 1'(i == 0), words[i]};
        // second half seen at the next edge (cycle cyc); pair out at cyc + 1
        if (i % 2 == 1) pair_due.push_back(cyc + 1);
      end
      // one packet in three follows the previous one with no idle cycle
      if ($urandom_range(0, 2) != 0) begin
        @(negedge clk);
        o_word = '0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk);
    o_word = '0;
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
