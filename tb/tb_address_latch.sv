// tb_address_latch: self-checking test of the bit-serial PCB address latch.
//
// Random addresses are shifted in most significant bit first, with idle
// cycles mixed in; the latched address must not change while shifting and
// must equal the shifted value after the load pulse.
module tb_address_latch;
  localparam int unsigned A = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, sdi, load;
  logic [A-1:0] addr;
  int checks = 0, failures = 0;

  address_latch #(.A(A)) dut (.*);

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
    logic [A-1:0] val, prev;
    shift = 0; sdi = 0; load = 0;
    repeat (2) @(posedge clk);
    #1;
    check(addr == '0, "reset value");
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 50; t++) begin
      val = A'($urandom);
      for (int b = A - 1; b >= 0; b--) begin
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); shift = 0; sdi = ~val[b];
        end
        @(negedge clk);
        shift = 1; sdi = val[b];
        #1;
        check(addr == prev, "address steady while shifting");
      end
      @(negedge clk); shift = 0; load = 1;
      @(negedge clk); load = 0;
      #1;
      check(addr == val, $sformatf("loaded %h exp %h", addr, val));
      prev = val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
