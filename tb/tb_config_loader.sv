// tb_config_loader: self-checking test of the configuration loader.
//
// Several downloads of NCH random bytes are sent, one byte per cycle, with
// occasional idle cycles and a few extra bytes after each download. Each
// byte must appear on wr_data with the one-hot write strobe of its channel
// one cycle later; extra bytes write nothing. done must rise with the last
// channel's write, so a full download of NCH channels takes NCH cycles.
module tb_config_loader;
  localparam int unsigned NCH = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_vld, cfg_first, done;
  logic [7:0] cfg_byte, wr_data;
  logic [NCH-1:0] wr_en;
  int checks = 0, failures = 0;

  config_loader #(.NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    cfg_vld = 0; cfg_first = 0; cfg_byte = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 20; d++) begin
      int ch;
      int cycles;
      bit gaps;
      ch = 0;
      cycles = 0;
      gaps = (d % 2 == 1);
      while (ch < NCH + 3) begin
        @(negedge clk);
        cycles++;
        if (gaps && $urandom_range(0, 3) == 0) begin
          cfg_vld = 0;
          @(negedge clk);
          check(wr_en == '0, "no write when idle");
          continue;
        end
        cfg_vld = 1; cfg_first = (ch == 0); cfg_byte = 8'($urandom);
        @(negedge clk);
        cfg_vld = 0;
        #1;
        if (ch < NCH) begin
          check(wr_en == (NCH'(1) << ch), $sformatf("strobe for channel %0d: %h", ch, wr_en));
          check(wr_data == cfg_byte, "write data");
          check(done == (ch == NCH - 1) || (ch < NCH - 1 && !done), "done flag");
        end else begin
          check(wr_en == '0, "bytes after the last channel ignored");
        end
        ch++;
      end
    end
    // Back-to-back bytes: NCH bytes in NCH cycles.
    @(negedge clk);
    t0 = 0;
    for (int ch = 0; ch < NCH; ch++) begin
      cfg_vld = 1; cfg_first = (ch == 0); cfg_byte = 8'(ch);
      @(negedge clk);
      t0++;
      check(wr_en == (NCH'(1) << ch) && wr_data == 8'(ch), "back-to-back write");
    end
    cfg_vld = 0;
    check(done && t0 == NCH, "full download in NCH cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
