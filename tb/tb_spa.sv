// tb_spa: self-checking test of a smart pixel array from its pins.
//
// The PCB address is shifted in bit-serially and every channel's control
// word is downloaded one byte per cycle. Optical channel 0 is set to
// transmit electrical injector 0, and the testbench loops optical output 0
// back into optical input 1, which filters by address and extracts onto
// slice 0's extractors. Packets of 64-bit words, some addressed to this PCB
// and some not, are injected: the addressed ones must come back out of
// electrical extractor 0 word for word, 3 cycles after each word is
// accepted; the others must not appear. In slice 1, optical channel C+1 is
// statically extracted onto slice 1's extractor 1 (global extractor 3);
// random framed words on it must arrive there in pairs.
module tb_spa;
  import hp_pkg::*;
  localparam int unsigned S = 2, C = 4, NI = 2, NE = 2, W = 16, A = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [S*C-1:0][W+1:0] opt_in, opt_out;
  logic [S*NI-1:0] inj_vld, inj_sop, inj_rdy;
  logic [S*NI-1:0][2*W-1:0] inj_data;
  logic [S*NE-1:0] ext_vld, ext_sop;
  logic [S*NE-1:0][2*W-1:0] ext_data;
  logic cfg_vld, cfg_first, cfg_done, addr_shift, addr_sdi, addr_load;
  logic [7:0] cfg_byte;
  logic [S*C-1:0] receiving, rx_drop;
  logic [W+1:0] side_in;
  int checks = 0, failures = 0;
  int cyc = 0;
  localparam logic [A-1:0] MY_ADDR = 8'b0010_0000;

  spa #(.S(S), .C(C), .NI(NI), .NE(NE), .W(W), .A(A)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // loop optical channel 0 back into channel 1
  always_comb begin
    opt_in = '0;
    opt_in[1] = opt_out[0];
    opt_in[C + 1] = side_in;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected electrical words on extractor 0 and their due cycles
  logic [2*W:0] exp0[$];
  int due0[$];
  logic [2*W:0] exp3[$];
  int n_rx0 = 0, n_rx3 = 0;

  always @(posedge clk) if (rst_n) begin
    if (ext_vld[0]) begin
      logic [2*W:0] e;
      e = (exp0.size() > 0) ? exp0.pop_front() : '1;
      check({ext_sop[0], ext_data[0]} == e, $sformatf("ext0 got %h exp %h", ext_data[0], e));
      if (due0.size() > 0) begin
        int dd;
        dd = due0.pop_front();
        check(dd == cyc, $sformatf("ext0 latency due %0d now %0d", dd, cyc));
      end
      n_rx0++;
    end
    if (ext_vld[3]) begin
      logic [2*W:0] e;
      e = (exp3.size() > 0) ? exp3.pop_front() : '1;
      check({ext_sop[3], ext_data[3]} == e, $sformatf("ext3 got %h exp %h", ext_data[3], e));
      n_rx3++;
    end
    check(!ext_vld[1] && !ext_vld[2], "unused extractors idle");
  end

  initial begin
    ccu_cfg_t cw [S*C];
    inj_vld = '0; inj_sop = '0; inj_data = '0; cfg_vld = 0; cfg_first = 0; cfg_byte = '0;
    addr_shift = 0; addr_sdi = 0; addr_load = 0; side_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // address, MSB first
    for (int b = A - 1; b >= 0; b--) begin
      @(negedge clk); addr_shift = 1; addr_sdi = MY_ADDR[b];
    end
    @(negedge clk); addr_shift = 0; addr_load = 1;
    @(negedge clk); addr_load = 0;
    // control words
    for (int j = 0; j < S * C; j++) cw[j] = '0;
    cw[0].exp_sel = 2'd1;                 // transmit injector 0
    cw[1].filter  = 1'b1;                 // intelligent receive
    cw[C + 1].conc_en = 3'b010;           // static receive on slice 1 extractor 1
    cw[C + 1].dly = 2'd2;
    for (int j = 0; j < S * C; j++) begin
      @(negedge clk); cfg_vld = 1; cfg_first = (j == 0); cfg_byte = cw[j];
    end
    @(negedge clk); cfg_vld = 0;
    @(negedge clk);
    check(cfg_done, "configuration complete");
    // packets
    for (int p = 0; p < 40; p++) begin
      int len;
      bit mine;
      len = $urandom_range(1, 5);
      mine = (p % 3 != 2);
      for (int i = 0; i < len; i++) begin
        logic [2*W-1:0] d;
        d = {$urandom, $urandom};
        if (i == 0) d[A-1:0] = mine ? (MY_ADDR | 8'h01) : 8'h02;
        @(negedge clk);
        inj_vld[0] = 1; inj_sop[0] = (i == 0); inj_data[0] = d;
        side_in = {1'b1, 1'($urandom), W'($urandom)};
        #1;
        while (!inj_rdy[0]) begin
          @(negedge clk);
          side_in = '0;
        end
        if (mine) begin
          exp0.push_back({1'(i == 0), d});
          // out 3 edges after the accepting edge, seen by the monitor one edge later
          due0.push_back(cyc + 4);
        end
      end
      @(negedge clk);
      inj_vld[0] = 0;
      side_in = '0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(exp0.size() == 0 && n_rx0 > 0, "all addressed packets extracted");
    check(n_rx3 > 0, "static extraction seen");
    $display("extracted words: intelligent=%0d static=%0d", n_rx0, n_rx3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Static channel: words are paired by the demultiplexor; rebuild the pairs.
  logic [W-1:0] lo3;
  bit have3 = 0, sop3 = 0;
  logic [W+1:0] d1 = '0, d2 = '0, d3 = '0;
  always @(posedge clk) if (rst_n) begin
    // static channel sees side_in after 1 + dly = 3 cycles
    d1 <= side_in; d2 <= d1; d3 <= d2;
    if (d3[W+1]) begin
      if (have3 && !d3[W]) begin
        exp3.push_back({sop3, d3[W-1:0], lo3}); have3 = 0;
      end else begin
        if (have3) exp3.push_back({sop3, {W{1'b0}}, lo3});
        have3 = 1; sop3 = d3[W]; lo3 = d3[W-1:0];
      end
    end else if (have3) begin
      exp3.push_back({sop3, {W{1'b0}}, lo3}); have3 = 0;
    end
  end
endmodule
