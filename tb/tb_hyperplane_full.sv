// tb_hyperplane_full: one complete operation of the backplane at full size.
//
// The default backplane: 16 PCBs, two streams, two conservative arrays per
// PCB per stream (64 optical channels of 32 bits per stream). The testbench
// loads the one-hot address of every PCB, downloads all 32 control words
// of all 64 arrays (in parallel, 32 cycles), and embeds one broadcast
// channel per stream: downstream channel 0 owned by PCB 0 and upstream
// channel 63 (array 1, slice 1, row 15) owned by PCB 15, every other PCB
// filtering by address. PCB 0 multicasts a packet to PCBs 5 and 15; PCB 15
// sends one to PCB 0. Each addressed PCB must deliver the packet word for
// word on the right extractor, and no other PCB may deliver anything.
module tb_hyperplane_full;
  import hp_pkg::*;
  localparam int unsigned N = N_PCB, SP = SPAS_PCB, S = S_SPA, C = C_SLC,
                          NI = I_SLC, NE = E_SLC, W = W_OPT, A = A_BITS;
  localparam int unsigned NCH = S * C;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0][N-1:0][SP-1:0][S*NI-1:0]          inj_vld, inj_sop, inj_rdy;
  logic [1:0][N-1:0][SP-1:0][S*NI-1:0][2*W-1:0] inj_data;
  logic [1:0][N-1:0][SP-1:0][S*NE-1:0]          ext_vld, ext_sop;
  logic [1:0][N-1:0][SP-1:0][S*NE-1:0][2*W-1:0] ext_data;
  logic [1:0][N-1:0][SP-1:0]                    cfg_vld, cfg_first, cfg_done;
  logic [1:0][N-1:0][SP-1:0][7:0]               cfg_byte;
  logic [N-1:0]                                 addr_shift, addr_sdi, addr_load;
  logic [1:0][N-1:0][SP-1:0][NCH-1:0]           receiving, rx_drop;
  int checks = 0, failures = 0;

  hyperplane dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [2*W:0] ew_t;
  ew_t rxq [2][N][SP][S*NE][$];
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < N; k++)
        for (int m = 0; m < SP; m++)
          for (int e = 0; e < S * NE; e++)
            if (ext_vld[d][k][m][e]) rxq[d][k][m][e].push_back({ext_sop[d][k][m][e], ext_data[d][k][m][e]});

  task automatic send(input int d, input int k, input int m, input int i, input ew_t p[$]);
    foreach (p[n]) begin
      @(negedge clk);
      inj_vld[d][k][m][i] = 1'b1; inj_sop[d][k][m][i] = p[n][2*W]; inj_data[d][k][m][i] = p[n][2*W-1:0];
      #1;
      while (!inj_rdy[d][k][m][i]) @(negedge clk);
    end
    @(negedge clk);
    inj_vld[d][k][m][i] = 1'b0;
  endtask

  function automatic bit same(input ew_t a[$], input ew_t b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[n]) if (a[n] != b[n]) return 0;
    return 1;
  endfunction

  initial begin
    ccu_cfg_t cw [2][SP][NCH];
    ew_t pd[$], pu[$];
    int t0, others;
    inj_vld = '0; inj_sop = '0; inj_data = '0; cfg_vld = '0; cfg_first = '0; cfg_byte = '0;
    addr_shift = '0; addr_sdi = '0; addr_load = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = A - 1; b >= 0; b--) begin
      @(negedge clk);
      addr_shift = '1;
      for (int k = 0; k < N; k++) addr_sdi[k] = (b == k);
    end
    @(negedge clk); addr_shift = '0; addr_load = '1;
    @(negedge clk); addr_load = '0;
    // channel 0 of array 0 (downstream), channel 31 of array 1 (upstream)
    t0 = $time;
    for (int j = 0; j < NCH; j++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < N; k++)
          for (int m = 0; m < SP; m++) begin
            ccu_cfg_t v;
            v = '0;
            if (d == 0 && m == 0 && j == 0) begin
              if (k == 0) v.exp_sel = 2'd1; else v.filter = 1'b1;
            end
            if (d == 1 && m == 1 && j == NCH - 1) begin
              if (k == N - 1) v.exp_sel = 2'd1; else v.filter = 1'b1;
            end
            cfg_vld[d][k][m] = 1'b1; cfg_first[d][k][m] = (j == 0); cfg_byte[d][k][m] = v;
          end
    end
    @(negedge clk);
    cfg_vld = '0;
    @(negedge clk);
    check(&cfg_done, "all 64 arrays configured");
    for (int i = 0; i < 6; i++) begin
      logic [2*W-1:0] w;
      w = {$urandom, $urandom};
      if (i == 0) w[A-1:0] = 16'b1000_0000_0010_0000;
      pd.push_back({1'(i == 0), w});
      w = {$urandom, $urandom};
      if (i == 0) w[A-1:0] = 16'h0001;
      pu.push_back({1'(i == 0), w});
    end
    fork
      send(0, 0, 0, 0, pd);           // injector 0 of array 0 (slice 0)
      send(1, N - 1, 1, 2, pu);       // injector 2 of array 1 (slice 1)
    join
    repeat (60) @(negedge clk);
    check(same(rxq[0][5][0][0], pd), "PCB 5 received the multicast packet");
    check(same(rxq[0][15][0][0], pd), "PCB 15 received the multicast packet");
    check(same(rxq[1][0][1][2], pu), "PCB 0 received the upstream packet");
    others = 0;
    for (int d = 0; d < 2; d++) for (int k = 0; k < N; k++) for (int m = 0; m < SP; m++)
      for (int e = 0; e < S * NE; e++) others += rxq[d][k][m][e].size();
    check(others == 2 * pd.size() + pu.size(), $sformatf("nothing else delivered (%0d words)", others));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
