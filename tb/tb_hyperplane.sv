// tb_hyperplane: end-to-end test of the backplane at reduced size.
//
// Four PCBs, one array per PCB per stream, 8 optical channels of 16 bits
// per stream. Every PCB's message-processor role is played by the testbench:
// it shifts in the one-hot PCB address, downloads all control words through
// the configuration ports, injects 64-bit-word packets and collects the
// extractor outputs. Scenarios:
//   A  multicast on a broadcast channel (intelligent mode): PCB 0 sends to
//      PCBs 1 and 3 on downstream channel 0; PCB 2 must not extract it and
//      the packet must not run round the ring twice.
//   B  contention: PCBs 0, 1 and 2 send long packets to PCB 3 on channels
//      0, 1, 2 of the same slice at once; PCB 3 has two extractors, so one
//      packet is dropped, and the other two arrive whole.
//   C  partitioned channel (reconfigurable mode): on upstream channel 4,
//      PCB 3 transmits to PCB 1 (PCB 2 transparent) while PCB 1, in the
//      receiving-and-transmitting state, reuses the channel to send to PCB 0.
//   D  mode switch: the embedding is downloaded again and downstream
//      channel 0 becomes a static segment from PCB 0 to PCB 2, which then
//      extracts a packet addressed to nobody.
// Each mechanism is counted and must occur at least once.
module tb_hyperplane;
  import hp_pkg::*;
  localparam int unsigned N = 4, SP = 1, S = 2, C = 4, NI = 2, NE = 2, W = 16, A = 8;
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
  int n_multicast = 0, n_filtered_out = 0, n_drop = 0, n_static = 0, n_rx_tx = 0,
      n_reconfig = 0, n_removed = 0;

  hyperplane #(.N(N), .SPAS(SP), .S(S), .C(C), .NI(NI), .NE(NE), .W(W), .A(A)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- extractor monitor
  typedef logic [2*W:0] ew_t;   // {sop, data}
  ew_t rxq [2][N][S*NE][$];
  int first_t [2][N][S*NE];      // time of the first word since the last clear
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < N; k++)
        for (int e = 0; e < S * NE; e++)
          if (ext_vld[d][k][0][e]) begin
            if (rxq[d][k][e].size() == 0) first_t[d][k][e] = $time;
            rxq[d][k][e].push_back({ext_sop[d][k][0][e], ext_data[d][k][0][e]});
          end

  int drops_seen = 0;
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < N; k++) drops_seen += $countones(rx_drop[d][k][0]);

  task automatic clear_rx();
    for (int d = 0; d < 2; d++)
      for (int k = 0; k < N; k++)
        for (int e = 0; e < S * NE; e++) rxq[d][k][e].delete();
  endtask

  // ---- message-processor actions
  ccu_cfg_t cw [2][N][NCH];

  task automatic download();
    for (int j = 0; j < NCH; j++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < N; k++) begin
          cfg_vld[d][k][0] = 1'b1; cfg_first[d][k][0] = (j == 0); cfg_byte[d][k][0] = cw[d][k][j];
        end
    end
    @(negedge clk);
    cfg_vld = '0;
    @(negedge clk);
    check(&cfg_done, "all arrays configured");
    n_reconfig++;
  endtask

  task automatic make_pkt(output ew_t p[$], input int len, input logic [A-1:0] dst, input int tag);
    p.delete();
    for (int i = 0; i < len; i++) begin
      logic [2*W-1:0] d;
      d = {16'(tag), 16'(i), $urandom};
      if (i == 0) d[A-1:0] = dst;
      p.push_back({1'(i == 0), d});
    end
  endtask

  task automatic send(input int d, input int k, input int i, input ew_t p[$]);
    foreach (p[n]) begin
      @(negedge clk);
      inj_vld[d][k][0][i] = 1'b1; inj_sop[d][k][0][i] = p[n][2*W]; inj_data[d][k][0][i] = p[n][2*W-1:0];
      #1;
      while (!inj_rdy[d][k][0][i]) @(negedge clk);
    end
    @(negedge clk);
    inj_vld[d][k][0][i] = 1'b0;
  endtask

  function automatic bit same(input ew_t a[$], input ew_t b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[n]) if (a[n] != b[n]) return 0;
    return 1;
  endfunction

  initial begin
    ew_t p0[$], p1[$], p2[$], got[$];
    inj_vld = '0; inj_sop = '0; inj_data = '0; cfg_vld = '0; cfg_first = '0; cfg_byte = '0;
    addr_shift = '0; addr_sdi = '0; addr_load = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one-hot addresses, shifted in MSB first on all PCBs together
    for (int b = A - 1; b >= 0; b--) begin
      @(negedge clk);
      addr_shift = '1;
      for (int k = 0; k < N; k++) addr_sdi[k] = (b == k);
    end
    @(negedge clk); addr_shift = '0; addr_load = '1;
    @(negedge clk); addr_load = '0;

    // ---- embedding 1
    for (int d = 0; d < 2; d++) for (int k = 0; k < N; k++) for (int j = 0; j < NCH; j++) cw[d][k][j] = '0;
    for (int k = 0; k < N; k++) for (int j = 0; j < 3; j++) cw[0][k][j].filter = 1'b1;
    cw[0][0][0] = '0; cw[0][0][0].exp_sel = 2'd1;    // PCB 0 owns channel 0 (injector 0)
    cw[0][1][1] = '0; cw[0][1][1].exp_sel = 2'd1;    // PCB 1 owns channel 1 (injector 0)
    cw[0][2][2] = '0; cw[0][2][2].exp_sel = 2'd2;    // PCB 2 owns channel 2 (injector 1)
    // upstream channel 4 (slice 1 row 0): 3 -> 1, then 1 -> 0
    cw[1][3][4].exp_sel = 2'd1;                      // PCB 3 transmits injector 2
    cw[1][1][4].conc_en = 3'b001;                    // PCB 1 receives on extractor 2 ...
    cw[1][1][4].exp_sel = 2'd2;                      // ... and transmits injector 3
    cw[1][0][4].conc_en = 3'b001;                    // PCB 0 receives on extractor 2
    download();

    // ---- A: multicast to PCBs 1 and 3
    clear_rx();
    make_pkt(p0, 4, 8'b0000_1010, 16'hA0);
    send(0, 0, 0, p0);
    repeat (30) @(negedge clk);
    check(same(rxq[0][1][0], p0), "A: PCB 1 received the multicast packet");
    check(same(rxq[0][3][0], p0), "A: PCB 3 received the multicast packet");
    check(rxq[0][2][0].size() == 0 && rxq[0][2][1].size() == 0, "A: PCB 2 filtered it out");
    check(rxq[0][0][0].size() == 0, "A: sender not receiving its own packet");
    check(first_t[0][1][0] + 20 == first_t[0][3][0], "A: downstream order, two hops from PCB 1 to PCB 3");
    if (same(rxq[0][1][0], p0) && same(rxq[0][3][0], p0)) n_multicast++;
    if (rxq[0][2][0].size() == 0) n_filtered_out++;
    // removed at the source: the channel is idle again everywhere
    check(!dut.g_stream[0].u_stream.g_node[1].g_spa[0].u_spa.opt_in[0][W+1], "A: packet removed at its source");
    if (!dut.g_stream[0].u_stream.g_node[1].g_spa[0].u_spa.opt_in[0][W+1]) n_removed++;

    // ---- B: three senders, two extractors
    clear_rx();
    drops_seen = 0;
    make_pkt(p0, 8, 8'b0000_1000, 16'hB0);
    make_pkt(p1, 8, 8'b0000_1000, 16'hB1);
    make_pkt(p2, 8, 8'b0000_1000, 16'hB2);
    fork
      send(0, 0, 0, p0);
      send(0, 1, 0, p1);
      send(0, 2, 1, p2);
    join
    repeat (30) @(negedge clk);
    // nearest first: channel 2 (one hop) and channel 1 (two hops) win
    check(same(rxq[0][3][0], p2), "B: PCB 2's packet on extractor 0");
    check(same(rxq[0][3][1], p1), "B: PCB 1's packet on extractor 1");
    check(drops_seen == 1, $sformatf("B: one packet dropped (%0d)", drops_seen));
    n_drop += drops_seen;

    // ---- C: partitioned upstream channel
    clear_rx();
    make_pkt(p0, 5, 8'h00, 16'hC3);
    make_pkt(p1, 3, 8'h00, 16'hC1);
    fork
      send(1, 3, 2, p0);
      send(1, 1, 3, p1);
    join
    repeat (30) @(negedge clk);
    check(same(rxq[1][1][2], p0), "C: PCB 1 received PCB 3's segment");
    check(same(rxq[1][0][2], p1), "C: PCB 0 received PCB 1's segment");
    check(rxq[1][2][2].size() == 0, "C: PCB 2 transparent");
    if (same(rxq[1][1][2], p0)) n_static++;
    if (same(rxq[1][0][2], p1)) n_rx_tx++;

    // ---- D: switch channel 0 to a static segment 0 -> 2
    for (int k = 0; k < N; k++) cw[0][k][0] = '0;
    cw[0][0][0].exp_sel = 2'd1;
    cw[0][2][0].conc_en = 3'b001;
    download();
    clear_rx();
    make_pkt(p0, 3, 8'h00, 16'hD0);
    send(0, 0, 0, p0);
    repeat (30) @(negedge clk);
    check(same(rxq[0][2][0], p0), "D: PCB 2 extracts the static segment");
    check(rxq[0][1][0].size() == 0 && rxq[0][3][0].size() == 0, "D: others transparent");
    if (same(rxq[0][2][0], p0)) n_static++;

    check(n_multicast > 0, "mechanism: multicast");
    check(n_filtered_out > 0, "mechanism: address filtering");
    check(n_removed > 0, "mechanism: removal at source");
    check(n_drop > 0, "mechanism: contention drop");
    check(n_static > 1, "mechanism: static segments");
    check(n_rx_tx > 0, "mechanism: receive-and-transmit");
    check(n_reconfig > 1, "mechanism: reconfiguration");
    $display("multicast=%0d filtered=%0d removed=%0d drops=%0d static=%0d rxtx=%0d reconfig=%0d",
             n_multicast, n_filtered_out, n_removed, n_drop, n_static, n_rx_tx, n_reconfig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
