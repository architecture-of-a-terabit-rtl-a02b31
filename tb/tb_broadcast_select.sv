// tb_broadcast_select: broadcast-and-select traffic on the full backplane.
//
// Every optical channel of both streams is a reserved broadcast channel:
// in every slice, row k is owned by PCB k (it transmits its slice's injector
// 0 there), and every other PCB filters that row by address. With the
// default sizes that is 4 channels per PCB per stream and all 128 channels
// in use: a set of reserved buses, one per source. Each of the
// 128 sources sends packets of 512 bits (8 words of 64 bits) to uniformly
// random other PCBs, back to back with short random gaps.
// Checked for every packet: it is either delivered exactly once, intact, at
// its destination on the same stream, array and slice, or counted as dropped
// there because both extractors of that slice were busy. The first word of a
// delivered packet must reach the extractor port 2 + h cycles after the edge
// that accepted the header, h being the number of hops along the stream (the
// check counts from the cycle before that edge, hence h + 3). Drops must
// occur (the contention mechanism), and every channel must carry traffic.
module tb_broadcast_select;
  import hp_pkg::*;
  localparam int unsigned N = N_PCB, SP = SPAS_PCB, S = S_SPA, C = C_SLC,
                          NI = I_SLC, NE = E_SLC, W = W_OPT, A = A_BITS;
  localparam int unsigned NCH = S * C;
  localparam int unsigned PKT_WORDS = 8;      // 512-bit packets
  localparam int unsigned PKTS_PER_SRC = 24;

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
  int cyc = 0;

  hyperplane dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [2*W:0] ew_t;
  typedef logic [PKT_WORDS-1:0][2*W:0] pkt_t;
  pkt_t sent [int];
  int   sent_dst [int], sent_due [int], sent_path [int];
  int   n_sent = 0, n_delivered = 0, n_dropped = 0, hop_sum = 0;
  int   src_pkts [128];

  // Source id = ((stream*N + pcb)*SP + array)*S + slice
  function automatic int hops(input int d, input int from, input int to);
    return d == 0 ? (to - from + N) % N : (from - to + N) % N;
  endfunction

  task automatic source(input int d, input int k, input int m, input int s);
    int id, i;
    id = ((d * N + k) * SP + m) * S + s;
    i = s * NI;
    for (int p = 0; p < PKTS_PER_SRC; p++) begin
      int dst, key;
      pkt_t pk;
      dst = $urandom_range(0, N - 2);
      if (dst >= k) dst++;
      key = id * 65536 + p;
      for (int n = 0; n < PKT_WORDS; n++) begin
        logic [2*W-1:0] w;
        w = {16'(id), 16'(p), $urandom};
        if (n == 0) w[A-1:0] = A'(1) << dst;
        pk[n] = {1'(n == 0), w};
      end
      sent[key] = pk;
      sent_dst[key] = dst;
      sent_path[key] = (d * SP + m) * S + s;
      for (int n = 0; n < PKT_WORDS; n++) begin
        @(negedge clk);
        inj_vld[d][k][m][i] = 1'b1; inj_sop[d][k][m][i] = pk[n][2*W]; inj_data[d][k][m][i] = pk[n][2*W-1:0];
        #1;
        while (!inj_rdy[d][k][m][i]) @(negedge clk);
        if (n == 0) sent_due[key] = cyc + 3 + hops(d, k, dst);
      end
      n_sent++;
      src_pkts[id]++;
      @(negedge clk);
      inj_vld[d][k][m][i] = 1'b0;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
  endtask

  // Reassembly at every extractor.
  ew_t cur [2][N][SP][S*NE][$];
  int  cur_t [2][N][SP][S*NE];
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++)
      for (int j = 0; j < N; j++)
        for (int m = 0; m < SP; m++) begin
          n_dropped += $countones(rx_drop[d][j][m]);
          for (int e = 0; e < S * NE; e++)
            if (ext_vld[d][j][m][e]) begin
              if (ext_sop[d][j][m][e]) begin
                if (cur[d][j][m][e].size() != 0) check(0, "packet cut short");
                cur[d][j][m][e].delete();
                cur_t[d][j][m][e] = cyc;
              end
              cur[d][j][m][e].push_back({ext_sop[d][j][m][e], ext_data[d][j][m][e]});
              if (cur[d][j][m][e].size() == PKT_WORDS) begin
                int key, src;
                bit ok;
                pkt_t pk;
                key = int'(cur[d][j][m][e][0][2*W-1:2*W-16]) * 65536 + int'(cur[d][j][m][e][0][2*W-17:2*W-32]);
                src = int'(cur[d][j][m][e][0][2*W-1:2*W-16]);
                ok = sent.exists(key);
                check(ok, "delivered packet was sent");
                if (ok) begin
                  pk = sent[key];
                  for (int n = 0; n < PKT_WORDS; n++)
                    if (cur[d][j][m][e][n] != pk[n]) ok = 0;
                  check(ok, "packet intact");
                  check(sent_dst[key] == j, "delivered to its destination");
                  check(sent_path[key] == (d * SP + m) * S + e / NE, "same stream, array and slice");
                  check(sent_due[key] == cur_t[d][j][m][e],
                        $sformatf("latency: first word at %0d, expected %0d", cur_t[d][j][m][e], sent_due[key]));
                  hop_sum += hops(d, (src / (SP * S)) % N, j);
                  sent.delete(key);
                  n_delivered++;
                end
                cur[d][j][m][e].delete();
              end
            end
        end
  end

  initial begin
    int idle;
    inj_vld = '0; inj_sop = '0; inj_data = '0; cfg_vld = '0; cfg_first = '0; cfg_byte = '0;
    addr_shift = '0; addr_sdi = '0; addr_load = '0;
    for (int i = 0; i < 128; i++) src_pkts[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = A - 1; b >= 0; b--) begin
      @(negedge clk);
      addr_shift = '1;
      for (int k = 0; k < N; k++) addr_sdi[k] = (b == k);
    end
    @(negedge clk); addr_shift = '0; addr_load = '1;
    @(negedge clk); addr_load = '0;
    for (int j = 0; j < NCH; j++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < N; k++)
          for (int m = 0; m < SP; m++) begin
            ccu_cfg_t v;
            v = '0;
            if (j % C == k) v.exp_sel = 2'd1; else v.filter = 1'b1;
            cfg_vld[d][k][m] = 1'b1; cfg_first[d][k][m] = (j == 0); cfg_byte[d][k][m] = v;
          end
    end
    @(negedge clk);
    cfg_vld = '0;
    @(negedge clk);
    check(&cfg_done, "all arrays configured");

    for (int d = 0; d < 2; d++)
      for (int k = 0; k < N; k++)
        for (int m = 0; m < SP; m++)
          for (int s = 0; s < S; s++)
            fork
              automatic int dd = d, kk = k, mm = m, ss = s;
              source(dd, kk, mm, ss);
            join_none
    wait fork;
    repeat (4 * N) @(negedge clk);

    idle = 0;
    for (int i = 0; i < 128; i++) if (src_pkts[i] != PKTS_PER_SRC) idle++;
    check(idle == 0, "every channel carried its packets");
    check(n_delivered + n_dropped == n_sent,
          $sformatf("delivered %0d + dropped %0d == sent %0d", n_delivered, n_dropped, n_sent));
    check(sent.size() == n_dropped, "undelivered packets are exactly the dropped ones");
    check(n_dropped > 0, "mechanism: contention drop at a busy slice");
    check(n_delivered > 0, "mechanism: address-filtered delivery");
    $display("sent=%0d delivered=%0d dropped=%0d mean hops=%0.2f cycles=%0d",
             n_sent, n_delivered, n_dropped, real'(hop_sum) / real'(n_delivered), cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
