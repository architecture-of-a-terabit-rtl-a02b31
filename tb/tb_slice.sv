// tb_slice: self-checking test of a slice in both operating modes.
//
// Phase 1 (reconfigurable mode): rows are set to the four pixel states
// (transparent, transmitting, receiving, receiving-and-transmitting) with
// different delays, and random words on the optical inputs and injectors
// are checked at the optical outputs and extractor lines.
// Phase 2 (intelligent mode): every row filters by address; random packets
// with one-hot or multicast headers arrive on all rows at random times.
// A reference model in the testbench (delay history, receive state per row,
// ascending pairing of requests with free extractors) predicts every
// extractor line, optical output and drop pulse cycle by cycle. The test
// counts static extractions, packets received, contention drops and
// transmissions, and fails if any never happened.
module tb_slice;
  import hp_pkg::*;
  localparam int unsigned C = 8, NI = 2, NE = 2, W = 16, A = 8, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [C-1:0][W+1:0] opt_in, opt_out;
  logic [NI-1:0][W+1:0] inj;
  logic [NE-1:0][W+1:0] ext;
  logic [C-1:0] cfg_we, receiving, rx_drop;
  ccu_cfg_t cfg_wdata;
  logic [A-1:0] addr;
  int checks = 0, failures = 0;
  int n_static = 0, n_rxpkt = 0, n_drop = 0, n_tx = 0, n_pass = 0;

  slice #(.C(C), .NI(NI), .NE(NE), .W(W), .A(A), .DLY_STAGES(D)) dut (.*);

  always #5 clk = ~clk;

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

  // reference model state
  ccu_cfg_t m_cfg [C];
  logic [W+1:0] hist [C][D];
  bit m_rx [C];
  logic [NE-1:0] m_ext [C];

  task automatic write_cfg(input int r, input ccu_cfg_t v);
    @(negedge clk);
    cfg_we = '0; cfg_we[r] = 1'b1; cfg_wdata = v;
    @(negedge clk);
    cfg_we = '0;
    for (int q = 0; q < C; q++) begin
      for (int k = D - 1; k > 0; k--) hist[q][k] = hist[q][k-1];
      hist[q][0] = opt_in[q];
    end
    m_cfg[r] = v; m_rx[r] = 0; m_ext[r] = '0;
  endtask

  // Predict outputs for the current inputs, compare, then advance the model.
  task automatic step_and_check();
    logic [W+1:0] dw [C];
    logic [NE-1:0] gnt [C];
    logic [NE-1:0] busy, conc;
    logic [NE-1:0][W+1:0] e_ext;
    logic [W+1:0] e_out;
    bit req [C], hold [C];
    int reqs[$], frees[$];
    busy = '0;
    for (int r = 0; r < C; r++) begin
      dw[r]   = hist[r][m_cfg[r].dly];
      req[r]  = m_cfg[r].filter && dw[r][W+1] && dw[r][W] && ((dw[r][A-1:0] & addr) != '0);
      hold[r] = m_cfg[r].filter && m_rx[r] && dw[r][W+1] && !dw[r][W];
      gnt[r]  = '0;
      if (!m_cfg[r].filter) busy |= m_cfg[r].conc_en[NE-1:0];
      else if (hold[r])     busy |= m_ext[r];
      if (req[r]) reqs.push_back(r);
    end
    for (int e = 0; e < NE; e++) if (!busy[e]) frees.push_back(e);
    while (reqs.size() > 0 && frees.size() > 0) gnt[reqs.pop_front()][frees.pop_front()] = 1'b1;
    e_ext = '0;
    for (int r = 0; r < C; r++) begin
      if (!m_cfg[r].filter) conc = m_cfg[r].conc_en[NE-1:0];
      else if (hold[r])     conc = m_ext[r];
      else                  conc = gnt[r];
      for (int e = 0; e < NE; e++) if (conc[e]) e_ext[e] |= dw[r];
      e_out = (m_cfg[r].exp_sel == 0) ? dw[r] : inj[m_cfg[r].exp_sel - 1];
      check(opt_out[r] == e_out, $sformatf("row %0d optical out %h exp %h inj %h %h sel %0d t=%0t", r, opt_out[r], e_out, inj[0], inj[1], m_cfg[r].exp_sel, $time));
      check(rx_drop[r] == (req[r] && gnt[r] == '0), $sformatf("row %0d drop", r));
      if (!m_cfg[r].filter && conc != '0 && dw[r][W+1]) n_static++;
      if (req[r] && gnt[r] != '0) n_rxpkt++;
      if (req[r] && gnt[r] == '0) n_drop++;
      if (m_cfg[r].exp_sel != 0 && inj[m_cfg[r].exp_sel - 1][W+1]) n_tx++;
      if (m_cfg[r].exp_sel == 0 && dw[r][W+1]) n_pass++;
    end
    for (int e = 0; e < NE; e++)
      check(ext[e] == e_ext[e], $sformatf("extractor %0d got %h exp %h", e, ext[e], e_ext[e]));
    @(posedge clk);
    for (int r = 0; r < C; r++) begin
      if (hold[r]) m_rx[r] = 1;
      else begin m_rx[r] = req[r] && gnt[r] != '0; m_ext[r] = gnt[r]; end
      for (int k = D - 1; k > 0; k--) hist[r][k] = hist[r][k-1];
      hist[r][0] = opt_in[r];
    end
  endtask

  int plen [C];

  initial begin
    ccu_cfg_t v;
    int start [C];
    cfg_we = '0; cfg_wdata = '0; opt_in = '0; inj = '0; addr = 8'b0000_0100;
    for (int r = 0; r < C; r++) begin
      m_cfg[r] = '0; m_rx[r] = 0; m_ext[r] = '0; plen[r] = 0;
      for (int k = 0; k < D; k++) hist[r][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- phase 1: static pixel states
    v = '0;                                              write_cfg(0, v); // transparent
    v = '0; v.exp_sel = 2'd1; v.dly = 2'd1;              write_cfg(1, v); // transmitting
    v = '0; v.conc_en = 3'b010; v.dly = 2'd2;            write_cfg(2, v); // receiving on ext 1
    v = '0; v.conc_en = 3'b001; v.exp_sel = 2'd2; v.dly = 2'd3; write_cfg(3, v); // rx + tx
    for (int r = 4; r < C; r++) begin v = '0; v.dly = 2'(r); write_cfg(r, v); end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int r = 0; r < C; r++) opt_in[r] = {1'b1, 1'($urandom), W'($urandom)};
      for (int k = 0; k < NI; k++) inj[k] = {1'b1, 1'($urandom), W'($urandom)};
      #1;
      step_and_check();
    end
    // ---- phase 2: intelligent mode on every row
    for (int r = 0; r < C; r++) begin
      v = '0; v.filter = 1'b1; v.dly = 2'($urandom_range(0, 3));
      write_cfg(r, v);
    end
    inj = '0;
    for (int r = 0; r < C; r++) start[r] = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int r = 0; r < C; r++) begin
        if (plen[r] == 0 && $urandom_range(0, 99) < 30) begin
          plen[r] = $urandom_range(1, 6);
          start[r] = 1;
        end
        if (plen[r] > 0) begin
          logic [W-1:0] d;
          d = W'($urandom);
          if (start[r]) begin
            // header: one-hot destination, sometimes multicast
            d[A-1:0] = 8'(1 << $urandom_range(0, A - 1));
            if ($urandom_range(0, 3) == 0) d[A-1:0] |= addr;
          end
          opt_in[r] = {1'b1, 1'(start[r]), d};
          start[r] = 0;
          plen[r]--;
        end else if ($urandom_range(0, 1) == 0) opt_in[r] = '0;
        else begin
          // back-to-back: next header right away
          opt_in[r] = '0;
        end
      end
      #1;
      step_and_check();
    end
    check(n_static > 0 && n_rxpkt > 0 && n_drop > 0 && n_tx > 0 && n_pass > 0, "every mechanism seen");
    $display("static=%0d received=%0d dropped=%0d tx=%0d pass=%0d", n_static, n_rxpkt, n_drop, n_tx, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
