// tb_channel_control_unit: self-checking test of a channel control unit.
//
// Random control words are written now and then; every cycle a random
// framing (vld, sop), address match and, when a request is expected, a
// random one-hot or empty grant are applied. A reference model kept in the
// testbench tracks whether the channel is receiving and on which extractor,
// and predicts the Receive Request, the concentrator enables, the busy
// extractors, the drop pulse and the fields passed to the pixels. It also
// counts how often each case (static extraction, packet start, packet held,
// drop) occurred and fails if one never did.
module tb_channel_control_unit;
  import hp_pkg::*;
  localparam int unsigned NI = 2, NE = 2, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  ccu_cfg_t cfg_wdata, cfg;
  logic word_vld, word_sop, addr_match, rx_req, receiving, rx_drop;
  logic [NE-1:0] grant, ext_busy, conc_en;
  logic [1:0] exp_sel, dly;
  int checks = 0, failures = 0;
  int n_static = 0, n_start = 0, n_hold = 0, n_drop = 0;

  channel_control_unit #(.NI(NI), .NE(NE), .DLY_STAGES(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ccu_cfg_t m_cfg;
    bit m_rx;
    logic [NE-1:0] m_ext, e_conc, e_busy;
    bit e_req, e_hold;
    cfg_we = 0; cfg_wdata = '0; word_vld = 0; word_sop = 0; addr_match = 0; grant = '0;
    m_cfg = '0; m_rx = 0; m_ext = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 40) == 0);
      cfg_wdata = ccu_cfg_t'($urandom);
      cfg_wdata.conc_en = 3'($urandom_range(0, 2)) == 0 ? 3'b000 : (3'b001 << $urandom_range(0, 1));
      if ($urandom_range(0, 3) != 0) cfg_wdata.filter = 1'b1;
      word_vld = ($urandom_range(0, 4) != 0);
      word_sop = ($urandom_range(0, 3) == 0);
      addr_match = $urandom_range(0, 1);
      e_req  = m_cfg.filter && word_vld && word_sop && addr_match;
      e_hold = m_cfg.filter && m_rx && word_vld && !word_sop;
      grant = e_req ? (($urandom_range(0, 2) == 0) ? '0 : (NE'(1) << $urandom_range(0, NE - 1))) : '0;
      #1;
      if (!m_cfg.filter) begin e_conc = m_cfg.conc_en[NE-1:0]; e_busy = e_conc; end
      else if (e_hold)   begin e_conc = m_ext; e_busy = m_ext; end
      else               begin e_conc = e_req ? grant : '0; e_busy = '0; end
      check(rx_req == e_req, "receive request");
      check(conc_en == e_conc, $sformatf("conc_en got %b exp %b", conc_en, e_conc));
      check(ext_busy == e_busy, "ext_busy");
      check(rx_drop == (e_req && grant == '0), "drop");
      check(receiving == (e_conc != '0), "receiving");
      check(exp_sel == m_cfg.exp_sel && dly == m_cfg.dly, "pixel fields");
      if (!m_cfg.filter && e_conc != '0) n_static++;
      if (e_req && grant != '0) n_start++;
      if (e_hold) n_hold++;
      if (e_req && grant == '0) n_drop++;
      @(posedge clk);
      if (cfg_we) begin m_cfg = cfg_wdata; m_rx = 0; m_ext = '0; end
      else if (e_hold) m_rx = 1;
      else begin m_rx = e_req && grant != '0; m_ext = grant; end
    end
    check(n_static > 0 && n_start > 0 && n_hold > 0 && n_drop > 0, "all cases seen");
    $display("static=%0d start=%0d hold=%0d drop=%0d", n_static, n_start, n_hold, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
