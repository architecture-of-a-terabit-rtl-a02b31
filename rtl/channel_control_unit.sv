// channel_control_unit: control register and receive state of one channel.
//
// Each optical channel of a slice has a control unit holding its 8-bit
// control word (hp_pkg::ccu_cfg_t), written by the configuration loader.
// The word sets the expander select and the programmable delay of every
// pixel in the row directly.
//
// In reconfigurable mode (filter = 0) the concentrator enables come straight
// from the word, so the channel is statically extracted onto a fixed
// extractor line (or not at all).
//
// In intelligent mode (filter = 1) the unit watches the delayed channel
// word. A header word (vld & sop) whose address bits hit the PCB address
// raises the Receive Request. If the slice arbiter grants an extractor in the
// same cycle, the header and every following word of the packet (vld & !sop)
// are driven onto that extractor; the unit remembers the extractor in a
// register and reports it as busy so the arbiter does not hand it out twice.
// The packet ends when vld falls or a new header arrives, which requests
// again. A request without a grant is a dropped packet for this PCB (it still
// travels on along the channel) and pulses rx_drop.
//
// Writing the control word ends any packet being received. The grant,
// request and concentrator enables are combinational in the current cycle;
// only the control word and the receive state are registered.
module channel_control_unit
  import hp_pkg::*;
#(
  parameter int unsigned NI         = 2,
  parameter int unsigned NE         = 2,
  parameter int unsigned DLY_STAGES = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  ccu_cfg_t                      cfg_wdata,
  output ccu_cfg_t                      cfg,
  input  logic                          word_vld,
  input  logic                          word_sop,
  input  logic                          addr_match,
  output logic                          rx_req,
  input  logic [NE-1:0]                 grant,
  output logic [NE-1:0]                 ext_busy,
  output logic [NE-1:0]                 conc_en,
  output logic [$clog2(NI+1)-1:0]       exp_sel,
  output logic [$clog2(DLY_STAGES)-1:0] dly,
  output logic                          receiving,
  output logic                          rx_drop
);

  logic          rx_q;
  logic [NE-1:0] ext_q;
  logic          holding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= '0;
    else if (cfg_we) cfg <= cfg_wdata;
  end

  assign holding = cfg.filter && rx_q && word_vld && !word_sop;
  assign rx_req  = cfg.filter && word_vld && word_sop && addr_match;
  assign rx_drop = rx_req && (grant == '0);

  always_comb begin
    if (!cfg.filter)  conc_en = cfg.conc_en[NE-1:0];
    else if (holding) conc_en = ext_q;
    else              conc_en = rx_req ? grant : '0;
  end

  always_comb begin
    if (!cfg.filter)  ext_busy = cfg.conc_en[NE-1:0];
    else if (holding) ext_busy = ext_q;
    else              ext_busy = '0;
  end

  assign receiving = |conc_en;
  assign exp_sel   = cfg.exp_sel[$clog2(NI+1)-1:0];
  assign dly       = cfg.dly[$clog2(DLY_STAGES)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q  <= 1'b0;
      ext_q <= '0;
    end else if (cfg_we) begin
      rx_q  <= 1'b0;
      ext_q <= '0;
    end else if (holding) begin
      rx_q  <= 1'b1;
    end else begin
      rx_q  <= rx_req && (grant != '0);
      ext_q <= grant;
    end
  end

  initial begin
    assert (NE <= MAX_EXT && NI <= MAX_INJ)
      else $error("control word holds at most %0d extractors and %0d injectors", MAX_EXT, MAX_INJ);
  end

  // A grant is one-hot and only answers a request.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant != '0) |-> rx_req);

endmodule
