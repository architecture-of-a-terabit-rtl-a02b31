// slice: a self-contained optoelectronic switching module of C optical
// channels, NI electrical injector channels and NE extractor channels.
//
// The slice is a 2-D array of smart pixels: each row is one optical channel
// of W data bits plus the two framing bits, and each row has its own channel
// control unit. The concentrator (C-to-NE fan-in) is the set of concentrator
// cells: the extractor line e is the OR of the cells enabled onto it, which
// stands for the tri-state bus of the pixel array; at most one row may drive
// a line, which an assertion checks. The expander (NI-to-C fan-out) is the
// set of expander cells, every row seeing all injector channels.
//
// In intelligent mode each row compares the header word's bits with the PCB
// address (address comparator cells, OR-reduced per row as a tree) and raises
// a Receive Request; extractor_arbiter hands free extractors to requests, and
// the granted rows enter the receiving state for the rest of their packets.
//
// Latency: an optical word leaves the slice 1 + dly cycles after it enters
// (dly from the row's control word, 0..3); extraction is in the same cycle
// the word leaves the delay, so the extractor lines are combinational from
// the delay chain.
module slice
  import hp_pkg::*;
#(
  parameter int unsigned C          = 16,
  parameter int unsigned NI         = 2,
  parameter int unsigned NE         = 2,
  parameter int unsigned W          = 32,
  parameter int unsigned A          = 16,
  parameter int unsigned DLY_STAGES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [C-1:0][W+1:0]   opt_in,
  output logic [C-1:0][W+1:0]   opt_out,
  input  logic [NI-1:0][W+1:0]  inj,
  output logic [NE-1:0][W+1:0]  ext,
  input  logic [C-1:0]          cfg_we,
  input  ccu_cfg_t              cfg_wdata,
  input  logic [A-1:0]          addr,
  output logic [C-1:0]          receiving,
  output logic [C-1:0]          rx_drop
);

  logic [C-1:0][W+1:0]          dly_out;
  logic [C-1:0][W+1:0]          addr_hit;
  logic [C-1:0][NE-1:0][W+1:0]  ext_drv;
  logic [C-1:0][NE-1:0]         conc_en;
  logic [C-1:0][NE-1:0]         ext_busy;
  logic [C-1:0][NE-1:0]         grant;
  logic [C-1:0]                 rx_req;
  logic [NE-1:0]                busy;
  logic [W+1:0]                 addr_row;

  // Address bit k sits under data bit k; framing pixels compare nothing.
  always_comb begin
    addr_row = '0;
    for (int k = 0; k < A && k < W; k++) addr_row[k] = addr[k];
  end

  for (genvar c = 0; c < C; c++) begin : g_row
    logic [$clog2(NI+1)-1:0]       exp_sel;
    logic [$clog2(DLY_STAGES)-1:0] dly;
    ccu_cfg_t                      cfg;

    smart_pixel #(.W(W + 2), .NI(NI), .NE(NE), .DLY_STAGES(DLY_STAGES)) u_pix (
      .clk, .rst_n,
      .opt_in  (opt_in[c]),
      .opt_out (opt_out[c]),
      .dly_out (dly_out[c]),
      .dly     (dly),
      .exp_sel (exp_sel),
      .conc_en (conc_en[c]),
      .inj     (inj),
      .ext_drv (ext_drv[c]),
      .addr    (addr_row),
      .addr_hit(addr_hit[c])
    );

    channel_control_unit #(.NI(NI), .NE(NE), .DLY_STAGES(DLY_STAGES)) u_ccu (
      .clk, .rst_n,
      .cfg_we    (cfg_we[c]),
      .cfg_wdata (cfg_wdata),
      .cfg       (cfg),
      .word_vld  (dly_out[c][W+1]),
      .word_sop  (dly_out[c][W]),
      .addr_match(|addr_hit[c]),
      .rx_req    (rx_req[c]),
      .grant     (grant[c]),
      .ext_busy  (ext_busy[c]),
      .conc_en   (conc_en[c]),
      .exp_sel   (exp_sel),
      .dly       (dly),
      .receiving (receiving[c]),
      .rx_drop   (rx_drop[c])
    );
  end

  always_comb begin
    busy = '0;
    for (int c = 0; c < C; c++) busy |= ext_busy[c];
  end

  extractor_arbiter #(.C(C), .NE(NE)) u_arb (
    .req  (rx_req),
    .busy (busy),
    .grant(grant)
  );

  // Concentrator: wired-OR extractor lines.
  always_comb begin
    ext = '0;
    for (int c = 0; c < C; c++)
      for (int e = 0; e < NE; e++) ext[e] |= ext_drv[c][e];
  end

  // Each extractor line has at most one driver.
  for (genvar e = 0; e < NE; e++) begin : g_chk
    logic [C-1:0] drivers;
    always_comb for (int c = 0; c < C; c++) drivers[c] = conc_en[c][e];
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drivers))
      else $error("extractor %0d driven by several channels", e);
  end

endmodule
