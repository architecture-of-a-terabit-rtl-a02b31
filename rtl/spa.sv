// spa: one smart pixel array (SPA), the optoelectronic chip a PCB uses to tap
// one stream of the optical backplane.
//
// The default is the conservative array: 32 optical channels of 32 bits at
// the optical clock, 4 electrical injector and 4 extractor channels of
// 64 bits at half that clock, i.e. 512 Gb/s optical against 64 Gb/s
// electrical at 500/250 MHz. The 32 x 32 pixel array is split into S = 2
// slices of C = 16 channels, each with a 2-to-16 expander and a 16-to-2
// concentrator. Around the slices sit the shared PCB address latch (loaded
// bit-serially), the configuration loader (one control byte per clock, one
// byte per channel) and the multiplexors / demultiplexors converting between
// the wide electrical and narrow optical formats (inj_gearbox, ext_gearbox).
//
// Numbering: optical channel j belongs to slice j / C, row j % C; electrical
// injector and extractor k belong to slice k / NI and k / NE. Control byte j
// of a configuration download goes to optical channel j.
//
// Timing: a 64-bit electrical word reaches the optical channel as two words,
// 1 and 2 cycles after it is accepted; an extracted packet leaves as 64-bit
// words 1 cycle after their second half is extracted.
module spa
  import hp_pkg::*;
#(
  parameter int unsigned S          = S_SPA,
  parameter int unsigned C          = C_SLC,
  parameter int unsigned NI         = I_SLC,
  parameter int unsigned NE         = E_SLC,
  parameter int unsigned W          = W_OPT,
  parameter int unsigned A          = A_BITS,
  parameter int unsigned DLY_STAGES = DLY_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // optical side: {vld, sop, data} per channel
  input  logic [S*C-1:0][W+1:0]      opt_in,
  output logic [S*C-1:0][W+1:0]      opt_out,
  // electrical injector channels
  input  logic [S*NI-1:0]            inj_vld,
  input  logic [S*NI-1:0]            inj_sop,
  input  logic [S*NI-1:0][2*W-1:0]   inj_data,
  output logic [S*NI-1:0]            inj_rdy,
  // electrical extractor channels
  output logic [S*NE-1:0]            ext_vld,
  output logic [S*NE-1:0]            ext_sop,
  output logic [S*NE-1:0][2*W-1:0]   ext_data,
  // configuration download
  input  logic                       cfg_vld,
  input  logic                       cfg_first,
  input  logic [7:0]                 cfg_byte,
  output logic                       cfg_done,
  // PCB address, bit-serial
  input  logic                       addr_shift,
  input  logic                       addr_sdi,
  input  logic                       addr_load,
  // status
  output logic [S*C-1:0]             receiving,
  output logic [S*C-1:0]             rx_drop
);

  logic [A-1:0]              addr;
  logic [S*C-1:0]            cfg_we;
  logic [7:0]                cfg_wdata;
  logic [S*NI-1:0][W+1:0]    inj_word;
  logic [S*NE-1:0][W+1:0]    ext_word;

  address_latch #(.A(A)) u_addr (
    .clk, .rst_n,
    .shift(addr_shift), .sdi(addr_sdi), .load(addr_load), .addr(addr)
  );

  config_loader #(.NCH(S * C)) u_cfg (
    .clk, .rst_n,
    .cfg_vld, .cfg_first, .cfg_byte,
    .wr_en(cfg_we), .wr_data(cfg_wdata), .done(cfg_done)
  );

  for (genvar k = 0; k < S * NI; k++) begin : g_inj
    inj_gearbox #(.W(W)) u_mux (
      .clk, .rst_n,
      .e_vld(inj_vld[k]), .e_sop(inj_sop[k]), .e_data(inj_data[k]),
      .e_rdy(inj_rdy[k]), .o_word(inj_word[k])
    );
  end

  for (genvar k = 0; k < S * NE; k++) begin : g_ext
    ext_gearbox #(.W(W)) u_demux (
      .clk, .rst_n,
      .o_word(ext_word[k]),
      .e_vld(ext_vld[k]), .e_sop(ext_sop[k]), .e_data(ext_data[k])
    );
  end

  for (genvar s = 0; s < S; s++) begin : g_slice
    slice #(.C(C), .NI(NI), .NE(NE), .W(W), .A(A), .DLY_STAGES(DLY_STAGES)) u_slice (
      .clk, .rst_n,
      .opt_in   (opt_in[s*C +: C]),
      .opt_out  (opt_out[s*C +: C]),
      .inj      (inj_word[s*NI +: NI]),
      .ext      (ext_word[s*NE +: NE]),
      .cfg_we   (cfg_we[s*C +: C]),
      .cfg_wdata(ccu_cfg_t'(cfg_wdata)),
      .addr     (addr),
      .receiving(receiving[s*C +: C]),
      .rx_drop  (rx_drop[s*C +: C])
    );
  end

endmodule
