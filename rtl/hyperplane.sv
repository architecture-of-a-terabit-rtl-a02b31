// hyperplane: the intelligent free-space optical backplane (HyperPlane).
//
// N PCBs are joined by two optical streams running in opposite directions
// (index 0 downstream k -> k+1, index 1 upstream k -> k-1), both circular.
// On each PCB, SPAS smart pixel arrays tap each stream; with the default
// conservative arrays a stream carries 64 optical channels of 32 bits
// (2048 optical bits, 1 Tb/s at 500 MHz) and every PCB has 8 electrical
// injector and 8 extractor channels of 64 bits per stream.
//
// The message processor of each PCB is outside this module: it drives the
// electrical injector channels, takes the extractor channels, downloads the
// 8-bit control word of every optical channel through the configuration
// port of each array, and shifts in the PCB's one-hot address (one serial
// address port per PCB, shared by its four arrays). The control words embed
// any topology: static point-to-point or multi-point segments in
// reconfigurable mode, or broadcast channels whose packets each PCB filters
// by header address in intelligent mode.
//
// All ports are indexed [stream][pcb][array][channel]. Packets enter as
// 64-bit words with vld / sop and leave extractors in the same format; every
// array hop costs 1 to 4 optical clock cycles, set per channel.
module hyperplane
  import hp_pkg::*;
#(
  parameter int unsigned N          = N_PCB,
  parameter int unsigned SPAS       = SPAS_PCB,
  parameter int unsigned S          = S_SPA,
  parameter int unsigned C          = C_SLC,
  parameter int unsigned NI         = I_SLC,
  parameter int unsigned NE         = E_SLC,
  parameter int unsigned W          = W_OPT,
  parameter int unsigned A          = A_BITS,
  parameter int unsigned DLY_STAGES = DLY_DEPTH
) (
  input  logic                                            clk,
  input  logic                                            rst_n,
  input  logic [1:0][N-1:0][SPAS-1:0][S*NI-1:0]           inj_vld,
  input  logic [1:0][N-1:0][SPAS-1:0][S*NI-1:0]           inj_sop,
  input  logic [1:0][N-1:0][SPAS-1:0][S*NI-1:0][2*W-1:0]  inj_data,
  output logic [1:0][N-1:0][SPAS-1:0][S*NI-1:0]           inj_rdy,
  output logic [1:0][N-1:0][SPAS-1:0][S*NE-1:0]           ext_vld,
  output logic [1:0][N-1:0][SPAS-1:0][S*NE-1:0]           ext_sop,
  output logic [1:0][N-1:0][SPAS-1:0][S*NE-1:0][2*W-1:0]  ext_data,
  input  logic [1:0][N-1:0][SPAS-1:0]                     cfg_vld,
  input  logic [1:0][N-1:0][SPAS-1:0]                     cfg_first,
  input  logic [1:0][N-1:0][SPAS-1:0][7:0]                cfg_byte,
  output logic [1:0][N-1:0][SPAS-1:0]                     cfg_done,
  input  logic [N-1:0]                                    addr_shift,
  input  logic [N-1:0]                                    addr_sdi,
  input  logic [N-1:0]                                    addr_load,
  output logic [1:0][N-1:0][SPAS-1:0][S*C-1:0]            receiving,
  output logic [1:0][N-1:0][SPAS-1:0][S*C-1:0]            rx_drop
);

  for (genvar d = 0; d < 2; d++) begin : g_stream
    hyperplane_stream #(
      .N(N), .SPAS(SPAS), .DIR(d[0]), .S(S), .C(C), .NI(NI), .NE(NE),
      .W(W), .A(A), .DLY_STAGES(DLY_STAGES)
    ) u_stream (
      .clk, .rst_n,
      .inj_vld   (inj_vld[d]),
      .inj_sop   (inj_sop[d]),
      .inj_data  (inj_data[d]),
      .inj_rdy   (inj_rdy[d]),
      .ext_vld   (ext_vld[d]),
      .ext_sop   (ext_sop[d]),
      .ext_data  (ext_data[d]),
      .cfg_vld   (cfg_vld[d]),
      .cfg_first (cfg_first[d]),
      .cfg_byte  (cfg_byte[d]),
      .cfg_done  (cfg_done[d]),
      .addr_shift(addr_shift),
      .addr_sdi  (addr_sdi),
      .addr_load (addr_load),
      .receiving (receiving[d]),
      .rx_drop   (rx_drop[d])
    );
  end

endmodule
