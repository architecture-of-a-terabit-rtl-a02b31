// hyperplane_stream: one optical stream (ring) of the HyperPlane.
//
// N PCBs sit along the stream; each holds SPAS smart pixel arrays on it, and
// array m of every PCB serves the same group of S*C optical channels, so a
// stream carries SPAS*S*C channels (64 for the default sizes). The optical
// output of PCB k's arrays feeds the optical input of the next PCB's arrays
// in the stream direction, with a wrap-around edge from the last PCB to the
// first (the circular HyperPlane). DIR = 0 runs k -> k+1 (downstream),
// DIR = 1 runs k -> k-1 (upstream); which way is called which is this
// design's choice.
//
// Free-space imaging between boards has no logic and is a plain connection
// here. Each hop costs the 1 + dly register stages of the receiving array's
// pixels.
module hyperplane_stream
  import hp_pkg::*;
#(
  parameter int unsigned N          = N_PCB,
  parameter int unsigned SPAS       = SPAS_PCB,
  parameter bit          DIR        = 1'b0,
  parameter int unsigned S          = S_SPA,
  parameter int unsigned C          = C_SLC,
  parameter int unsigned NI         = I_SLC,
  parameter int unsigned NE         = E_SLC,
  parameter int unsigned W          = W_OPT,
  parameter int unsigned A          = A_BITS,
  parameter int unsigned DLY_STAGES = DLY_DEPTH
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [N-1:0][SPAS-1:0][S*NI-1:0]          inj_vld,
  input  logic [N-1:0][SPAS-1:0][S*NI-1:0]          inj_sop,
  input  logic [N-1:0][SPAS-1:0][S*NI-1:0][2*W-1:0] inj_data,
  output logic [N-1:0][SPAS-1:0][S*NI-1:0]          inj_rdy,
  output logic [N-1:0][SPAS-1:0][S*NE-1:0]          ext_vld,
  output logic [N-1:0][SPAS-1:0][S*NE-1:0]          ext_sop,
  output logic [N-1:0][SPAS-1:0][S*NE-1:0][2*W-1:0] ext_data,
  input  logic [N-1:0][SPAS-1:0]                    cfg_vld,
  input  logic [N-1:0][SPAS-1:0]                    cfg_first,
  input  logic [N-1:0][SPAS-1:0][7:0]               cfg_byte,
  output logic [N-1:0][SPAS-1:0]                    cfg_done,
  input  logic [N-1:0]                              addr_shift,
  input  logic [N-1:0]                              addr_sdi,
  input  logic [N-1:0]                              addr_load,
  output logic [N-1:0][SPAS-1:0][S*C-1:0]           receiving,
  output logic [N-1:0][SPAS-1:0][S*C-1:0]           rx_drop
);

  logic [N-1:0][SPAS-1:0][S*C-1:0][W+1:0] opt_in, opt_out;

  for (genvar k = 0; k < N; k++) begin : g_node
    localparam int unsigned PREV = DIR ? (k + 1) % N : (k + N - 1) % N;

    assign opt_in[k] = opt_out[PREV];

    for (genvar m = 0; m < SPAS; m++) begin : g_spa
      spa #(.S(S), .C(C), .NI(NI), .NE(NE), .W(W), .A(A), .DLY_STAGES(DLY_STAGES)) u_spa (
        .clk, .rst_n,
        .opt_in    (opt_in[k][m]),
        .opt_out   (opt_out[k][m]),
        .inj_vld   (inj_vld[k][m]),
        .inj_sop   (inj_sop[k][m]),
        .inj_data  (inj_data[k][m]),
        .inj_rdy   (inj_rdy[k][m]),
        .ext_vld   (ext_vld[k][m]),
        .ext_sop   (ext_sop[k][m]),
        .ext_data  (ext_data[k][m]),
        .cfg_vld   (cfg_vld[k][m]),
        .cfg_first (cfg_first[k][m]),
        .cfg_byte  (cfg_byte[k][m]),
        .cfg_done  (cfg_done[k][m]),
        .addr_shift(addr_shift[k]),
        .addr_sdi  (addr_sdi[k]),
        .addr_load (addr_load[k]),
        .receiving (receiving[k][m]),
        .rx_drop   (rx_drop[k][m])
      );
    end
  end

endmodule
