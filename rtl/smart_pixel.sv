// smart_pixel: one column of smart pixels of a channel row.
//
// Each pixel has an optical input bit, a programmable delay, a concentrator
// (fan-in) cell, an expander (fan-out) cell, an address comparator cell and
// an optical output bit. All pixels of one channel row share the same control
// signals, so this module holds W pixels side by side (W = 1 is a single
// pixel as drawn; a slice uses W = channel width + 2 framing bits).
//
//  * Programmable delay: the optical input is latched in a chain of
//    DLY_STAGES registers; dly selects stage dly (1 to DLY_STAGES cycles of
//    latency). The minimum of one stage reflects a pipelined backplane, where
//    data are latched at every array.
//  * Concentrator cell: drives the delayed bit onto extractor line e when
//    conc_en[e] is set. The tri-state drivers of the pixel become an AND here,
//    and the shared extractor line becomes an OR in the slice.
//  * Expander cell: an (NI+1)-to-1 multiplexor (4-to-1 for three injectors)
//    choosing the optical output: sel 0 = the delayed input (transparent),
//    sel k = injector channel k-1 (transmitting).
//  * Address comparator cell: AND of the delayed header bit and the PCB
//    address bit; the OR of a row's bits is formed by the slice's tree.
//
// Receiving is conc_en != 0 with any expander setting; receiving and
// transmitting is conc_en != 0 with an injector selected. The encodings
// 0 = pass-through and the one-hot concentrator enables follow the codes
// printed beside the four pixel states; which injector a given code names is
// this design's choice. The output is combinational from the delay chain and
// the injector inputs; the delay chain is the only state.
module smart_pixel #(
  parameter int unsigned W          = 1,
  parameter int unsigned NI         = 2,
  parameter int unsigned NE         = 2,
  parameter int unsigned DLY_STAGES = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [W-1:0]                  opt_in,
  output logic [W-1:0]                  opt_out,
  output logic [W-1:0]                  dly_out,   // delayed optical bits
  input  logic [$clog2(DLY_STAGES)-1:0] dly,
  input  logic [$clog2(NI+1)-1:0]       exp_sel,
  input  logic [NE-1:0]                 conc_en,
  input  logic [NI-1:0][W-1:0]          inj,
  output logic [NE-1:0][W-1:0]          ext_drv,
  input  logic [W-1:0]                  addr,
  output logic [W-1:0]                  addr_hit
);

  logic [DLY_STAGES-1:0][W-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else begin
      stage[0] <= opt_in;
      for (int s = 1; s < DLY_STAGES; s++) stage[s] <= stage[s-1];
    end
  end

  assign dly_out = stage[dly];

  // Expander cell.
  always_comb begin
    opt_out = dly_out;
    for (int k = 0; k < NI; k++)
      if (exp_sel == ($clog2(NI+1))'(k + 1)) opt_out = inj[k];
  end

  // Concentrator cell.
  always_comb
    for (int e = 0; e < NE; e++) ext_drv[e] = conc_en[e] ? dly_out : '0;

  // Address comparator cell.
  assign addr_hit = dly_out & addr;

endmodule
