// inj_gearbox: electrical injector channel to optical-rate channel.
//
// An electrical channel is 2W bits wide at half the optical clock; an
// optical channel is W bits at the full clock, so both carry the same
// bandwidth (64 bits at 250 MHz = 32 bits at 500 MHz = 16 Gb/s). The
// gearbox is the multiplexor at the array's edge: it accepts a 2W-bit word
// when e_vld and e_rdy are both high and sends its low half, then its high
// half, on two consecutive cycles. The first half carries the word's sop;
// both halves carry vld. e_rdy is low in the cycle the high half is sent,
// so a full-rate stream alternates accept / hold. The optical word is
// registered: one cycle from accept to the low half. Everything runs on the
// optical clock; the electrical side is modelled as a ready/valid stream in
// that domain, which is this design's choice.
module inj_gearbox #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           e_vld,
  input  logic           e_sop,
  input  logic [2*W-1:0] e_data,
  output logic           e_rdy,
  output logic [W+1:0]   o_word    // {vld, sop, data}
);

  logic         ph_q;
  logic [W-1:0] hi_q;

  assign e_rdy = !ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q   <= 1'b0;
      hi_q   <= '0;
      o_word <= '0;
    end else if (ph_q) begin
      o_word <= {1'b1, 1'b0, hi_q};
      ph_q   <= 1'b0;
    end else if (e_vld) begin
      o_word <= {1'b1, e_sop, e_data[W-1:0]};
      hi_q   <= e_data[2*W-1:W];
      ph_q   <= 1'b1;
    end else begin
      o_word <= '0;
    end
  end

endmodule
