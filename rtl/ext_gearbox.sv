// ext_gearbox: optical-rate extractor channel to electrical channel.
//
// The demultiplexor at the array's edge. It pairs consecutive W-bit words of
// an extractor channel into one 2W-bit electrical word, first word in the low
// half. A pair starts with the packet's header (sop) or with any word when
// no half is pending. If a packet ends (vld falls) or a new header arrives
// while a low half is pending, that half is sent alone with a zero high half.
// Output words are registered and valid for one optical clock cycle; at most
// one leaves every two cycles during a packet, matching the electrical rate.
module ext_gearbox #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W+1:0]   o_word,   // {vld, sop, data}
  output logic           e_vld,
  output logic           e_sop,
  output logic [2*W-1:0] e_data
);

  logic         have_q;
  logic         sop_q;
  logic [W-1:0] lo_q;
  logic         i_vld, i_sop;
  logic [W-1:0] i_data;

  assign i_vld  = o_word[W+1];
  assign i_sop  = o_word[W];
  assign i_data = o_word[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q <= 1'b0;
      sop_q  <= 1'b0;
      lo_q   <= '0;
      e_vld  <= 1'b0;
      e_sop  <= 1'b0;
      e_data <= '0;
    end else begin
      e_vld <= 1'b0;
      if (i_vld && have_q && !i_sop) begin
        e_vld  <= 1'b1;
        e_sop  <= sop_q;
        e_data <= {i_data, lo_q};
        have_q <= 1'b0;
      end else begin
        if (have_q) begin
          e_vld  <= 1'b1;
          e_sop  <= sop_q;
          e_data <= {{W{1'b0}}, lo_q};
        end
        have_q <= i_vld;
        sop_q  <= i_sop;
        lo_q   <= i_data;
      end
    end
  end

endmodule
