// config_loader: downloads channel control words into a smart pixel array.
//
// One electrical injector channel is multiplexed to carry one byte of
// control per clock cycle. A byte with first = 1 goes to channel 0; every
// further valid byte goes to the next channel. After the NCH-th byte the
// array is fully configured and done rises; bytes beyond that are ignored
// until the next first. Reconfiguring 32 channels therefore takes 32 cycles.
// wr_en is a one-hot strobe registered in the loader, so a channel's word
// changes one cycle after its byte arrives.
module config_loader #(
  parameter int unsigned NCH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_vld,
  input  logic           cfg_first,
  input  logic [7:0]     cfg_byte,
  output logic [NCH-1:0] wr_en,
  output logic [7:0]     wr_data,
  output logic           done
);

  localparam int unsigned CW = $clog2(NCH) + 1;

  logic [CW-1:0] cnt;
  logic [CW-1:0] idx;

  assign idx = cfg_first ? '0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= CW'(NCH);
      wr_en   <= '0;
      wr_data <= '0;
      done    <= 1'b0;
    end else begin
      wr_en <= '0;
      if (cfg_vld && (idx < CW'(NCH))) begin
        for (int i = 0; i < NCH; i++) wr_en[i] <= (idx == CW'(i));
        wr_data    <= cfg_byte;
        cnt        <= idx + 1'b1;
        done       <= (idx == CW'(NCH - 1));
      end
    end
  end

endmodule
