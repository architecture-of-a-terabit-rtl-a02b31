// address_latch: the unique PCB address of a smart pixel array.
//
// The message processor loads the address bit-serially to save I/O pins:
// while shift is high, sdi enters a shift register, most significant bit
// first. A pulse on load copies the shift register into the address latch,
// whose bits feed the address comparator cells of every channel (bit k of
// the address lines up with bit k of a channel word). Splitting shift
// register and latch keeps the address steady while a new one is shifted
// in; that split, the bit order and the reset value 0 (match nothing) are
// this design's choices. One-hot addresses of A_BITS = 16 bits serve 16 PCBs.
module address_latch #(
  parameter int unsigned A = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sdi,
  input  logic         load,
  output logic [A-1:0] addr
);

  logic [A-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      addr <= '0;
    end else begin
      if (shift) sreg <= {sreg[A-2:0], sdi};
      if (load)  addr <= sreg;
    end
  end

endmodule
