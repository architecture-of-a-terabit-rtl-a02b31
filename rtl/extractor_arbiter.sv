// extractor_arbiter: hands free extractor channels to requesting channels.
//
// The slice's arbitration circuitry looks at the Receive Request bits of all
// C channels and at which of its E extractor channels are busy (held by a
// packet being received or statically assigned). Each free extractor, taken
// in order 0..E-1, is given to the lowest-numbered requesting channel that
// has not yet been served in this cycle. The grant is combinational, so a
// header can be extracted in the cycle it is recognised. Fixed priority is
// this design's choice; the source architecture refers to fast self-routing
// concentrators without describing them.
module extractor_arbiter #(
  parameter int unsigned C  = 16,
  parameter int unsigned NE = 2
) (
  input  logic [C-1:0]          req,
  input  logic [NE-1:0]         busy,
  output logic [C-1:0][NE-1:0]  grant
);

  always_comb begin
    logic [C-1:0] pending;
    pending = req;
    grant   = '0;
    for (int e = 0; e < NE; e++) begin
      if (!busy[e]) begin
        for (int c = 0; c < C; c++) begin
          if (pending[c] && (grant[c] == '0)) begin
            grant[c][e] = 1'b1;
            pending[c]  = 1'b0;
            break;
          end
        end
      end
    end
  end

endmodule
