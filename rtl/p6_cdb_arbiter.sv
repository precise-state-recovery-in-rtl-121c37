// p6_cdb_arbiter: common data bus arbiter.
//
// The single CDB carries one <tag, value> per cycle.  Each functional unit
// with a finished result raises a request (its C register); the arbiter
// grants the lowest-numbered requester and drives the CDB with its result.
// Losers keep their result and stall ("CDB busy ? stall" in the slides).
// Fixed priority is this design's choice; the core puts the load unit first,
// then the two multiply units, then the ALU.  Combinational.
module p6_cdb_arbiter
  import p6_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  cdb_t         req_i   [N],
  output logic [N-1:0] grant_o,
  output cdb_t         cdb_o
);

  always_comb begin
    grant_o = '0;
    cdb_o   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req_i[i].valid) begin
        grant_o    = '0;
        grant_o[i] = 1'b1;
        cdb_o      = req_i[i];
      end
    end
  end

  a_onehot: assert final ($onehot0(grant_o));

endmodule
