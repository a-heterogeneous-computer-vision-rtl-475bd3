// tag_router -- connects the tag chains of the GLiTCH chips into one 1-D
// array and gathers the responder flag for the controller.
//
// The last PE of chip i feeds the first PE of chip i+1 for upward tag
// shifts, and the first PE of chip i+1 feeds the last PE of chip i for
// downward shifts.  With rot high the two array ends are joined into a ring
// (a barrel shift of the tags); otherwise zeros enter at the ends.  For the
// first-responder operation each chip is told whether any chip before it has
// a tagged PE.  some_any is the OR of all chips' responders and is a
// condition flag of the sequencer.
//
// Purely combinational.  Most outputs are therefore plain wires from a
// neighbouring chip's edge tag, and lower_some of chip 0 is always 0.  The design names a TAG router between the
// controller and the GLiTCH array; what it does here is this
// implementation's reading of that name together with the 1-D connectivity
// and barrel shift described for the array.
module tag_router
  import apa_pkg::*;
#(
  parameter int unsigned NC = N_CHIPS
) (
  input  logic          rot,
  input  logic [NC-1:0] tag_first,
  input  logic [NC-1:0] tag_last,
  input  logic [NC-1:0] some,
  output logic [NC-1:0] tag_up_in,
  output logic [NC-1:0] tag_dn_in,
  output logic [NC-1:0] lower_some,
  output logic          some_any
);

  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int i = 0; i < int'(NC); i++) begin
      tag_up_in[i]  = (i == 0)          ? (rot & tag_last[NC-1]) : tag_last[i-1];
      tag_dn_in[i]  = (i == int'(NC)-1) ? (rot & tag_first[0])   : tag_first[i+1];
      lower_some[i] = seen;
      seen          = seen | some[i];
    end
    some_any = seen;
  end

endmodule
