// mode_select: node mode selection from the 8-bit mode selection identifier.
//
// The identifier carries the target (receiving) node ID in its high nibble and
// the relaying number in its low nibble. A node whose own ID equals the target
// ID is the receiving node, whatever the relaying number. Otherwise a relaying
// number of 1 (the frame came straight from the sending node) makes it the
// primary relaying node, and any other number a checking-relaying node. The
// identifier the node forwards is the received one with the relaying number
// incremented by one.
//
// Interface: ident_valid qualifies ident; mode1/mode2/mode3 are one-hot flags
// for primary relaying, checking-relaying and receiving (all 0 when ident_valid
// is 0); mode gives the same as an enum; ident_fwd is the identifier to forward.
// Timing: purely combinational.
// The field layout, the relaying-number rule, the receive priority and the
// increment follow the published design; OWN_ID default 5 is the node ID used in
// its simulation. Wrap-around of the 4-bit relaying number is this design's choice.
module mode_select
  import brain_pkg::*;
#(
  parameter logic [ID_W-1:0] OWN_ID = 4'h5
) (
  input  logic   ident_valid,
  input  ident_t ident,
  output logic   mode1,      // primary relaying
  output logic   mode2,      // checking-relaying
  output logic   mode3,      // receiving
  output mode_e  mode,
  output ident_t ident_fwd
);

  always_comb begin
    mode = MODE_NONE;
    if (ident_valid) begin
      if (ident.dst == OWN_ID)              mode = MODE_RECEIVE;
      else if (ident.relay == RELAY_SENDER) mode = MODE_PRIMARY;
      else                                  mode = MODE_CHECK;
    end
    mode1 = (mode == MODE_PRIMARY);
    mode2 = (mode == MODE_CHECK);
    mode3 = (mode == MODE_RECEIVE);
    ident_fwd.dst   = ident.dst;
    ident_fwd.relay = ident.relay + 1'b1;
  end

endmodule
