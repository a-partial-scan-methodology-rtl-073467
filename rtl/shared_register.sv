// shared_register: data register shared through a Call, bundled with RS/AS.
//
// The register sits beside the delay that turns the Call's RS into AS: its
// P input is driven by RS and its C input by AS. The data input must be
// stable before the RS transition (bundled data). Between the RS transition
// and the AS transition P and C differ and the register is transparent, so
// DIN is written; when AS arrives P = C again and the value is held, valid on
// DOUT for the client that receives the acknowledge.
//
// Only the register's place in the circuit and its P and C inputs are given;
// the "transparent while P != C" rule and the width are this design's
// choices. The latch warning the tools give is this intended storage.
module shared_register #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] din,
  input  logic         p,     // from RS
  input  logic         c,     // from AS
  output logic [W-1:0] dout
);

  always_latch begin
    if (p ^ c) dout = din;
  end

endmodule
