// sec_checker: security checker in front of the DMA controller.
//
// It compares the NS-bit of an incoming DMA operation request with the DMA
// controller's security level. A request whose level is equal or higher
// passes; a lower one is rejected and never reaches the controller. It is
// purely combinational: pass_val and reject are valid in the cycle in_val is,
// and in_rdy is out_rdy for a passing request and 1 for a rejected one (the
// rejected request is consumed).
//
// The rule ("equal or higher passes") is the reference design's; the
// handshake is this design's choice.
module sec_checker (
  input  logic  in_val,
  output logic  in_rdy,
  input  logic  in_ns,
  input  logic  level,
  output logic  pass_val,
  input  logic  pass_rdy,
  output logic  reject
);
  logic ok;
  assign ok       = (in_ns >= level);
  assign pass_val = in_val && ok;
  assign reject   = in_val && !ok;
  assign in_rdy   = ok ? pass_rdy : 1'b1;
endmodule
