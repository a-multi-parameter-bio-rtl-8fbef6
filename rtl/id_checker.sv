// ID Checker of a Sensing-Electrode.
//
// Compares the address field of a received command frame with the SE's own
// 4-bit address. Address 0 is the broadcast address, answered by every SE
// without acknowledge; 1..14 are SE addresses (the network holds at most 14
// SEs); 15 is not a valid SE address. An SE whose own address is 0 or 15 is
// treated as unconfigured and never matches an individual address. Purely
// combinational. The address plan is this design's choice; the document only
// names the block and gives the 4-bit address field.
module id_checker
  import bio_pkg::*;
(
  input  logic [ADDR_W-1:0] frame_addr,
  input  logic [ADDR_W-1:0] my_id,
  output logic              id_valid,
  output logic              match,
  output logic              bcast
);
  assign id_valid = (my_id != BCAST_ADDR) && (my_id <= ADDR_W'(MAX_SE));
  assign bcast    = (frame_addr == BCAST_ADDR);
  assign match    = id_valid && (frame_addr == my_id);
endmodule
