// Address buffer of the Main-Electrode.
//
// Holds one presence bit per SE address 1..MAX_SE, written during each
// SE-Chain Scan: scan_begin snapshots the current set, then every scan_wr
// sets or clears the bit of scan_addr from the acknowledge result. new_se is
// high while the set holds an address that the snapshot did not (an SE has
// joined); gone_se while the snapshot holds one the set does not (an SE has
// left). For the collection loop, next_addr is the lowest present address
// above cur_addr (next_valid low if there is none), and n_active counts the
// present SEs. Presence bits are cleared by reset. The document says only
// that the address of each active SE is recorded in an on-chip buffer; the
// bit-mask organisation is this design's choice.
module addr_buffer
  import bio_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scan_begin,
  input  logic              scan_wr,
  input  logic [ADDR_W-1:0] scan_addr,
  input  logic              scan_present,
  input  logic [ADDR_W-1:0] cur_addr,
  output logic [ADDR_W-1:0] next_addr,
  output logic              next_valid,
  output logic [MAX_SE:1]   active,
  output logic              new_se,
  output logic              gone_se,
  output logic [ADDR_W-1:0] n_active
);
  logic [MAX_SE:1] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      prev   <= '0;
    end else begin
      if (scan_begin) prev <= active;
      if (scan_wr && scan_addr >= ADDR_W'(1) && scan_addr <= ADDR_W'(MAX_SE))
        active[scan_addr] <= scan_present;
    end
  end

  assign new_se  = |(active & ~prev);
  assign gone_se = |(prev & ~active);

  always_comb begin
    next_addr  = '0;
    next_valid = 1'b0;
    n_active   = '0;
    for (int a = MAX_SE; a >= 1; a--) begin
      if (active[a]) n_active = n_active + 1'b1;
      if (active[a] && ADDR_W'(a) > cur_addr) begin
        next_addr  = ADDR_W'(a);
        next_valid = 1'b1;
      end
    end
  end
endmodule
