// mic_pi: Port Index unit of one MIC input port.
//
// Holds the scrambling function that spreads the address space over the
// memory banks. Word addresses are interleaved: bank = addr mod N_BANKS and
// the offset inside the bank is addr div N_BANKS, so consecutive words of an
// array sit in consecutive banks and irregular accesses spread over all ports.
// The interleaving is this design's choice; the controller only requires that
// the banks hold non-overlapping addresses. For a power-of-two bank count the
// function reduces to selecting address bits; other counts get a divider.
// This is the one place that knows the data distribution. Purely
// combinational.
module mic_pi #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned N_BANKS = 8,
  localparam int unsigned IDX_W  = mic_pkg::idx_w(N_BANKS)
) (
  input  logic [ADDR_W-1:0] addr,     // global word address from the requester
  output logic [IDX_W-1:0]  ind,      // destination memory port
  output logic [ADDR_W-1:0] offset    // word offset inside that bank
);

  always_comb begin
    ind    = IDX_W'(addr % ADDR_W'(N_BANKS));
    offset = addr / ADDR_W'(N_BANKS);
  end

endmodule
