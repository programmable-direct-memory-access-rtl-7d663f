// dma_iv -- DMA interrupt vector (DMAIV).
//
// All enabled channel flags (DMAIFG and DMAIE both set) are prioritised,
// channel 0 highest. DMAIV reads 2*(k+1) for the highest-priority pending
// channel k, or 0 when none is pending, so 02h is channel 0 and 10h is
// channel 7. Flags whose interrupt is disabled do not affect the value.
// Any access to DMAIV (read or write) clears the flag of the channel it
// shows: clr is a one-hot pulse, in the access cycle, to that channel.
// irq is the single combined interrupt request.
// All of this follows the controller description; the module is purely
// combinational.
module dma_iv #(
  parameter int unsigned NCH = dmac_pkg::NCH
) (
  input  logic [NCH-1:0] ifg,
  input  logic [NCH-1:0] ie,
  input  logic           access,
  output logic [15:0]    iv,
  output logic [NCH-1:0] clr,
  output logic           irq
);

  logic [NCH-1:0] pend;

  always_comb begin
    pend = ifg & ie;
    irq  = |pend;
    iv   = 16'h0000;
    clr  = '0;
    for (int i = NCH - 1; i >= 0; i--) begin
      if (pend[i]) begin
        iv  = 16'(2 * (i + 1));
        clr = NCH'(1) << i;
      end
    end
    if (!access) clr = '0;
  end

  // at most one flag is cleared per access
  always_comb a_clr_onehot: assert ((clr & (clr - 1'b1)) == '0);

endmodule
