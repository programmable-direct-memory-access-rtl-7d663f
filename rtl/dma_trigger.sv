// dma_trigger -- trigger circuit of one DMA channel.
//
// DMAxTSEL picks one of NTRIG trigger lines. The chosen line is registered
// once (the one-cycle synchronisation the controller spends before a
// transfer) and compared with its previous value to find a rising edge.
// trig_edge is a one-cycle pulse for edge-sensitive channels (DMALEVEL=0),
// trig_level is the registered high level for level-sensitive channels
// (DMALEVEL=1). A software request (DMAREQ written as 1, a one-cycle pulse)
// counts as both an edge and a high level in the same cycle.
// Line selection by a 5-bit DMAxTSEL and the edge/level choice follow the
// controller description; the single synchroniser stage and the way DMAREQ is
// merged with the selected line are this design's choices.
// Timing: a line that rises before clock edge k gives trig_edge in the cycle
// after edge k.
module dma_trigger #(
  parameter int unsigned NTRIG  = dmac_pkg::NTRIG,
  parameter int unsigned TSEL_W = dmac_pkg::TSEL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTRIG-1:0]  trig_i,     // trigger lines DMAxTRIG0..31
  input  logic [TSEL_W-1:0] tsel,       // DMAxTSEL
  input  logic              sw_req,     // DMAREQ pulse
  output logic              trig_edge,  // rising edge seen (or DMAREQ)
  output logic              trig_level  // line high (or DMAREQ)
);

  logic sel_q, prev_q;
  logic sel_line;

  always_comb sel_line = (32'(tsel) < NTRIG) ? trig_i[tsel] : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= 1'b0;
      prev_q <= 1'b0;
    end else begin
      sel_q  <= sel_line;
      prev_q <= sel_q;
    end
  end

  always_comb begin
    trig_edge  = (sel_q & ~prev_q) | sw_req;
    trig_level = sel_q | sw_req;
  end

endmodule
