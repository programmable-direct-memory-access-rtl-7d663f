// dma_arbiter -- DMA channel priority.
//
// Chooses which requesting channel gets the next transfer. With
// ROUNDROBIN=0 the priority is fixed, channel 0 highest and channel NCH-1
// lowest. With ROUNDROBIN=1 the priority changes with each transfer: the
// channel just served becomes the lowest and the search starts at the one
// after it. A channel that is in the middle of a block or burst-block
// (hold bit set while requesting) keeps the bus: while any such channel
// requests, only held channels take part, so another channel cannot cut into
// a block once it has started.
// Fixed and round-robin orders follow the controller description; the
// hold rule is this design's reading of "other channels are prevented from
// interfering with that service until it is completed".
// Interface: gnt_valid/gnt_ch are combinational from req/hold and the
// round-robin pointer; take/take_ch (a transfer was accepted) move the
// pointer at the next clock edge.
module dma_arbiter #(
  parameter int unsigned NCH  = dmac_pkg::NCH,
  parameter int unsigned CH_W = $clog2(NCH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCH-1:0]  req,
  input  logic [NCH-1:0]  hold,
  input  logic            rr_en,
  input  logic            take,
  input  logic [CH_W-1:0] take_ch,
  output logic            gnt_valid,
  output logic [CH_W-1:0] gnt_ch
);

  logic [CH_W-1:0] last_q;   // last channel served
  logic [NCH-1:0]  elig;

  always_comb begin
    logic [CH_W-1:0] idx;
    idx       = '0;
    elig      = (|(req & hold)) ? (req & hold) : req;
    gnt_valid = |elig;
    gnt_ch    = '0;
    if (rr_en) begin
      // search from last+1 upwards, wrapping; the first hit wins
      for (int i = NCH; i >= 1; i--) begin
        idx = CH_W'((32'(last_q) + 32'(i)) % NCH);
        if (elig[idx]) gnt_ch = idx;
      end
    end else begin
      for (int i = NCH - 1; i >= 0; i--)
        if (elig[i]) gnt_ch = CH_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= CH_W'(NCH - 1);
    else if (take && rr_en)    last_q <= take_ch;
  end

  // a grant always names a channel that is requesting
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid |-> req[gnt_ch]);

endmodule
