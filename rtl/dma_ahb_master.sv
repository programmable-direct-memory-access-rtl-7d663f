// dma_ahb_master -- bus engine: the controller's AHB master port.
//
// Every DMA transfer is one AHB read from the source followed by one AHB
// write to the destination, both single (HBURST=SINGLE, HTRANS=NONSEQ)
// transfers. The engine uses the AHB address/data pipeline so that a
// transfer costs two bus cycles in steady state:
//   cycle 1  read  address phase  (source)
//   cycle 2  read  data phase  +  write address phase (destination)
//   cycle 3  write data phase  +  read address phase of the next transfer
// A block of N transfers therefore occupies 2*N cycles plus one cycle for
// the last write data phase. hready low stretches any phase.
//
// The read address phase is driven from the arbiter's grant. When it is
// accepted (hready high) the engine copies the transfer into its own register
// and pulses take, so the channel can update its counters while the engine
// works on the copy. If the grant is stalled by hready low the choice is
// latched, so the address stays stable as AHB requires.
//
// Byte/word conversion: a byte source is read from the lane selected by
// address bits 1:0, a word (16-bit) source from the half selected by bit 1.
// Byte to word pads the upper byte with zeros, word to byte keeps the lower
// byte. Write data is replicated over all lanes so it sits in the lane the
// address selects. hmasterlock is held over the read/write pair of a
// transfer so an arbiter cannot split it.
// The two-cycle transfer, the byte/word rules and the AHB signal names follow
// the controller description and its pin diagram; the pipelining scheme, the
// lane replication and the use of hmasterlock are this design's choices.
module dma_ahb_master
  import dmac_pkg::xfer_t, dmac_pkg::ADDR_W;
#(
  parameter int unsigned NCH  = dmac_pkg::NCH,
  parameter int unsigned CH_W = $clog2(NCH)
) (
  input  logic            hclk,
  input  logic            hresetn,
  // arbiter
  input  logic            gnt_valid,
  input  logic [CH_W-1:0] gnt_ch,
  input  xfer_t           gnt_xfer,
  input  logic            start_ok,
  output logic            take,
  output logic [CH_W-1:0] take_ch,
  output logic            busy,
  // AHB master
  output logic [31:0]     haddr,
  output logic [1:0]      htrans,
  output logic            hwrite,
  output logic [2:0]      hsize,
  output logic [2:0]      hburst,
  output logic            hmasterlock,
  output logic [31:0]     hwdata,
  input  logic [31:0]     hrdata,
  input  logic            hready
);

  typedef enum logic [1:0] {E_IDLE, E_RD, E_WR} eng_state_e;

  eng_state_e      state_q;
  xfer_t           cur_q;      // transfer whose read/write is in flight
  logic [15:0]     data_q;     // value read, converted for the destination
  logic            lockv_q;    // a stalled read address phase is latched
  xfer_t           lock_x_q;
  logic [CH_W-1:0] lock_ch_q;

  xfer_t           rd_x;
  logic [CH_W-1:0] rd_ch;
  logic            issue;      // read address phase driven this cycle
  logic [15:0]     rd_val;

  always_comb begin
    rd_x  = lockv_q ? lock_x_q  : gnt_xfer;
    rd_ch = lockv_q ? lock_ch_q : gnt_ch;
    issue = (state_q != E_RD) && (lockv_q || (gnt_valid && start_ok));

    take    = issue && hready;
    take_ch = rd_ch;
    busy    = (state_q != E_IDLE) || lockv_q;

    hburst = dmac_pkg::HBURST_SINGLE;
    if (state_q == E_RD) begin
      haddr  = {{(32 - ADDR_W){1'b0}}, cur_q.dst};
      htrans = dmac_pkg::HTRANS_NONSEQ;
      hwrite = 1'b1;
      hsize  = cur_q.dstbyte ? dmac_pkg::HSIZE_BYTE : dmac_pkg::HSIZE_HALF;
    end else begin
      haddr  = issue ? {{(32 - ADDR_W){1'b0}}, rd_x.src} : 32'h0;
      htrans = issue ? dmac_pkg::HTRANS_NONSEQ : dmac_pkg::HTRANS_IDLE;
      hwrite = 1'b0;
      hsize  = (issue && !rd_x.srcbyte) ? dmac_pkg::HSIZE_HALF : dmac_pkg::HSIZE_BYTE;
    end
    hmasterlock = issue || (state_q == E_RD);

    hwdata = (state_q == E_WR) ? {2{data_q}} : 32'h0;
    if (state_q == E_WR && cur_q.dstbyte) hwdata = {4{data_q[7:0]}};

    // read data from the addressed lane, converted for the destination
    if (cur_q.srcbyte) rd_val = {8'h00, hrdata[8 * cur_q.src[1:0] +: 8]};
    else               rd_val = hrdata[16 * cur_q.src[1] +: 16];
    if (cur_q.dstbyte) rd_val = {8'h00, rd_val[7:0]};
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q   <= E_IDLE;
      cur_q     <= '0;
      data_q    <= '0;
      lockv_q   <= 1'b0;
      lock_x_q  <= '0;
      lock_ch_q <= '0;
    end else if (hready) begin
      lockv_q <= 1'b0;
      unique case (state_q)
        E_RD:    begin
                   data_q  <= rd_val;
                   state_q <= E_WR;
                 end
        default: state_q <= E_IDLE;
      endcase
      if (issue) begin
        cur_q   <= rd_x;
        state_q <= E_RD;
      end
    end else if (issue && !lockv_q) begin
      lockv_q   <= 1'b1;
      lock_x_q  <= gnt_xfer;
      lock_ch_q <= gnt_ch;
    end
  end

  // AHB rule: an address phase that is waited must not change
  a_addr_stable: assert property (@(posedge hclk) disable iff (!hresetn)
    (htrans == dmac_pkg::HTRANS_NONSEQ && !hready) |=>
      (htrans == dmac_pkg::HTRANS_NONSEQ && $stable(haddr) && $stable(hwrite)));

endmodule
