// dma_global_regs -- global control registers DMACTL0..DMACTL4 and the read
// path of DMAIV.
//
// Register block layout (byte offsets, little endian on a 32-bit bus):
//   00h DMACTL0  bits 12:8 DMA1TSEL, bits 4:0 DMA0TSEL
//   02h DMACTL1  DMA3TSEL / DMA2TSEL
//   04h DMACTL2  DMA5TSEL / DMA4TSEL
//   06h DMACTL3  DMA7TSEL / DMA6TSEL
//   08h DMACTL4  bit 2 DMARMWDIS, bit 1 ROUNDROBIN, bit 0 ENNMI
//   0Eh DMAIV    read only, value supplied by dma_iv
// Reserved bits read as 0 and ignore writes. All fields reset to 0.
// The offsets and bit positions follow the controller's register tables;
// packing two 16-bit registers into one 32-bit bus word is this design's
// choice. Interface: wr/word/be/wdata is a one-cycle write strobe from the bus
// slave; rdata(word) is combinational.
module dma_global_regs #(
  parameter int unsigned NCH    = dmac_pkg::NCH,
  parameter int unsigned TSEL_W = dmac_pkg::TSEL_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr,
  input  logic [1:0]                  word,     // word within the 16-byte block
  input  logic [3:0]                  be,
  input  logic [31:0]                 wdata,
  input  logic [15:0]                 iv,
  output logic [31:0]                 rdata [4],
  output logic [NCH-1:0][TSEL_W-1:0]  tsel,
  output logic                        ennmi,
  output logic                        roundrobin,
  output logic                        rmwdis
);

  localparam int unsigned NCTL = (NCH + 1) / 2;   // DMACTL0..3

  logic [15:0] ctl_q [NCTL];
  logic [2:0]  ctl4_q;

  function automatic logic [15:0] ctl_mask(input logic [15:0] v);
    return v & 16'h1F1F;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTL; i++) ctl_q[i] <= '0;
      ctl4_q <= '0;
    end else if (wr) begin
      for (int i = 0; i < NCTL; i++) begin
        // register i sits in word i/2, half i%2
        if (word == 2'(i / 2)) begin
          if (i % 2 == 0)
            ctl_q[i] <= ctl_mask(dmac_pkg::merge16(ctl_q[i], wdata[15:0], be[1:0]));
          else
            ctl_q[i] <= ctl_mask(dmac_pkg::merge16(ctl_q[i], wdata[31:16], be[3:2]));
        end
      end
      if (word == 2'd2 && be[0]) ctl4_q <= wdata[2:0];
    end
  end

  always_comb begin
    for (int w = 0; w < 4; w++) rdata[w] = '0;
    for (int i = 0; i < NCTL; i++) rdata[i / 2][16 * (i % 2) +: 16] = ctl_q[i];
    rdata[2] = {16'h0000, 13'h0, ctl4_q};
    rdata[3] = {iv, 16'h0000};
    for (int c = 0; c < NCH; c++)
      tsel[c] = ctl_q[c / 2][8 * (c % 2) +: TSEL_W];
    ennmi      = ctl4_q[0];
    roundrobin = ctl4_q[1];
    rmwdis     = ctl4_q[2];
  end

endmodule
