// dma_cntrl -- eight-channel programmable DMA controller with AHB ports.
//
// The CPU programs the controller through an AHB slave port (hsel, haddr,
// htrans, hwrite, hsize, hwdata -> hrdata). The controller moves data through
// its own AHB master port (do_h* outputs, hrdata_i/hready_i inputs) while it
// holds the CPU off the bus with halt_cpu.
//
// Register map (haddr[7:0], 16 bytes per block):
//   00h..0Fh  global   DMACTL0..3 (trigger selects), DMACTL4, DMAIV at 0Eh
//   10h+16*n  channel n: DMAxCTL 00h, DMAxSA 02h, DMAxDA 06h, DMAxSZ 0Ah
//
// Structure: for every channel a trigger circuit (dma_trigger) picks one of
// 32 trigger lines with its DMAxTSEL and detects edges or levels; the
// channel (dma_channel) holds its registers and runs the single / block /
// burst-block state machine. The arbiter (dma_arbiter) picks the requesting
// channel by fixed or round-robin priority, the bus engine (dma_ahb_master)
// performs the read/write pair of each transfer in two cycles, dma_halt_ctrl
// raises halt_cpu and handles DMARMWDIS and NMI aborts, and dma_iv combines the
// DMAIFG flags into DMAIV and the interrupt line dma_irq.
//
// The set of blocks, the eight channels, the register map offsets and the
// AHB signal names follow the controller description and its block and pin
// diagrams. The packing of the registers into 32-bit bus words, placing the
// channel blocks at 10h+16*n, the added hwrite/hready/hreadyout/hresp
// handshake signals and the NMI, read-modify-write and halt pins are this
// design's choices.
module dma_cntrl
  import dmac_pkg::*;
(
  input  logic                        hclk,
  input  logic                        hresetn,
  // AHB slave: register access
  input  logic                        hsel,
  input  logic [31:0]                 haddr,
  input  logic [1:0]                  htrans,
  input  logic                        hwrite,
  input  logic [2:0]                  hsize,
  input  logic [31:0]                 hwdata,
  input  logic                        hready,
  output logic                        hreadyout,
  output logic [1:0]                  hresp,
  output logic [31:0]                 hrdata,
  // AHB master: data transfers
  output logic [31:0]                 do_haddr,
  output logic [1:0]                  do_htrans,
  output logic                        do_hwrite,
  output logic [2:0]                  do_hsize,
  output logic [2:0]                  do_hburst,
  output logic                        do_hmasterlock,
  output logic [31:0]                 do_hwdata,
  input  logic [31:0]                 hrdata_i,
  input  logic                        hready_i,
  // triggers, CPU and interrupt
  input  logic [NCH-1:0][NTRIG-1:0]   dma_trig,
  input  logic                        nmi,
  input  logic                        cpu_rmw,
  output logic                        halt_cpu,
  output logic                        dma_irq
);

  // ------------------------------------------------------------ register bus
  logic        reg_wr, reg_rd;
  logic [7:2]  reg_addr;
  logic [3:0]  reg_be;
  logic [31:0] reg_wdata, reg_rdata;

  dma_ahb_slave #(.RA_W(8)) u_slave (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready, .hreadyout, .hresp, .hrdata,
    .reg_wr, .reg_rd, .reg_addr, .reg_be, .reg_wdata, .reg_rdata
  );

  logic [3:0] blk;
  logic [1:0] word;
  assign blk  = reg_addr[7:4];
  assign word = reg_addr[3:2];

  // ------------------------------------------------------------ global regs
  logic [NCH-1:0][TSEL_W-1:0] tsel;
  logic        ennmi, roundrobin, rmwdis;
  logic [15:0] iv;
  logic [31:0] g_rdata [4];
  logic        iv_access;
  logic [NCH-1:0] ifg, ie, ifg_clr;

  dma_global_regs u_gregs (
    .clk(hclk), .rst_n(hresetn),
    .wr(reg_wr && blk == 4'd0), .word, .be(reg_be), .wdata(reg_wdata),
    .iv, .rdata(g_rdata), .tsel, .ennmi, .roundrobin, .rmwdis
  );

  assign iv_access = (reg_wr || reg_rd) && blk == 4'd0 && word == 2'd3 &&
                     (|reg_be[3:2]);

  dma_iv u_iv (.ifg, .ie, .access(iv_access), .iv, .clr(ifg_clr), .irq(dma_irq));

  // ------------------------------------------------------------ channels
  logic [NCH-1:0] ch_req, ch_hold, ch_take, ch_en;
  logic [NCH-1:0] t_edge, t_level, sw_req;
  xfer_t          ch_xfer [NCH];
  logic [31:0]    ch_rdata [NCH][4];

  logic            gnt_valid, take, busy, start_ok, cpu_run, nmi_abort;
  logic [CH_W-1:0] gnt_ch, take_ch;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    dma_trigger u_trig (
      .clk(hclk), .rst_n(hresetn), .trig_i(dma_trig[c]), .tsel(tsel[c]),
      .sw_req(sw_req[c]), .trig_edge(t_edge[c]), .trig_level(t_level[c])
    );

    dma_channel u_ch (
      .clk(hclk), .rst_n(hresetn),
      .wr(reg_wr && blk == 4'(c + 1)), .word, .be(reg_be), .wdata(reg_wdata),
      .rdata(ch_rdata[c]),
      .trig_edge(t_edge[c]), .trig_level(t_level[c]), .sw_req(sw_req[c]),
      .req(ch_req[c]), .hold(ch_hold[c]), .xfer(ch_xfer[c]),
      .take(ch_take[c]),
      .nmi_abort, .cpu_run, .ifg_clr(ifg_clr[c]),
      .ifg(ifg[c]), .ie(ie[c]), .en(ch_en[c])
    );

    assign ch_take[c] = take && take_ch == CH_W'(c);
  end

  // ------------------------------------------------------------ read mux
  always_comb begin
    reg_rdata = 32'h0;
    if (blk == 4'd0) reg_rdata = g_rdata[word];
    for (int c = 0; c < NCH; c++)
      if (blk == 4'(c + 1)) reg_rdata = ch_rdata[c][word];
  end

  // ------------------------------------------------------------ arbitration
  dma_arbiter u_arb (
    .clk(hclk), .rst_n(hresetn), .req(ch_req), .hold(ch_hold),
    .rr_en(roundrobin), .take, .take_ch, .gnt_valid, .gnt_ch
  );

  // a channel that is not enabled never requests
  a_req_en: assert property (@(posedge hclk) disable iff (!hresetn) (ch_req & ~ch_en) == '0);

  dma_halt_ctrl u_halt (
    .clk(hclk), .rst_n(hresetn), .any_req(|ch_req), .engine_busy(busy),
    .rmwdis, .cpu_rmw, .ennmi, .nmi,
    .start_ok, .halt_cpu, .cpu_run, .nmi_abort
  );

  // ------------------------------------------------------------ bus engine
  dma_ahb_master u_mst (
    .hclk, .hresetn,
    .gnt_valid, .gnt_ch, .gnt_xfer(ch_xfer[gnt_ch]), .start_ok,
    .take, .take_ch, .busy,
    .haddr(do_haddr), .htrans(do_htrans), .hwrite(do_hwrite),
    .hsize(do_hsize), .hburst(do_hburst), .hmasterlock(do_hmasterlock),
    .hwdata(do_hwdata), .hrdata(hrdata_i), .hready(hready_i)
  );

endmodule
