// dma_channel -- one channel of the DMA controller: its registers and its
// transfer-mode state machine.
//
// Registers (byte offsets inside the channel's 16-byte block):
//   00h DMAxCTL   control word, see dmac_pkg::dmactl_t
//   02h DMAxSA    source address, 20 bits over 02h..05h
//   06h DMAxDA    destination address, 20 bits over 06h..09h
//   0Ah DMAxSZ    transfer count
// Setting DMAEN copies SA, DA and SZ into the temporary registers T_SourceAdd,
// T_DestAdd and T_Size. Each transfer steps the temporary addresses
// (DMASRCINCR/DMADSTINCR, by 1 for bytes and 2 for words) and decrements
// DMAxSZ. When DMAxSZ reaches zero DMAIFG is set, DMAxSZ is reloaded from
// T_Size and the temporary addresses from SA/DA; the non-repeated modes
// (DMADT 0-3) then clear DMAEN, the repeated ones (DMADT 4-7) stay enabled.
//
// States: OFF (DMAEN=0), WAIT (enabled, waiting for a trigger; also the idle
// state while DMAABORT=1), ACTIVE (requesting transfers) and SLOT (burst-block
// pause that gives the CPU CPU_SLOT bus cycles after every BURST_LEN
// transfers).
//   single        : one trigger, one transfer, back to WAIT
//   block         : one trigger, transfers until DMAxSZ reaches zero
//   burst-block   : as block, with a CPU slot every BURST_LEN transfers;
//                   the repeated form restarts at once without a trigger
// Edge-sensitive channels (DMALEVEL=0) start on trig_edge and ignore triggers
// while a block runs. Level-sensitive channels start while trig_level is high,
// and a block pauses (req low, state kept) while the trigger is low.
// An NMI abort (nmi_abort, only produced when ENNMI=1) lets the transfer in
// flight finish, stops the channel in WAIT and sets DMAABORT, which keeps it
// from accepting triggers until software clears it.
// Writing DMAREQ=1 produces a software trigger one cycle later; the bit reads 0.
//
// All of the above follows the controller description and its block-transfer
// state diagram. The register packing on a 32-bit bus, the rule that a
// 16-bit write to the low half of SA/DA clears bits 19:16, the priority of a
// software write over a transfer update in the same cycle and the one-cycle
// delay of DMAREQ are this design's choices.
// Interface: take (a transfer of this channel was accepted by the bus
// engine) updates the counters at the next edge; req/hold/xfer are registered
// state.
module dma_channel
  import dmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register access
  input  logic        wr,
  input  logic [1:0]  word,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  output logic [31:0] rdata [4],
  // trigger
  input  logic        trig_edge,
  input  logic        trig_level,
  output logic        sw_req,
  // bus engine / arbiter
  output logic        req,
  output logic        hold,
  output xfer_t       xfer,
  input  logic        take,
  // control
  input  logic        nmi_abort,
  input  logic        cpu_run,
  input  logic        ifg_clr,
  output logic        ifg,
  output logic        ie,
  output logic        en
);

  typedef enum logic [1:0] {CH_OFF, CH_WAIT, CH_ACTIVE, CH_SLOT} ch_state_e;

  ch_state_e         state_q;
  dmactl_t           ctl_q;
  logic [ADDR_W-1:0] sa_q, da_q, tsa_q, tda_q;
  logic [15:0]       sz_q, tsz_q;
  logic [$clog2(BURST_LEN)-1:0] bcnt_q;
  logic [$clog2(CPU_SLOT+1)-1:0] scnt_q;
  logic              sw_req_q;

  dmactl_t ctl_rd;
  always_comb begin
    ctl_rd       = ctl_q;
    ctl_rd.rsvd  = 1'b0;
    ctl_rd.req   = 1'b0;
  end

  // ---------------------------------------------------------------- outputs
  always_comb begin
    req = 1'b0;
    if (state_q == CH_ACTIVE && !ctl_q.abrt && sz_q != 16'h0)
      req = (ctl_q.level && is_block(ctl_q.dmadt)) ? trig_level : 1'b1;
    hold         = (state_q == CH_ACTIVE) && is_block(ctl_q.dmadt);
    xfer.src     = tsa_q;
    xfer.dst     = tda_q;
    xfer.srcbyte = ctl_q.srcbyte;
    xfer.dstbyte = ctl_q.dstbyte;
    ifg          = ctl_q.ifg;
    ie           = ctl_q.ie;
    en           = ctl_q.en;
    sw_req       = sw_req_q;
    rdata[0] = {sa_q[15:0], ctl_rd};
    rdata[1] = {da_q[15:0], 12'h000, sa_q[19:16]};
    rdata[2] = {sz_q, 12'h000, da_q[19:16]};
    rdata[3] = 32'h0;
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= CH_OFF;
      ctl_q    <= '0;
      sa_q     <= '0;
      da_q     <= '0;
      sz_q     <= '0;
      tsa_q    <= '0;
      tda_q    <= '0;
      tsz_q    <= '0;
      bcnt_q   <= '0;
      scnt_q   <= '0;
      sw_req_q <= 1'b0;
    end else begin
      sw_req_q <= 1'b0;

      // interrupt flag cleared by a DMAIV access
      if (ifg_clr) ctl_q.ifg <= 1'b0;

      // trigger acceptance and CPU slot
      unique case (state_q)
        CH_WAIT:
          if (!ctl_q.abrt && sz_q != 16'h0 &&
              (ctl_q.level ? trig_level : trig_edge))
            state_q <= CH_ACTIVE;
        CH_SLOT:
          if (cpu_run) begin
            if (32'(scnt_q) + 1 >= CPU_SLOT) begin
              scnt_q  <= '0;
              state_q <= CH_ACTIVE;
            end else begin
              scnt_q  <= scnt_q + 1'b1;
            end
          end
        default: ;
      endcase

      // one transfer accepted by the bus engine
      if (take) begin
        tsa_q <= step_addr(tsa_q, ctl_q.srcincr, ctl_q.srcbyte);
        tda_q <= step_addr(tda_q, ctl_q.dstincr, ctl_q.dstbyte);
        if (is_burst(ctl_q.dmadt)) bcnt_q <= bcnt_q + 1'b1;
        if (sz_q == 16'h1) begin
          // block (or single count) complete
          ctl_q.ifg <= 1'b1;
          sz_q      <= tsz_q;
          tsa_q     <= sa_q;
          tda_q     <= da_q;
          if (!is_repeated(ctl_q.dmadt)) begin
            ctl_q.en <= 1'b0;
            state_q  <= CH_OFF;
          end else if (!is_block(ctl_q.dmadt)) begin
            state_q  <= CH_WAIT;
          end else if (!is_burst(ctl_q.dmadt)) begin
            state_q  <= CH_WAIT;
          end else begin
            state_q  <= (32'(bcnt_q) == BURST_LEN - 1) ? CH_SLOT : CH_ACTIVE;
          end
        end else begin
          sz_q <= sz_q - 16'h1;
          if (!is_block(ctl_q.dmadt))
            state_q <= CH_WAIT;
          else if (is_burst(ctl_q.dmadt) && 32'(bcnt_q) == BURST_LEN - 1)
            state_q <= CH_SLOT;
        end
      end

      // NMI: finish the transfer in flight, stop further transfers
      if (nmi_abort && (state_q == CH_ACTIVE || state_q == CH_SLOT) &&
          !(take && sz_q == 16'h1 && !is_repeated(ctl_q.dmadt))) begin
        ctl_q.abrt <= 1'b1;
        state_q     <= CH_WAIT;
      end

      // software writes take precedence over the updates above
      if (wr) begin
        unique case (word)
          2'd0: begin
            if (|be[1:0]) begin
              dmactl_t nc;
              nc = dmactl_t'(merge16(ctl_rd, wdata[15:0], be[1:0]));
              ctl_q       <= nc;
              ctl_q.rsvd  <= 1'b0;
              ctl_q.req   <= 1'b0;
              sw_req_q    <= nc.req;
              if (!nc.en) begin
                state_q <= CH_OFF;
              end else if (!ctl_q.en) begin
                tsz_q   <= sz_q;
                tsa_q   <= sa_q;
                tda_q   <= da_q;
                bcnt_q  <= '0;
                scnt_q  <= '0;
                state_q <= CH_WAIT;
              end
            end
            if (|be[3:2])
              sa_q <= {4'h0, merge16(sa_q[15:0], wdata[31:16], be[3:2])};
          end
          2'd1: begin
            if (|be[1:0]) sa_q[19:16] <= be[0] ? wdata[3:0] : sa_q[19:16];
            if (|be[3:2])
              da_q <= {4'h0, merge16(da_q[15:0], wdata[31:16], be[3:2])};
          end
          2'd2: begin
            if (|be[1:0]) da_q[19:16] <= be[0] ? wdata[3:0] : da_q[19:16];
            if (|be[3:2]) sz_q <= merge16(sz_q, wdata[31:16], be[3:2]);
          end
          default: ;
        endcase
      end
    end
  end

  // only an enabled channel requests the bus; the engine only takes a request
  a_req_en:   assert property (@(posedge clk) disable iff (!rst_n) req |-> ctl_q.en);
  a_take_req: assert property (@(posedge clk) disable iff (!rst_n) take |-> req);

endmodule
