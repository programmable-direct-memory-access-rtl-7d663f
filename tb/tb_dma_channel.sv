// tb_dma_channel -- self-checking test of one DMA channel.
// The testbench plays the bus engine (it accepts requests with random
// delays) and the trigger circuit. Each case programs the channel through its
// register port and checks the number of transfers, every source and
// destination address, DMAEN/DMAIFG/DMAxSZ afterwards and the CPU slots:
//   single, block, repeated block, burst-block (CPU slot after every four
//   transfers), repeated burst-block (restarts without a trigger),
//   level-sensitive block with the trigger dropping mid-block, NMI abort,
//   DMAxSZ = 0, software DMAREQ, repeated single, and DMAIV clearing DMAIFG.
module tb_dma_channel;
  import dmac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr = 1'b0;
  logic [1:0]  word = '0;
  logic [3:0]  be = '0;
  logic [31:0] wdata = '0;
  logic [31:0] rdata [4];
  logic        trig_edge = 0, trig_level = 0, sw_req;
  logic        req, hold, take, nmi_abort = 0, cpu_run, ifg_clr = 0, ifg, ie, en;
  xfer_t       xfer;
  logic        go = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dma_channel dut (.clk, .rst_n, .wr, .word, .be, .wdata, .rdata,
                   .trig_edge(trig_edge | sw_req), .trig_level(trig_level | sw_req), .sw_req,
                   .req, .hold, .xfer, .take, .nmi_abort, .cpu_run, .ifg_clr, .ifg, .ie, .en);

  // engine stand-in
  assign take    = req && go;
  assign cpu_run = !req;
  always @(negedge clk) go <= ($urandom_range(0, 2) != 0);

  // address model
  int          n_take = 0, n_slot = 0, blk_len = 1;
  logic [19:0] e_src, e_dst, s0, d0;
  int          sstep, dstep;
  logic        was_req = 0;
  always @(posedge clk) begin
    if (take) begin
      checks++;
      if (xfer.src !== e_src || xfer.dst !== e_dst) begin
        failures++;
        $display("FAIL take %0d src %h exp %h dst %h exp %h", n_take, xfer.src, e_src, xfer.dst, e_dst);
      end
      n_take++;
      if (n_take % blk_len == 0) begin e_src = s0; e_dst = d0; end
      else begin e_src = 20'(int'(e_src) + sstep); e_dst = 20'(int'(e_dst) + dstep); end
    end
  end
  // CPU slots in burst-block: cycles in which an active burst channel holds off
  always @(posedge clk) if (dut.state_q == 2'd3 && cpu_run) n_slot++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(input logic [1:0] w, input logic [3:0] b, input logic [31:0] d);
    @(negedge clk); wr = 1'b1; word = w; be = b; wdata = d;
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic setup(input logic [19:0] sa, input logic [19:0] da, input logic [15:0] sz);
    wreg(0, 4'b1100, {sa[15:0], 16'h0});
    wreg(1, 4'b0001, {28'h0, sa[19:16]});
    wreg(1, 4'b1100, {da[15:0], 16'h0});
    wreg(2, 4'b0001, {28'h0, da[19:16]});
    wreg(2, 4'b1100, {sz, 16'h0});
  endtask

  function automatic logic [15:0] ctlw(input dmadt_e dt, input incr_e di, input incr_e si,
                                       input logic db, input logic sb, input logic lvl,
                                       input logic e);
    dmactl_t c;
    c = '0; c.dmadt = dt; c.dstincr = di; c.srcincr = si; c.dstbyte = db; c.srcbyte = sb;
    c.level = lvl; c.en = e; c.ie = 1'b1;
    return c;
  endfunction

  task automatic model(input logic [19:0] sa, input logic [19:0] da, input int ss,
                       input int ds, input int len);
    s0 = sa; d0 = da; e_src = sa; e_dst = da; sstep = ss; dstep = ds; blk_len = len;
    n_take = 0; n_slot = 0;
  endtask

  task automatic pulse();
    @(negedge clk); trig_edge = 1'b1; @(negedge clk); trig_edge = 1'b0;
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic idle(input int n); repeat (n) @(negedge clk); endtask

  initial begin
    dmactl_t c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- single: one transfer per trigger, word source up, byte dest down
    setup(20'h1_2000, 20'h0_3000, 16'd3);
    model(20'h1_2000, 20'h0_3000, 2, -1, 3);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_SINGLE, INC_DEC, INC_INC, 1, 0, 0, 1)});
    idle(10);
    expect_eq(n_take, 0, "single: no transfer without trigger");
    for (int i = 1; i <= 3; i++) begin pulse(); idle(8); expect_eq(n_take, i, "single: one per trigger"); end
    expect_eq(en, 0, "single: DMAEN cleared");
    expect_eq(ifg, 1, "single: DMAIFG set");
    expect_eq(rdata[2][31:16], 3, "single: DMAxSZ reloaded");
    @(negedge clk); ifg_clr = 1'b1; @(negedge clk); ifg_clr = 1'b0;
    expect_eq(ifg, 0, "DMAIV access clears DMAIFG");

    // ---- block: one trigger, whole block, extra triggers ignored
    setup(20'h0_0100, 20'h0_0200, 16'd5);
    model(20'h0_0100, 20'h0_0200, 1, 2, 5);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 1, 0, 1)});
    pulse(); idle(3); pulse(); idle(30);
    expect_eq(n_take, 5, "block: transfers");
    expect_eq(en, 0, "block: DMAEN cleared");

    // ---- repeated block: stays enabled, addresses restart each block
    setup(20'h0_0400, 20'h0_0500, 16'd3);
    model(20'h0_0400, 20'h0_0500, 0, 2, 3);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_RBLOCK, INC_INC, INC_NONE, 0, 0, 0, 1)});
    pulse(); idle(20); pulse(); idle(20);
    expect_eq(n_take, 6, "repeated block: transfers");
    expect_eq(en, 1, "repeated block: DMAEN kept");
    wreg(0, 4'b0011, 32'h0);

    // ---- burst-block: CPU slot after every four transfers
    setup(20'h0_0600, 20'h0_0700, 16'd10);
    model(20'h0_0600, 20'h0_0700, -2, -2, 10);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_BURST, INC_DEC, INC_DEC, 0, 0, 0, 1)});
    pulse(); idle(60);
    expect_eq(n_take, 10, "burst: transfers");
    expect_eq(n_slot, 2 * CPU_SLOT, "burst: CPU slot cycles");
    expect_eq(en, 0, "burst: DMAEN cleared");

    // ---- repeated burst-block: runs on without triggers until DMAEN cleared
    setup(20'h0_0800, 20'h0_0900, 16'd4);
    model(20'h0_0800, 20'h0_0900, 2, 2, 4);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_RBURST, INC_INC, INC_INC, 0, 0, 0, 1)});
    pulse(); idle(60);
    checks++;
    if (n_take < 12) begin failures++; $display("FAIL repeated burst: only %0d transfers", n_take); end
    wreg(0, 4'b0011, 32'h0);
    idle(2);
    begin int n; n = n_take; idle(20); expect_eq(n_take, n, "repeated burst: stops on DMAEN=0"); end

    // ---- level-sensitive block: pauses while the trigger is low
    setup(20'h0_0A00, 20'h0_0B00, 16'd8);
    model(20'h0_0A00, 20'h0_0B00, 2, 2, 8);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 0, 1, 1)});
    idle(5);
    expect_eq(n_take, 0, "level: nothing while low");
    @(negedge clk); trig_level = 1'b1;
    wait (n_take == 3);
    @(negedge clk); trig_level = 1'b0;
    idle(10);
    checks++;
    if (n_take < 3 || n_take > 4) begin failures++; $display("FAIL level: paused at %0d", n_take); end
    expect_eq(en, 1, "level: still enabled while paused");
    @(negedge clk); trig_level = 1'b1;
    idle(30);
    trig_level = 1'b0;
    expect_eq(n_take, 8, "level: block completes after resume");

    // ---- NMI abort in a block
    setup(20'h0_0C00, 20'h0_0D00, 16'd20);
    model(20'h0_0C00, 20'h0_0D00, 2, 2, 20);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 0, 0, 1)});
    pulse();
    wait (n_take == 4);
    @(negedge clk); nmi_abort = 1'b1; @(negedge clk); nmi_abort = 1'b0;
    begin int n; n = n_take; pulse(); idle(20);
      expect_eq(n_take, n, "abort: no transfers after NMI"); end
    c = dmactl_t'(rdata[0][15:0]);
    expect_eq(c.abrt, 1, "abort: DMAABORT set");
    wreg(0, 4'b0011, 32'h0);

    // ---- DMAxSZ = 0: no transfer
    setup(20'h0_0E00, 20'h0_0F00, 16'd0);
    model(20'h0_0E00, 20'h0_0F00, 2, 2, 1);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 0, 0, 1)});
    pulse(); idle(10);
    expect_eq(n_take, 0, "size zero: no transfer");
    wreg(0, 4'b0011, 32'h0);

    // ---- software request (DMAREQ) and repeated single
    setup(20'h0_1000, 20'h0_1100, 16'd2);
    model(20'h0_1000, 20'h0_1100, 2, 0, 2);
    wreg(0, 4'b0011, {16'h0, ctlw(DT_RSINGLE, INC_NONE, INC_INC, 0, 0, 0, 1)});
    for (int i = 1; i <= 5; i++) begin
      wreg(0, 4'b0011, {16'h0, ctlw(DT_RSINGLE, INC_NONE, INC_INC, 0, 0, 0, 1) | 16'h0001});
      idle(6);
      expect_eq(n_take, i, "DMAREQ: one transfer per request");
    end
    expect_eq(rdata[0][0], 0, "DMAREQ reads 0");
    expect_eq(en, 1, "repeated single: DMAEN kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
