// tb_dma_cntrl -- end-to-end test of the eight-channel DMA controller at its
// default size.
// A CPU model programs the controller over the AHB slave port (waiting while
// halt_cpu holds it off the bus), an AHB memory model serves the master port,
// and trigger lines, NMI and the read-modify-write flag are driven directly.
// Every result is checked against memory contents computed in the testbench.
// Cases, each counted as a mechanism that must occur:
//   block (word to word, 2 cycles per transfer), single with external edge
//   triggers (byte to word), burst-block with CPU slots (word to byte, block to
//   fixed address, wait states), fixed to block, repeated block with a level
//   trigger that pauses, fixed and round-robin priority between two channels,
//   NMI abort, DMAIV priority read-out, DMARMWDIS holding off a transfer.
module tb_dma_cntrl;
  import dmac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  // slave port
  logic        hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = '0, hresp;
  logic [2:0]  hsize = '0;
  logic        hreadyout;
  // master port
  logic [31:0] do_haddr, do_hwdata, hrdata_i;
  logic [1:0]  do_htrans;
  logic        do_hwrite, do_hmasterlock, hready_i;
  logic [2:0]  do_hsize, do_hburst;
  // others
  logic [NCH-1:0][NTRIG-1:0] dma_trig = '0;
  logic        nmi = 0, cpu_rmw = 0, halt_cpu, dma_irq;
  logic        wait_en = 0;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  dma_cntrl dut (
    .hclk(clk), .hresetn(rst_n),
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready(hreadyout), .hreadyout,
    .hresp, .hrdata,
    .do_haddr, .do_htrans, .do_hwrite, .do_hsize, .do_hburst, .do_hmasterlock,
    .do_hwdata, .hrdata_i, .hready_i,
    .dma_trig, .nmi, .cpu_rmw, .halt_cpu, .dma_irq
  );

  tb_ahb_mem #(.AW(16)) mem (.clk, .rst_n, .haddr(do_haddr), .htrans(do_htrans),
    .hwrite(do_hwrite), .hsize(do_hsize), .hwdata(do_hwdata), .hrdata(hrdata_i),
    .hready(hready_i), .wait_en);

  // ---------------------------------------------------------------- monitors
  int ch_xfers [NCH];
  int cpu_slots = 0;      // halt_cpu low for a cycle inside a burst-block
  logic halt_d = 0;
  always @(posedge clk) begin
    if (dut.take) ch_xfers[dut.take_ch]++;
    halt_d <= halt_cpu;
  end

  // mechanism counters
  int m_block = 0, m_timing = 0, m_single = 0, m_edge = 0, m_burst = 0, m_slot = 0,
      m_w2b = 0, m_b2w = 0, m_fix_dst = 0, m_fix_src = 0, m_rblock = 0, m_level_pause = 0,
      m_fixed_prio = 0, m_rr = 0, m_nmi = 0, m_iv = 0, m_rmw = 0, m_wait = 0, m_dec = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- CPU model
  task automatic cpu_wr16(input logic [7:0] a, input logic [15:0] v);
    @(negedge clk);
    while (halt_cpu) @(negedge clk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; hsize = HSIZE_HALF; haddr = {24'h0, a};
    @(negedge clk);
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; hwdata = {v, v};
    @(negedge clk);
  endtask

  task automatic cpu_rd16(input logic [7:0] a, output logic [15:0] v);
    @(negedge clk);
    while (halt_cpu) @(negedge clk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0; hsize = HSIZE_HALF; haddr = {24'h0, a};
    @(negedge clk);
    hsel = 0; htrans = HTRANS_IDLE;
    v = hrdata[16 * a[1] +: 16];
    @(negedge clk);
  endtask

  function automatic logic [7:0] chb(input int n); return 8'(16 + 16 * n); endfunction

  task automatic prog(input int n, input logic [19:0] sa, input logic [19:0] da,
                      input logic [15:0] sz);
    cpu_wr16(chb(n) + 2, sa[15:0]);  cpu_wr16(chb(n) + 4, {12'h0, sa[19:16]});
    cpu_wr16(chb(n) + 6, da[15:0]);  cpu_wr16(chb(n) + 8, {12'h0, da[19:16]});
    cpu_wr16(chb(n) + 10, sz);
  endtask

  function automatic logic [15:0] ctlw(input dmadt_e dt, input incr_e di, input incr_e si,
                                       input logic db, input logic sb, input logic lvl,
                                       input logic ie, input logic rq);
    dmactl_t c;
    c = '0; c.dmadt = dt; c.dstincr = di; c.srcincr = si; c.dstbyte = db; c.srcbyte = sb;
    c.level = lvl; c.en = 1'b1; c.ie = ie; c.req = rq;
    return c;
  endfunction

  task automatic set_tsel(input int n, input int t);
    logic [15:0] v;
    cpu_rd16(8'(2 * (n / 2)), v);
    v[8 * (n % 2) +: 5] = 5'(t);
    cpu_wr16(8'(2 * (n / 2)), v);
  endtask

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (halt_cpu || dut.busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    logic [15:0] v;
    int n0, t0, ok;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. block, word to word, started by DMAREQ; 2 cycles per transfer
    for (int i = 0; i < 64; i++) mem.poke16(16'h1000 + 2 * i, 16'h1000 ^ 16'(i * 37));
    prog(0, 20'h01000, 20'h04000, 16'd64);
    cpu_wr16(chb(0), ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 0, 0, 1, 1));
    wait (dut.take); t0 = cyc + 1; n0 = mem.n_wr;   // accepted at the next edge
    wait (mem.n_wr == n0 + 64);
    chk(cyc - t0 == 2 * 64, $sformatf("block of 64 took %0d cycles", cyc - t0));
    if (cyc - t0 == 128) m_timing++;
    wait_idle();
    ok = 1;
    for (int i = 0; i < 64; i++) if (mem.peek16(16'h4000 + 2 * i) !== (16'h1000 ^ 16'(i * 37))) ok = 0;
    chk(ok == 1, "block data"); if (ok) m_block++;
    cpu_rd16(chb(0), v);
    chk(v[4] == 1'b0 && v[3] == 1'b1, "block: DMAEN cleared, DMAIFG set");
    chk(dma_irq == 1'b1, "interrupt raised");

    // ---- 2. single, external edge trigger on line 5, byte to word, decrement dst
    for (int i = 0; i < 4; i++) mem.poke8(16'h1200 + i, 8'hC0 + 8'(i));
    for (int i = 0; i < 4; i++) mem.poke16(16'h4200 - 2 * i, 16'hFFFF);
    set_tsel(1, 5);
    prog(1, 20'h01200, 20'h04200, 16'd4);
    cpu_wr16(chb(1), ctlw(DT_SINGLE, INC_DEC, INC_INC, 0, 1, 0, 1, 0));
    repeat (10) @(negedge clk);
    chk(ch_xfers[1] == 0, "single: nothing before a trigger");
    for (int i = 1; i <= 4; i++) begin
      @(negedge clk); dma_trig[1][5] = 1'b1;
      repeat (4) @(negedge clk); dma_trig[1][5] = 1'b0;
      repeat (6) @(negedge clk);
      chk(ch_xfers[1] == i, $sformatf("single: %0d transfers after %0d edges", ch_xfers[1], i));
      if (ch_xfers[1] == i) m_edge++;
    end
    ok = 1;
    for (int i = 0; i < 4; i++) if (mem.peek16(16'h4200 - 2 * i) !== {8'h00, 8'hC0 + 8'(i)}) ok = 0;
    chk(ok == 1, "single byte-to-word data"); if (ok) begin m_single++; m_b2w++; m_dec++; end

    // ---- 3. burst-block, word to byte into a fixed address, with wait states
    wait_en = 1;
    for (int i = 0; i < 12; i++) mem.poke16(16'h1400 + 2 * i, 16'hAB00 + 16'(i));
    mem.poke8(16'h4400, 8'h00);
    prog(2, 20'h01400, 20'h04400, 16'd12);
    n0 = mem.n_wait;
    cpu_slots = 0;
    cpu_wr16(chb(2), ctlw(DT_BURST, INC_NONE, INC_INC, 1, 0, 0, 0, 1));
    begin
      int low_cycles;
      low_cycles = 0;
      @(negedge clk);
      while (dut.g_ch[2].u_ch.ctl_q.en) begin
        if (!halt_cpu) low_cycles++;
        @(negedge clk);
      end
      // two CPU slots of CPU_SLOT cycles: after transfers 4 and 8
      chk(low_cycles == 2 * CPU_SLOT, $sformatf("burst: %0d CPU cycles inside the block", low_cycles));
      if (low_cycles == 2 * CPU_SLOT) m_slot++;
    end
    wait_idle();
    chk(ch_xfers[2] == 12, "burst: 12 transfers");
    chk(mem.peek8(16'h4400) == 8'h0B, "burst: last low byte at fixed destination");
    if (ch_xfers[2] == 12 && mem.peek8(16'h4400) == 8'h0B) begin m_burst++; m_w2b++; m_fix_dst++; end
    if (mem.n_wait > n0) m_wait++;

    // ---- 4. fixed source to block of addresses (fill), wait states still on
    mem.poke16(16'h1600, 16'h5A5A);
    prog(3, 20'h01600, 20'h04600, 16'd16);
    cpu_wr16(chb(3), ctlw(DT_BLOCK, INC_INC, INC_NONE, 0, 0, 0, 0, 1));
    wait_idle();
    ok = 1;
    for (int i = 0; i < 16; i++) if (mem.peek16(16'h4600 + 2 * i) !== 16'h5A5A) ok = 0;
    chk(ok == 1, "fixed-to-block fill"); if (ok) m_fix_src++;
    wait_en = 0;

    // ---- 5. repeated block, level trigger on line 31, pause mid-block
    for (int i = 0; i < 8; i++) mem.poke16(16'h1800 + 2 * i, 16'h7700 + 16'(i));
    set_tsel(4, 31);
    prog(4, 20'h01800, 20'h04800, 16'd8);
    cpu_wr16(chb(4), ctlw(DT_RBLOCK, INC_INC, INC_INC, 0, 0, 1, 0, 0));
    @(negedge clk); dma_trig[4][31] = 1'b1;
    wait (ch_xfers[4] == 3);
    @(negedge clk); dma_trig[4][31] = 1'b0;
    repeat (20) @(negedge clk);
    n0 = ch_xfers[4];
    chk(n0 >= 3 && n0 < 8, $sformatf("level: paused at %0d", n0));
    repeat (20) @(negedge clk);
    chk(ch_xfers[4] == n0, "level: held while low");
    if (n0 >= 3 && n0 < 8 && ch_xfers[4] == n0) m_level_pause++;
    @(negedge clk); dma_trig[4][31] = 1'b1;
    wait (ch_xfers[4] == 16);
    @(negedge clk); dma_trig[4][31] = 1'b0;
    wait_idle();
    cpu_rd16(chb(4), v);
    chk(v[4] == 1'b1, "repeated block: DMAEN kept");
    ok = 1;
    for (int i = 0; i < 8; i++) if (mem.peek16(16'h4800 + 2 * i) !== 16'h7700 + 16'(i)) ok = 0;
    chk(ok == 1, "repeated block data"); if (ok && v[4]) m_rblock++;
    cpu_wr16(chb(4), 16'h0000);

    // ---- 6. priority between channels 5 and 6, both level triggered high
    set_tsel(5, 1); set_tsel(6, 1);
    for (int mode = 0; mode < 2; mode++) begin
      int a5, a6;
      cpu_wr16(8'h08, mode == 1 ? 16'h0002 : 16'h0000);   // ROUNDROBIN
      prog(5, 20'h01A00, 20'h04A00, 16'd200);
      prog(6, 20'h01C00, 20'h04C00, 16'd200);
      cpu_wr16(chb(5), ctlw(DT_RSINGLE, INC_NONE, INC_NONE, 0, 0, 1, 0, 0));
      cpu_wr16(chb(6), ctlw(DT_RSINGLE, INC_NONE, INC_NONE, 0, 0, 1, 0, 0));
      a5 = ch_xfers[5]; a6 = ch_xfers[6];
      @(negedge clk); dma_trig[5][1] = 1'b1; dma_trig[6][1] = 1'b1;
      repeat (60) @(negedge clk);
      dma_trig[5][1] = 1'b0; dma_trig[6][1] = 1'b0;
      wait_idle();
      a5 = ch_xfers[5] - a5; a6 = ch_xfers[6] - a6;
      if (mode == 0) begin
        // channel 6 only gets the request it had pending when the lines drop
        chk(a5 > 5 && a6 <= 1, $sformatf("fixed priority: ch5=%0d ch6=%0d", a5, a6));
        if (a5 > 5 && a6 <= 1) m_fixed_prio++;
      end else begin
        chk(a5 > 5 && a6 > 5 && (a5 - a6 <= 1) && (a6 - a5 <= 1),
            $sformatf("round robin: ch5=%0d ch6=%0d", a5, a6));
        if (a5 > 5 && a6 > 5) m_rr++;
      end
      cpu_wr16(chb(5), 16'h0000); cpu_wr16(chb(6), 16'h0000);
    end
    cpu_wr16(8'h08, 16'h0000);

    // ---- 7. NMI abort with ENNMI = 1
    cpu_wr16(8'h08, 16'h0001);
    prog(7, 20'h02000, 20'h05000, 16'd200);
    cpu_wr16(chb(7), ctlw(DT_BLOCK, INC_INC, INC_INC, 0, 0, 0, 1, 1));
    wait (ch_xfers[7] == 20);
    nmi = 1'b1;
    repeat (3) @(negedge clk);
    nmi = 1'b0;
    wait_idle();
    n0 = ch_xfers[7];
    repeat (20) @(negedge clk);
    cpu_rd16(chb(7), v);
    chk(v[1] == 1'b1 && n0 < 200 && ch_xfers[7] == n0,
        $sformatf("NMI abort: DMAABORT=%b after %0d transfers", v[1], n0));
    if (v[1] && n0 < 200) m_nmi++;
    cpu_wr16(chb(7), 16'h0000);
    cpu_wr16(8'h08, 16'h0000);

    // ---- 8. DMAIV: flags of channels 0 and 1 pending (both enabled)
    begin
      logic [15:0] a, b, c;
      cpu_rd16(8'h0E, a); cpu_rd16(8'h0E, b); cpu_rd16(8'h0E, c);
      chk(a == 16'h0002 && b == 16'h0004 && c == 16'h0000,
          $sformatf("DMAIV sequence %h %h %h", a, b, c));
      chk(dma_irq == 1'b0, "interrupt cleared");
      if (a == 2 && b == 4 && c == 0) m_iv++;
    end

    // ---- 9. DMARMWDIS holds a transfer while the CPU is in read-modify-write
    cpu_wr16(8'h08, 16'h0004);
    mem.poke16(16'h1E00, 16'h3C3C);
    prog(0, 20'h01E00, 20'h04E00, 16'd1);
    cpu_rmw = 1'b1;
    cpu_wr16(chb(0), ctlw(DT_SINGLE, INC_INC, INC_INC, 0, 0, 0, 0, 1));
    n0 = ch_xfers[0];
    repeat (20) @(negedge clk);
    chk(ch_xfers[0] == n0 && !halt_cpu, "DMARMWDIS: no transfer during read-modify-write");
    cpu_rmw = 1'b0;
    wait_idle();
    chk(ch_xfers[0] == n0 + 1 && mem.peek16(16'h4E00) == 16'h3C3C, "DMARMWDIS: transfer after");
    if (ch_xfers[0] == n0 + 1) m_rmw++;

    // ---- every mechanism must have happened
    chk(m_block > 0, "mechanism block");
    chk(m_timing > 0, "mechanism two-cycle transfer");
    chk(m_single > 0, "mechanism single");
    chk(m_edge > 0, "mechanism edge trigger");
    chk(m_burst > 0, "mechanism burst-block");
    chk(m_slot > 0, "mechanism CPU slot");
    chk(m_w2b > 0, "mechanism word to byte");
    chk(m_b2w > 0, "mechanism byte to word");
    chk(m_fix_dst > 0, "mechanism block to fixed");
    chk(m_fix_src > 0, "mechanism fixed to block");
    chk(m_dec > 0, "mechanism address decrement");
    chk(m_rblock > 0, "mechanism repeated block");
    chk(m_level_pause > 0, "mechanism level trigger pause");
    chk(m_fixed_prio > 0, "mechanism fixed priority");
    chk(m_rr > 0, "mechanism round robin");
    chk(m_nmi > 0, "mechanism NMI abort");
    chk(m_iv > 0, "mechanism DMAIV");
    chk(m_rmw > 0, "mechanism DMARMWDIS");
    chk(m_wait > 0, "mechanism bus wait states");
    $display("INFO mechanisms: block=%0d timing=%0d single=%0d edge=%0d burst=%0d slot=%0d w2b=%0d b2w=%0d fixdst=%0d fixsrc=%0d dec=%0d rblock=%0d levelpause=%0d fixed=%0d rr=%0d nmi=%0d iv=%0d rmw=%0d wait=%0d",
             m_block, m_timing, m_single, m_edge, m_burst, m_slot, m_w2b, m_b2w, m_fix_dst,
             m_fix_src, m_dec, m_rblock, m_level_pause, m_fixed_prio, m_rr, m_nmi, m_iv, m_rmw, m_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
