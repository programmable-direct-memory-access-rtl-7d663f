// tb_dma_workloads -- the controller under its two largest stated loads.
//  1. One block of 65535 word transfers (the largest DMAxSZ) from one memory
//     region to another: every word is checked, the block must take exactly
//     2 x 65535 cycles, and DMAIFG/DMAIV must report channel 3 at the end.
//  2. All eight channels triggered in the same cycle:
//     a. block mode, fixed priority: the blocks must be served one whole
//        block at a time, in channel order 0..7;
//     b. repeated single mode on level triggers with round robin: the
//        transfers must rotate 0,1,...,7,0,1,... with no channel skipped.
module tb_dma_workloads;
  import dmac_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = '0, hresp;
  logic [2:0]  hsize = '0;
  logic        hreadyout;
  logic [31:0] do_haddr, do_hwdata, hrdata_i;
  logic [1:0]  do_htrans;
  logic        do_hwrite, do_hmasterlock, hready_i;
  logic [2:0]  do_hsize, do_hburst;
  logic [NCH-1:0][NTRIG-1:0] dma_trig = '0;
  logic        nmi = 0, cpu_rmw = 0, halt_cpu, dma_irq;
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

  tb_ahb_mem #(.AW(18)) mem (.clk, .rst_n, .haddr(do_haddr), .htrans(do_htrans),
    .hwrite(do_hwrite), .hsize(do_hsize), .hwdata(do_hwdata), .hrdata(hrdata_i),
    .hready(hready_i), .wait_en(1'b0));

  // order in which channels were served
  int seq [$];
  always @(posedge clk) if (dut.take) seq.push_back(int'(dut.take_ch));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
                      input logic [15:0] sz, input logic [15:0] ctl);
    cpu_wr16(chb(n) + 2, sa[15:0]);  cpu_wr16(chb(n) + 4, {12'h0, sa[19:16]});
    cpu_wr16(chb(n) + 6, da[15:0]);  cpu_wr16(chb(n) + 8, {12'h0, da[19:16]});
    cpu_wr16(chb(n) + 10, sz);
    cpu_wr16(chb(n), ctl);
  endtask

  function automatic logic [15:0] ctlw(input dmadt_e dt, input logic lvl, input logic ie);
    dmactl_t c;
    c = '0; c.dmadt = dt; c.dstincr = INC_INC; c.srcincr = INC_INC;
    c.level = lvl; c.en = 1'b1; c.ie = ie;
    return c;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (halt_cpu || dut.busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  // word i of the large block: a simple hash of its index
  function automatic logic [15:0] pat(input int i);
    return 16'(i * 40503 + 17);
  endfunction

  initial begin
    logic [15:0] v;
    int t0, n0, bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. 65535-word block, channel 3, triggered on line 9
    for (int i = 0; i < 65535; i++) mem.poke16(2 * i, pat(i));
    cpu_wr16(8'h02, 16'h0900);                        // DMA3TSEL = 9
    prog(3, 20'h00000, 20'h20000, 16'hFFFF, ctlw(DT_BLOCK, 0, 1));
    @(negedge clk); dma_trig[3][9] = 1'b1;
    wait (dut.take); t0 = cyc + 1; n0 = mem.n_wr;
    wait (mem.n_wr == n0 + 65535);
    chk(cyc - t0 == 2 * 65535, $sformatf("65535-word block took %0d cycles", cyc - t0));
    dma_trig[3][9] = 1'b0;
    wait_idle();
    bad = 0;
    for (int i = 0; i < 65535; i++) if (mem.peek16(32'h20000 + 2 * i) !== pat(i)) bad++;
    chk(bad == 0, $sformatf("65535-word block: %0d wrong words", bad));
    cpu_rd16(chb(3) + 10, v);
    chk(v == 16'hFFFF, "DMAxSZ reloaded after the large block");
    chk(dma_irq, "interrupt after the large block");
    cpu_rd16(8'h0E, v);
    chk(v == 16'h0008, $sformatf("DMAIV %h, expected 08h (channel 3)", v));

    // ---- 2a. eight blocks triggered together, fixed priority
    cpu_wr16(8'h02, 16'h0000);                        // all channels on line 0
    for (int c = 0; c < NCH; c++)
      prog(c, 20'(32'h01000 + 32'h200 * c), 20'(32'h08000 + 32'h200 * c), 16'd40,
           ctlw(DT_BLOCK, 0, 0));
    seq.delete();
    @(negedge clk);
    for (int c = 0; c < NCH; c++) dma_trig[c][0] = 1'b1;
    repeat (4) @(negedge clk);
    wait_idle();
    for (int c = 0; c < NCH; c++) dma_trig[c][0] = 1'b0;
    bad = 0;
    chk(seq.size() == 8 * 40, $sformatf("eight blocks: %0d transfers", seq.size()));
    foreach (seq[i]) if (seq[i] != i / 40) bad++;
    chk(bad == 0, "eight blocks served whole, in channel order");
    bad = 0;
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < 40; i++)
        if (mem.peek16(32'h08000 + 32'h200 * c + 2 * i) !== mem.peek16(32'h01000 + 32'h200 * c + 2 * i)) bad++;
    chk(bad == 0, "eight blocks: data");

    // ---- 2b. eight level-triggered channels, round robin
    cpu_wr16(8'h08, 16'h0002);
    for (int c = 0; c < NCH; c++)
      prog(c, 20'(32'h01000 + 32'h200 * c), 20'(32'h0C000 + 32'h200 * c), 16'd500,
           ctlw(DT_RSINGLE, 1, 0));
    seq.delete();
    @(negedge clk);
    for (int c = 0; c < NCH; c++) dma_trig[c][0] = 1'b1;
    repeat (400) @(negedge clk);
    for (int c = 0; c < NCH; c++) dma_trig[c][0] = 1'b0;
    wait_idle();
    bad = 0;
    // after the start-up, every transfer goes to the channel after the previous one
    for (int i = 16; i < seq.size() - 16; i++) if (seq[i] != (seq[i - 1] + 1) % NCH) bad++;
    chk(seq.size() > 100, $sformatf("round robin: %0d transfers", seq.size()));
    chk(bad == 0, $sformatf("round robin: %0d out-of-turn transfers", bad));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
